// tb_srisc_free_alloc: random register states checked against the
// allocation rule: a register is usable when valid, unread (cnt zero) and
// not a source of the renamed instruction; the current mapping is kept when
// usable, otherwise the lowest usable unmapped register is chosen, and
// found is low when there is none.
`timescale 1ns/1ps
module tb_srisc_free_alloc;
  import srisc_pkg::*;

  logic [NPHYS-1:0] reg_valid, cnt_zero, mapped, exclude;
  preg_t cur, preg;
  logic  found, remap;

  srisc_free_alloc dut (.*);

  int checks = 0, failures = 0;

  initial begin
    logic  e_found;
    preg_t e_preg;
    for (int t = 0; t < 20000; t++) begin
      // sparse random vectors so that every outcome is common
      reg_valid = NPHYS'({$urandom, $urandom}) | NPHYS'({$urandom, $urandom});
      cnt_zero  = NPHYS'({$urandom, $urandom}) | NPHYS'({$urandom, $urandom});
      mapped    = NPHYS'({$urandom, $urandom}) | NPHYS'({$urandom, $urandom}) | NPHYS'({$urandom, $urandom});
      exclude   = '0;
      exclude[$urandom_range(NPHYS - 1)] = 1'b1;
      cur = preg_t'($urandom_range(NPHYS - 1));
      mapped[cur] = 1'b1;
      #1;
      e_found = 0;
      e_preg  = cur;
      if (reg_valid[cur] && cnt_zero[cur] && !exclude[cur]) e_found = 1;
      else
        for (int i = 0; i < NPHYS; i++)
          if (!e_found && reg_valid[i] && cnt_zero[i] && !exclude[i] && !mapped[i]) begin
            e_found = 1;
            e_preg  = preg_t'(i);
          end
      checks++;
      if (found != e_found || (e_found && (preg != e_preg || remap != (e_preg != cur)))) begin
        failures++;
        $display("FAIL t=%0d found %0d/%0d preg %0d/%0d", t, found, e_found, preg, e_preg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
