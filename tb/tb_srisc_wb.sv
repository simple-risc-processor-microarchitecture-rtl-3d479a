// tb_srisc_wb: random sets of finished units with distinct window ages,
// checked against the write-back rule: exactly the oldest offering unit is
// granted, and one cycle later the stage presents that unit's result:
// register write (only with a destination), window index, redirect, and the
// data memory word instead of the result for a load.
`timescale 1ns/1ps
module tb_srisc_wb;
  import srisc_pkg::*;

  logic    clk = 1'b0, rst_n;
  logic    done_valid [3];
  wb_pkt_t done_pkt   [3];
  age_t    done_age   [3];
  logic    grant      [3];
  word_t   dmem_rdata, wb_data, redirect_pc;
  logic    wb_en, wb_reg_en, redirect_en, conflict;
  preg_t   wb_dest;
  iwidx_t  wb_idx;

  srisc_wb dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    int      base, win, nv, conflicts;
    int      off [3];
    wb_pkt_t exp_pkt;
    logic    exp_v;
    rst_n = 0;
    for (int u = 0; u < 3; u++) begin done_valid[u] = 0; done_pkt[u] = '0; end
    dmem_rdata = 0;
    exp_v = 0; exp_pkt = '0; conflicts = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      base = $urandom;
      off = '{0, 1 + $urandom_range(4), 6 + $urandom_range(IW_DEPTH - 7)};
      off.shuffle();
      win = -1; nv = 0;
      for (int u = 0; u < 3; u++) begin
        done_valid[u] = 1'($urandom);
        done_pkt[u] = '{has_dest: 1'($urandom), dest: preg_t'($urandom_range(NPHYS - 1)),
                        iw_idx: iwidx_t'($urandom), result: $urandom,
                        is_load: ($urandom_range(3) == 0), redirect: ($urandom_range(3) == 0),
                        next_pc: $urandom};
        done_age[u] = age_t'(IW_DEPTH - 1 - off[u]);
        if (done_valid[u]) begin
          nv++;
          if (win < 0 || off[u] < off[win]) win = u;
        end
      end
      dmem_rdata = $urandom;
      #1;
      // outputs of the instruction granted last cycle
      checks++;
      if (wb_en != exp_v || (exp_v && (wb_reg_en != exp_pkt.has_dest || wb_dest != exp_pkt.dest
          || wb_idx != exp_pkt.iw_idx || redirect_en != exp_pkt.redirect
          || (exp_pkt.redirect && redirect_pc != exp_pkt.next_pc)
          || wb_data != (exp_pkt.is_load ? dmem_rdata : exp_pkt.result)))
          || (!exp_v && (wb_reg_en || redirect_en))) begin
        failures++;
        $display("FAIL write back cycle %0d", c);
      end
      checks++;
      if (grant[0] != (win == 0) || grant[1] != (win == 1) || grant[2] != (win == 2) || conflict != (nv > 1)) begin
        failures++;
        $display("FAIL grant cycle %0d: expected %0d", c, win);
      end
      if (nv > 1) conflicts++;
      @(posedge clk);
      exp_v = (win >= 0);
      if (win >= 0) exp_pkt = done_pkt[win];
      #1;
    end
    checks++;
    if (conflicts == 0) failures++;
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
