// tb_srisc_prf: random traffic on all ports of the physical register set,
// checked against a reference of values, valid bits and reader counters.
// The traffic respects the pipeline's rules: only valid registers are
// allocated, only pending ones are written back, and a counter is only
// decremented for a register that has readers. Checked each cycle: the read
// stage values, the rename valid bits including the forwarding of a
// same-cycle write back, and the valid and cnt==0 vectors.
`timescale 1ns/1ps
module tb_srisc_prf;
  import srisc_pkg::*;

  logic  clk = 1'b0, rst_n;
  preg_t ren_src1, ren_src2, ren_dest, rd_src1, rd_src2, wb_dest;
  logic  ren_v1, ren_v2, ren_inc1, ren_inc2, ren_alloc, rd_dec1, rd_dec2, wb_en;
  word_t rd_val1, rd_val2, wb_data;
  logic [NPHYS-1:0] valid, cnt_zero;

  srisc_prf dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t r_val [NPHYS];
  logic  r_v   [NPHYS];
  int    r_cnt [NPHYS];

  function automatic preg_t pick(int kind);  // 0 any, 1 valid, 2 pending, 3 has readers
    preg_t p;
    for (int k = 0; k < 200; k++) begin
      p = preg_t'($urandom_range(NPHYS - 1));
      if (kind == 0 || (kind == 1 && r_v[p]) || (kind == 2 && !r_v[p]) || (kind == 3 && r_cnt[p] > 0))
        return p;
    end
    return '1;
  endfunction

  initial begin
    logic [NPHYS-1:0] ev, ez;
    int ok;
    rst_n = 0;
    {ren_inc1, ren_inc2, ren_alloc, rd_dec1, rd_dec2, wb_en} = '0;
    {ren_src1, ren_src2, ren_dest, rd_src1, rd_src2, wb_dest} = '0;
    wb_data = '0;
    for (int i = 0; i < NPHYS; i++) begin r_val[i] = 0; r_v[i] = 1; r_cnt[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      ren_src1 = pick(0); ren_src2 = pick(0);
      ren_inc1 = (r_cnt[ren_src1] < 10) && 1'($urandom);
      ren_inc2 = (r_cnt[ren_src2] < 10) && 1'($urandom);
      ren_dest = pick(1);
      ren_alloc = (ren_dest != '1) && ($urandom_range(3) == 0);
      rd_src1 = pick(3); rd_src2 = pick(3);
      rd_dec1 = (rd_src1 != '1) && 1'($urandom);
      if (rd_src1 == '1) rd_src1 = 0;
      rd_dec2 = (rd_src2 != '1) && 1'($urandom) && !(rd_dec1 && rd_src2 == rd_src1 && r_cnt[rd_src1] < 2);
      if (rd_src2 == '1) rd_src2 = 0;
      wb_dest = pick(2);
      wb_en = (wb_dest != '1) && 1'($urandom) && !(ren_alloc && wb_dest == ren_dest);
      if (wb_dest == '1) wb_dest = 0;
      wb_data = $urandom;
      #1;
      for (int i = 0; i < NPHYS; i++) begin ev[i] = r_v[i]; ez[i] = (r_cnt[i] == 0); end
      ok = (rd_val1 == r_val[rd_src1]) && (rd_val2 == r_val[rd_src2])
        && (ren_v1 == (r_v[ren_src1] || (wb_en && wb_dest == ren_src1)))
        && (ren_v2 == (r_v[ren_src2] || (wb_en && wb_dest == ren_src2)))
        && (valid == ev) && (cnt_zero == ez);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL cycle %0d", c);
      end
      @(posedge clk);
      if (ren_inc1) r_cnt[ren_src1]++;
      if (ren_inc2) r_cnt[ren_src2]++;
      if (rd_dec1)  r_cnt[rd_src1]--;
      if (rd_dec2)  r_cnt[rd_src2]--;
      if (ren_alloc) r_v[ren_dest] = 0;
      if (wb_en) begin r_v[wb_dest] = 1; r_val[wb_dest] = wb_data; end
      #1;
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
