// tb_srisc_regmap: random rewrites of the register map table checked
// against a reference array: identity mapping after reset, the three read
// ports, the write port and the vector of mapped physical registers.
`timescale 1ns/1ps
module tb_srisc_regmap;
  import srisc_pkg::*;

  logic  clk = 1'b0, rst_n;
  areg_t rs1, rs2, rd, wr_areg;
  preg_t p_rs1, p_rs2, p_rd, wr_preg;
  logic  wr_en;
  logic [NPHYS-1:0] mapped;

  srisc_regmap dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  preg_t ref_map [NARCH];

  initial begin
    logic [NPHYS-1:0] m;
    rst_n = 0; wr_en = 0; rs1 = 0; rs2 = 0; rd = 0; wr_areg = 0; wr_preg = 0;
    for (int i = 0; i < NARCH; i++) ref_map[i] = preg_t'(i);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      rs1 = areg_t'($urandom); rs2 = areg_t'($urandom); rd = areg_t'($urandom);
      wr_en = 1'($urandom); wr_areg = areg_t'($urandom); wr_preg = preg_t'($urandom_range(NPHYS - 1));
      #1;
      m = '0;
      for (int i = 0; i < NARCH; i++) m[ref_map[i]] = 1'b1;
      checks++;
      if (p_rs1 != ref_map[rs1] || p_rs2 != ref_map[rs2] || p_rd != ref_map[rd] || mapped != m) begin
        failures++;
        $display("FAIL cycle %0d: %0d %0d %0d %h", c, p_rs1, p_rs2, p_rd, mapped);
      end
      @(posedge clk);
      if (wr_en) ref_map[wr_areg] = wr_preg;
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
