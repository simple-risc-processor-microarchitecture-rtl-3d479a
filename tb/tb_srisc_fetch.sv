// tb_srisc_fetch: checks the FETCH stage against a model of the expected
// instruction stream. The program memory returns a word computed from its
// address. Decode accepts at random; random accepted words are treated as
// control instructions, after which the test checks that nothing more is
// fetched until a redirect, and that fetching resumes at the redirect PC.
// A HALT must stop fetching for good. With decode always accepting, the
// stage must deliver one instruction per cycle.
`timescale 1ns/1ps
module tb_srisc_fetch;
  import srisc_pkg::*;

  logic  clk = 1'b0, rst_n;
  word_t imem_addr, imem_data, ir, ir_pc, redirect_pc;
  logic  ir_valid, dec_accept, dec_ctrl, dec_halt, redirect_en;

  srisc_fetch dut (.*);
  always #5 clk = ~clk;

  function automatic word_t mem(word_t a);
    return (a * 32'h9E3779B1) ^ 32'h5A5A0000;
  endfunction
  assign imem_data = mem(imem_addr);

  int checks = 0, failures = 0;
  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    word_t exp_pc;
    int    accepted, waiting;
    rst_n = 0; dec_accept = 0; dec_ctrl = 0; dec_halt = 0; redirect_en = 0; redirect_pc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // throughput: always accept
    exp_pc = 0;
    accepted = 0;
    for (int c = 0; c < 50; c++) begin
      #1;
      dec_accept = ir_valid;
      if (ir_valid) begin
        check(ir_pc == exp_pc && ir == mem(exp_pc), $sformatf("stream pc %0d got %0d", exp_pc, ir_pc));
        exp_pc++;
        accepted++;
      end
      @(posedge clk);
    end
    check(accepted >= 49, $sformatf("one instruction per cycle, got %0d in 50", accepted));
    // random acceptance with control instructions and redirects
    waiting = 0;
    for (int c = 0; c < 2000; c++) begin
      #1;
      dec_accept = 0; dec_ctrl = 0; redirect_en = 0;
      if (waiting > 0) begin
        check(!ir_valid, "no instruction while waiting for a control instruction");
        waiting--;
        if (waiting == 0) begin
          redirect_en = 1;
          redirect_pc = $urandom_range(1000);
          exp_pc = redirect_pc;
        end
      end else if (ir_valid && $urandom_range(3) != 0) begin
        check(ir_pc == exp_pc && ir == mem(exp_pc), $sformatf("stream pc %0d got %0d", exp_pc, ir_pc));
        dec_accept = 1;
        exp_pc++;
        if ($urandom_range(9) == 0) begin
          dec_ctrl = 1;
          waiting  = 1 + $urandom_range(5);
        end
      end
      @(posedge clk);
    end
    // HALT
    #1 redirect_en = 0; dec_accept = 0; dec_ctrl = 0;
    while (!ir_valid) @(posedge clk);
    #1 dec_accept = 1; dec_halt = 1;
    @(posedge clk);
    #1 dec_accept = 0; dec_halt = 0;
    for (int c = 0; c < 20; c++) begin
      check(!ir_valid, "nothing fetched after HALT");
      @(posedge clk); #1;
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
