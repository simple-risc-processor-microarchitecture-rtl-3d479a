// tb_srisc_exls: random loads and stores through EXLS with the write-back
// grant withheld at random. Checked while a packet waits: the address is
// src1 + imm and the store data src2, memory strobes stay low until the
// grant, exactly one strobe of the right kind is given with it, and the tag
// passed to write back marks loads. A small memory here applies the strobes
// and is compared with a reference at the end, and each load's data is
// checked one cycle after its strobe.
`timescale 1ns/1ps
module tb_srisc_exls;
  import srisc_pkg::*;

  logic    clk = 1'b0, rst_n, in_valid, ready, done_valid, grant;
  ex_pkt_t in_pkt;
  wb_pkt_t done_pkt;
  word_t   dmem_addr, dmem_wdata, rdata;
  logic    dmem_we, dmem_re;

  srisc_exls dut (.*);
  always #5 clk = ~clk;

  word_t mem [64];
  word_t rmem [64];
  always_ff @(posedge clk) begin
    if (dmem_re) rdata <= mem[dmem_addr[5:0]];
    if (dmem_we) mem[dmem_addr[5:0]] <= dmem_wdata;
  end

  int checks = 0, failures = 0;
  ex_pkt_t q[$];

  initial begin
    ex_pkt_t p, h;
    logic    load_pending;
    int      completed = 0;
    word_t   load_exp;
    int      ok;
    rst_n = 0; in_valid = 0; in_pkt = '0; grant = 0;
    for (int i = 0; i < 64; i++) begin mem[i] = i; rmem[i] = i; end
    load_pending = 0; load_exp = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      p = '0;
      p.op = 1'($urandom) ? OP_LW : OP_SW;
      p.has_dest = (p.op == OP_LW); p.dest = preg_t'($urandom_range(NPHYS - 1));
      p.iw_idx = iwidx_t'($urandom);
      p.a = $urandom_range(40); p.b = $urandom;
      p.imm = 14'(int'($urandom_range(40)) - 20);
      in_pkt = p;
      in_valid = 1'($urandom);
      grant = done_valid && 1'($urandom);
      #1;
      if (load_pending) begin
        checks++;
        if (rdata != load_exp) begin failures++; $display("FAIL load data cycle %0d", c); end
      end
      load_pending = 0;
      if (done_valid) begin
        h = q[0];
        ok = (dmem_addr == h.a + word_t'(h.imm)) && (dmem_wdata == h.b)
          && (dmem_we == (grant && h.op == OP_SW)) && (dmem_re == (grant && h.op == OP_LW))
          && done_pkt.is_load == (h.op == OP_LW) && done_pkt.dest == h.dest
          && done_pkt.iw_idx == h.iw_idx && done_pkt.has_dest == h.has_dest
          && !done_pkt.redirect;
        checks++;
        if (!ok) begin failures++; $display("FAIL access cycle %0d", c); end
      end else begin
        checks++;
        if (dmem_we || dmem_re) begin failures++; $display("FAIL strobe while idle"); end
      end
      checks++;
      if (ready != (!done_valid || grant)) begin failures++; $display("FAIL ready cycle %0d", c); end
      @(posedge clk);
      if (done_valid && grant) begin
        completed++;
        h = q.pop_front();
        if (h.op == OP_SW) rmem[6'(h.a + word_t'(h.imm))] = h.b;
        else begin load_pending = 1; load_exp = rmem[6'(h.a + word_t'(h.imm))]; end
      end
      if (ready && in_valid) q.push_back(p);
      #1;
    end
    checks++;
    if (completed < 1000) begin failures++; $display("FAIL only %0d accesses completed", completed); end
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (mem[i] != rmem[i]) begin failures++; $display("FAIL mem[%0d]", i); end
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
