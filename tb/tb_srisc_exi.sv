// tb_srisc_exi: random integer and control operations through EXI, with the
// write-back grant withheld at random. Results, next PCs and tags are
// compared with values computed here; a packet must stay in the unit while
// not granted, the unit must refuse new work meanwhile, and with the grant
// always given a result appears one cycle after dispatch.
`timescale 1ns/1ps
module tb_srisc_exi;
  import srisc_pkg::*;

  logic    clk = 1'b0, rst_n, in_valid, ready, done_valid, grant;
  ex_pkt_t in_pkt;
  wb_pkt_t done_pkt;

  srisc_exi dut (.*);
  always #5 clk = ~clk;

  op_e ops [13] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI,
                    OP_BEQ, OP_BNE, OP_JAL, OP_NOP};

  int checks = 0, failures = 0;
  ex_pkt_t q[$];
  int      sent_at[$];
  int      cyc = 0;
  always @(posedge clk) cyc++;

  function automatic wb_pkt_t expect_of(ex_pkt_t p);
    wb_pkt_t e;
    word_t   s;
    s = word_t'(p.imm);
    e = '0;
    e.has_dest = p.has_dest; e.dest = p.dest; e.iw_idx = p.iw_idx;
    e.next_pc = p.pc + 1;
    case (p.op)
      OP_ADD:  e.result = p.a + p.b;
      OP_SUB:  e.result = p.a - p.b;
      OP_AND:  e.result = p.a & p.b;
      OP_OR:   e.result = p.a | p.b;
      OP_XOR:  e.result = p.a ^ p.b;
      OP_SLT:  e.result = ($signed(p.a) < $signed(p.b)) ? 1 : 0;
      OP_SLL:  e.result = p.a << (p.b % 32);
      OP_SRL:  e.result = p.a >> (p.b % 32);
      OP_ADDI: e.result = p.a + s;
      OP_JAL:  begin e.result = p.pc + 1; e.next_pc = p.pc + s; e.redirect = 1; end
      OP_BEQ:  begin e.redirect = 1; if (p.a == p.b) e.next_pc = p.pc + s; end
      OP_BNE:  begin e.redirect = 1; if (p.a != p.b) e.next_pc = p.pc + s; end
      default: ;
    endcase
    return e;
  endfunction

  initial begin
    ex_pkt_t p;
    int phase_free;
    rst_n = 0; in_valid = 0; in_pkt = '0; grant = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      phase_free = (c < 1000);
      p.op = ops[$urandom_range(12)];
      p.has_dest = 1'($urandom); p.dest = preg_t'($urandom_range(NPHYS - 1));
      p.iw_idx = iwidx_t'($urandom);
      p.a = $urandom; p.b = ($urandom_range(3) == 0) ? p.a : $urandom;
      if ($urandom_range(3) == 0) p.b = $urandom_range(40);
      p.imm = 14'($urandom); p.pc = $urandom;
      in_pkt = p;
      in_valid = 1'($urandom);
      grant = phase_free ? done_valid : (done_valid && 1'($urandom));
      #1;
      if (done_valid) begin
        checks++;
        if (q.size() == 0 || done_pkt != expect_of(q[0])) begin
          failures++;
          $display("FAIL result cycle %0d op %s", c, q.size() ? q[0].op.name() : "none");
        end
        if (phase_free) begin
          checks++;
          if (cyc - sent_at[0] != 1) begin failures++; $display("FAIL latency %0d", cyc - sent_at[0]); end
        end
      end
      checks++;
      if (ready != (!done_valid || grant)) begin failures++; $display("FAIL ready"); end
      @(posedge clk);
      if (done_valid && grant) begin void'(q.pop_front()); void'(sent_at.pop_front()); end
      if (ready && in_valid) begin q.push_back(p); sent_at.push_back(cyc); end
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
