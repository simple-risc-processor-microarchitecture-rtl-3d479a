// tb_srisc_read: random window contents and unit availability checked
// against the issue rule: among entries that are valid, not yet issued,
// have both source valid bits and whose unit is ready, the oldest issues.
// Ages are a random permutation of 0..IW_DEPTH-1 (the larger, the older). Also checked: the
// operand values and the other packet fields, the unit the packet goes to,
// the reader counter decrements and the out-of-order indication.
// A second instance with ISSUE_RR = 1 is then clocked through random windows
// and checked against a model of its round-robin pointer: the first ready
// slot at or after the pointer issues, and the pointer moves past it.
`timescale 1ns/1ps
module tb_srisc_read;
  import srisc_pkg::*;

  iw_entry_t ent [IW_DEPTH];
  logic      unit_ready [3];
  logic      issue_en, rd_dec1, rd_dec2, ooo_issue;
  iwidx_t    issue_idx;
  preg_t     rd_src1, rd_src2;
  word_t     rd_val1, rd_val2;
  logic      disp_valid [3];
  ex_pkt_t   disp_pkt;

  logic      clk = 0, rst_n = 0;

  srisc_read dut (.*);

  // round-robin instance
  logic      rr_issue_en, rr_dec1, rr_dec2, rr_ooo;
  iwidx_t    rr_issue_idx;
  preg_t     rr_src1, rr_src2;
  word_t     rr_val1, rr_val2;
  logic      rr_disp_valid [3];
  ex_pkt_t   rr_pkt;

  srisc_read #(.ISSUE_RR(1'b1)) dut_rr (
    .clk, .rst_n, .ent, .unit_ready, .issue_en(rr_issue_en), .issue_idx(rr_issue_idx),
    .rd_src1(rr_src1), .rd_src2(rr_src2), .rd_val1(rr_val1), .rd_val2(rr_val2),
    .rd_dec1(rr_dec1), .rd_dec2(rr_dec2), .disp_valid(rr_disp_valid), .disp_pkt(rr_pkt),
    .ooo_issue(rr_ooo)
  );

  function automatic word_t val(preg_t p);
    return 32'hC0DE0000 + 32'(p) * 17;
  endfunction
  assign rd_val1 = val(rd_src1);
  assign rd_val2 = val(rd_src2);
  assign rr_val1 = val(rr_src1);
  assign rr_val2 = val(rr_src2);

  op_e ops [8] = '{OP_ADD, OP_ADDI, OP_JAL, OP_BEQ, OP_LW, OP_SW, OP_FMUL, OP_NOP};

  int checks = 0, failures = 0;

  function automatic unit_e u_of(op_e op);
    return op inside {OP_LW, OP_SW} ? U_EXLS : op == OP_FMUL ? U_EXF : U_EXI;
  endfunction

  initial begin
    int   base, best, bestoff, ooo, ptr, nrr;
    int   off [IW_DEPTH];
    logic rdy;
    unit_e u;
    for (int t = 0; t < 20000; t++) begin
      base = $urandom;
      for (int i = 0; i < IW_DEPTH; i++) off[i] = i;
      off.shuffle();
      for (int i = 0; i < IW_DEPTH; i++) begin
        ent[i] = '0;
        ent[i].valid  = ($urandom_range(4) != 0);
        ent[i].issued = ($urandom_range(3) == 0);
        ent[i].op     = ops[$urandom_range(7)];
        ent[i].has_dest = 1'($urandom);
        ent[i].dest   = preg_t'($urandom_range(NPHYS - 1));
        ent[i].src1   = preg_t'($urandom_range(NPHYS - 1));
        ent[i].src2   = preg_t'($urandom_range(NPHYS - 1));
        ent[i].v1     = ($urandom_range(3) != 0);
        ent[i].v2     = ($urandom_range(3) != 0);
        ent[i].age    = age_t'(IW_DEPTH - 1 - off[i]);
        ent[i].imm    = 14'($urandom);
        ent[i].pc     = $urandom;
      end
      for (int k = 0; k < 3; k++) unit_ready[k] = ($urandom_range(3) != 0);
      #1;
      best = -1; bestoff = 0; ooo = 0;
      for (int i = 0; i < IW_DEPTH; i++) begin
        u = ent[i].op inside {OP_LW, OP_SW} ? U_EXLS : ent[i].op == OP_FMUL ? U_EXF : U_EXI;
        rdy = ent[i].valid && !ent[i].issued && ent[i].v1 && ent[i].v2 && unit_ready[u];
        // memory operations in program order
        if (u == U_EXLS)
          for (int j = 0; j < IW_DEPTH; j++)
            if (ent[j].valid && !ent[j].issued && ent[j].op inside {OP_LW, OP_SW} && off[j] < off[i]) rdy = 0;
        if (rdy && (best < 0 || off[i] < bestoff)) begin best = i; bestoff = off[i]; end
      end
      for (int i = 0; i < IW_DEPTH; i++)
        if (best >= 0 && ent[i].valid && !ent[i].issued && off[i] < bestoff) ooo = 1;
      checks++;
      if (issue_en != (best >= 0) || (best >= 0 && issue_idx != iwidx_t'(best)) || ooo_issue != ooo) begin
        failures++;
        $display("FAIL select t=%0d got %0d/%0d expected %0d", t, issue_en, issue_idx, best);
      end else if (best >= 0) begin
        u = ent[best].op inside {OP_LW, OP_SW} ? U_EXLS : ent[best].op == OP_FMUL ? U_EXF : U_EXI;
        checks++;
        if (disp_valid[u] != 1 || disp_valid[0] + disp_valid[1] + disp_valid[2] != 1
            || disp_pkt.a != val(ent[best].src1) || disp_pkt.b != val(ent[best].src2)
            || disp_pkt.op != ent[best].op || disp_pkt.dest != ent[best].dest
            || disp_pkt.has_dest != ent[best].has_dest
            || disp_pkt.iw_idx != iwidx_t'(best) || disp_pkt.imm != ent[best].imm
            || disp_pkt.pc != ent[best].pc
            || rd_dec1 != (ent[best].op != OP_JAL && ent[best].op != OP_NOP)
            || rd_dec2 != (ent[best].op inside {OP_ADD, OP_BEQ, OP_SW, OP_FMUL})) begin
          failures++;
          $display("FAIL dispatch t=%0d", t);
        end
      end else begin
        checks++;
        if (disp_valid[0] || disp_valid[1] || disp_valid[2] || rd_dec1 || rd_dec2) begin
          failures++;
          $display("FAIL idle dispatch t=%0d", t);
        end
      end
    end

    // Round robin: reset the pointer, then clock random windows through.
    clk = 0; rst_n = 0; #1 clk = 1; #1 clk = 0; rst_n = 1;
    ptr = 0; nrr = 0;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < IW_DEPTH; i++) off[i] = i;
      off.shuffle();
      for (int i = 0; i < IW_DEPTH; i++) begin
        ent[i] = '0;
        ent[i].valid  = ($urandom_range(2) != 0);
        ent[i].issued = ($urandom_range(4) == 0);
        ent[i].op     = ops[$urandom_range(7)];
        ent[i].src1   = preg_t'($urandom_range(NPHYS - 1));
        ent[i].src2   = preg_t'($urandom_range(NPHYS - 1));
        ent[i].v1     = ($urandom_range(3) != 0);
        ent[i].v2     = ($urandom_range(3) != 0);
        ent[i].age    = age_t'(IW_DEPTH - 1 - off[i]);
      end
      for (int k = 0; k < 3; k++) unit_ready[k] = ($urandom_range(4) != 0);
      #1;
      best = -1;
      for (int k = 0; k < IW_DEPTH; k++) begin
        int i;
        i = (ptr + k) % IW_DEPTH;
        u = ent[i].op inside {OP_LW, OP_SW} ? U_EXLS : ent[i].op == OP_FMUL ? U_EXF : U_EXI;
        rdy = ent[i].valid && !ent[i].issued && ent[i].v1 && ent[i].v2 && unit_ready[u];
        if (u == U_EXLS)
          for (int j = 0; j < IW_DEPTH; j++)
            if (ent[j].valid && !ent[j].issued && ent[j].op inside {OP_LW, OP_SW} && off[j] < off[i]) rdy = 0;
        if (rdy && best < 0) best = i;
      end
      checks++;
      if (rr_issue_en != (best >= 0) || (best >= 0 && (rr_issue_idx != iwidx_t'(best)
          || rr_pkt.a != val(ent[best].src1) || !rr_disp_valid[u_of(ent[best].op)]))) begin
        failures++;
        $display("FAIL round robin t=%0d ptr=%0d got %0d/%0d expected %0d", t, ptr,
                 rr_issue_en, rr_issue_idx, best);
      end
      // a younger entry chosen over an older ready one shows the policy differs
      if (best >= 0 && issue_en && issue_idx != iwidx_t'(best)) nrr++;
      clk = 1; #1 clk = 0;
      if (best >= 0) ptr = (best + 1) % IW_DEPTH;
    end
    checks++;
    if (nrr == 0) begin
      failures++;
      $display("FAIL round robin never chose differently from oldest-first");
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
