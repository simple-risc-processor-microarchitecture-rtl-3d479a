// tb_srisc_decode_rename: random instructions and random surroundings
// (map contents, register valid bits, window full/exit, allocator result)
// checked against the rename and stall rules: the window entry's fields,
// which sources count as readers, when a destination is allocated and the
// map rewritten, the two stall conditions and HALT handling.
`timescale 1ns/1ps
module tb_srisc_decode_rename;
  import srisc_pkg::*;
  import srisc_tb_pkg::*;

  logic  clk = 1'b0, rst_n;
  logic  ir_valid, accept, is_ctrl, is_halt, map_wr, alloc_found, alloc_remap;
  word_t ir, ir_pc;
  areg_t rs1, rs2, rd;
  preg_t p_rs1, p_rs2, alloc_preg;
  logic [NPHYS-1:0] alloc_exclude;
  logic  v1_in, v2_in, inc1, inc2, alloc_en, iw_full, iw_exit, iw_push, stall_iw, stall_reg;
  iw_entry_t iw_entry;

  srisc_decode_rename dut (.*);
  always #5 clk = ~clk;

  // the "map" seen by decode
  assign p_rs1 = preg_t'((int'(rs1) * 5 + 1) % NPHYS);
  assign p_rs2 = preg_t'((int'(rs2) * 5 + 1) % NPHYS);

  op_e ops [19] = '{OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI,
                    OP_BEQ, OP_BNE, OP_JAL, OP_LW, OP_SW, OP_FADD, OP_FSUB, OP_FMUL, OP_HALT};

  int checks = 0, failures = 0;
  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    op_e   op;
    int    a, b, d, imm;
    logic  u1, u2, hd, e_acc, e_push, e_siw, e_sreg;
    logic [NPHYS-1:0] e_ex;
    rst_n = 0; ir_valid = 0; ir = 0; ir_pc = 0; v1_in = 0; v2_in = 0;
    iw_full = 0; iw_exit = 0; alloc_found = 0; alloc_preg = 0; alloc_remap = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      op  = ops[$urandom_range(18)];
      d   = $urandom_range(15); a = $urandom_range(15); b = $urandom_range(15);
      imm = int'($urandom_range(16383)) - 8192;
      ir  = enc(op, d, a, b, imm);
      ir_pc = $urandom;
      ir_valid = ($urandom_range(7) != 0);
      v1_in = 1'($urandom); v2_in = 1'($urandom);
      iw_full = ($urandom_range(3) == 0); iw_exit = 1'($urandom);
      alloc_found = ($urandom_range(3) != 0); alloc_preg = preg_t'($urandom_range(NPHYS - 1));
      alloc_remap = 1'($urandom);
      #1;
      u1 = !(op inside {OP_NOP, OP_JAL, OP_HALT});
      u2 = op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL,
                      OP_BEQ, OP_BNE, OP_SW, OP_FADD, OP_FSUB, OP_FMUL};
      hd = op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI,
                      OP_JAL, OP_LW, OP_FADD, OP_FSUB, OP_FMUL};
      e_siw  = ir_valid && op != OP_HALT && iw_full && !iw_exit;
      e_sreg = ir_valid && op != OP_HALT && hd && !alloc_found;
      e_acc  = ir_valid && !e_siw && !e_sreg;
      e_push = e_acc && op != OP_HALT;
      e_ex   = '0;
      if (u1) e_ex[(a * 5 + 1) % NPHYS] = 1'b1;
      if (u2) e_ex[(b * 5 + 1) % NPHYS] = 1'b1;
      check(rs1 == areg_t'(a) && rs2 == areg_t'(b) && rd == areg_t'(d), "field extraction");
      check(stall_iw == e_siw && stall_reg == e_sreg && accept == e_acc && iw_push == e_push, "stall/accept");
      check(is_ctrl == (op inside {OP_BEQ, OP_BNE, OP_JAL}) && is_halt == (op == OP_HALT), "ctrl/halt");
      check(inc1 == (e_push && u1) && inc2 == (e_push && u2), "reader counts");
      check(alloc_en == (e_push && hd) && map_wr == (e_push && hd && alloc_remap), "allocation");
      check(alloc_exclude == e_ex, "exclude mask");
      if (e_push)
        check(iw_entry.valid && !iw_entry.issued && iw_entry.op == op && iw_entry.has_dest == hd
              && (!hd || iw_entry.dest == alloc_preg)
              && iw_entry.src1 == preg_t'((a * 5 + 1) % NPHYS) && iw_entry.src2 == preg_t'((b * 5 + 1) % NPHYS)
              && iw_entry.v1 == (!u1 || v1_in) && iw_entry.v2 == (!u2 || v2_in)
              && iw_entry.age == 0 && iw_entry.imm == 14'(imm) && iw_entry.pc == ir_pc,
              $sformatf("entry fields op %s", op.name()));
      @(posedge clk);
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
