// srisc_read: READ stage (issue and dispatch).
//
// An entry may issue when it is in the window, has not issued yet, both its
// source valid bits are set (unused sources enter the window valid) and the
// execution unit its opcode needs can take an instruction this cycle. Among
// those the oldest, by the age field, is chosen by default (see below); one
// instruction issues per cycle. Selection is combinational. The chosen
// entry's sources address the register set (4), the operand values come back
// in the same cycle, and the packet is presented to the input pipeline
// register of its unit (5), which loads it at the clock edge. Each used
// source also decrements its register's reader counter.
// The description names both a round-robin and an oldest-first choice among
// ready instructions; both are built and ISSUE_RR selects. With ISSUE_RR = 0
// (the default) the oldest ready entry issues. With ISSUE_RR = 1 a pointer
// names the window slot searched first; the first ready slot at or after it,
// wrapping, issues, and the pointer then moves to the slot after that one,
// so every slot gets its turn. The pointer is the only state of this stage
// (synchronous active-low reset to slot 0). The description says nothing of
// dependences through memory: here a load or store also waits until every
// older load and store has issued, so memory is accessed in program order
// (EXLS then keeps that order up to the memory).
module srisc_read
  import srisc_pkg::*;
#(
  parameter bit ISSUE_RR = 1'b0        // 0: oldest ready first, 1: round robin over slots
) (
  input  logic      clk,
  input  logic      rst_n,
  input  iw_entry_t ent [IW_DEPTH],
  input  logic      unit_ready [3],   // indexed by unit_e
  output logic      issue_en,
  output iwidx_t    issue_idx,
  output preg_t     rd_src1,
  output preg_t     rd_src2,
  input  word_t     rd_val1,
  input  word_t     rd_val2,
  output logic      rd_dec1,
  output logic      rd_dec2,
  output logic      disp_valid [3],   // indexed by unit_e
  output ex_pkt_t   disp_pkt,
  output logic      ooo_issue         // a younger instruction issues past an older waiting one
);
  logic [IW_DEPTH-1:0] ready, waiting_mem, mem_order;
  logic      mem_hold;
  iw_entry_t sel;
  iwidx_t    rr_ptr;   // round robin: slot searched first

  always_ff @(posedge clk) begin
    if (!rst_n)        rr_ptr <= '0;
    else if (issue_en) rr_ptr <= (int'(issue_idx) == IW_DEPTH - 1) ? '0 : issue_idx + 1'b1;
  end

  always_comb begin
    // Loads and stores leave the read stage in program order.
    for (int i = 0; i < IW_DEPTH; i++)
      waiting_mem[i] = ent[i].valid && !ent[i].issued && op_unit(ent[i].op) == U_EXLS;
    mem_hold = 1'b0;
    for (int i = 0; i < IW_DEPTH; i++) begin
      mem_order[i] = 1'b1;
      for (int j = 0; j < IW_DEPTH; j++)
        if (waiting_mem[i] && waiting_mem[j] && older(ent[j].age, ent[i].age)) mem_order[i] = 1'b0;
    end
    for (int i = 0; i < IW_DEPTH; i++) begin
      ready[i] = ent[i].valid && !ent[i].issued && ent[i].v1 && ent[i].v2
                 && unit_ready[op_unit(ent[i].op)] && mem_order[i];
      if (ent[i].valid && !ent[i].issued && ent[i].v1 && ent[i].v2 && !mem_order[i]) mem_hold = 1'b1;
    end
    issue_en  = 1'b0;
    issue_idx = '0;
    if (ISSUE_RR) begin
      for (int k = 0; k < IW_DEPTH; k++) begin
        int i;
        i = int'(rr_ptr) + k;
        if (i >= IW_DEPTH) i -= IW_DEPTH;
        if (ready[i] && !issue_en) begin
          issue_en  = 1'b1;
          issue_idx = iwidx_t'(i);
        end
      end
    end else begin
      for (int i = 0; i < IW_DEPTH; i++) begin
        if (ready[i] && (!issue_en || older(ent[i].age, ent[issue_idx].age))) begin
          issue_en  = 1'b1;
          issue_idx = iwidx_t'(i);
        end
      end
    end
    sel = ent[issue_idx];

    ooo_issue = 1'b0;
    for (int i = 0; i < IW_DEPTH; i++)
      if (issue_en && ent[i].valid && !ent[i].issued && older(ent[i].age, sel.age))
        ooo_issue = 1'b1;

    rd_src1 = sel.src1;
    rd_src2 = sel.src2;
    rd_dec1 = issue_en && op_uses_rs1(sel.op);
    rd_dec2 = issue_en && op_uses_rs2(sel.op);

    for (int u = 0; u < 3; u++) disp_valid[u] = issue_en && (op_unit(sel.op) == unit_e'(u));
    disp_pkt.op       = sel.op;
    disp_pkt.has_dest = sel.has_dest;
    disp_pkt.dest     = sel.dest;
    disp_pkt.iw_idx   = issue_idx;
    disp_pkt.a        = rd_val1;
    disp_pkt.b        = rd_val2;
    disp_pkt.imm      = sel.imm;
    disp_pkt.pc       = sel.pc;
  end
endmodule
