// srisc_iw: Instruction Window.
//
// IW_DEPTH entries, each holding op, dest, src1, src2, age, v1 and v2 (plus
// the immediate and PC the execution units need, a valid bit, and an issued
// bit marking entries that have left the read stage). The age of an entry
// is the number of younger entries in the window: it is 0 on entry, grows by
// one whenever a later instruction enters and shrinks by one whenever a
// younger instruction leaves, so the largest age is the oldest instruction
// and ages stay exact however long an instruction waits. An instruction is
// written by decode&rename (push) into the lowest free entry, or into the
// entry freed by write back in the same cycle when the window is full. It is
// marked issued when the read stage dispatches it, and it leaves the window
// when it completes write back (wb_en, wb_idx). At that moment the write-back
// destination is compared with every entry's sources and the matching valid
// bits are set (the broadcast). Entries are visible combinationally to the
// read stage. All updates happen at the clock edge.
module srisc_iw
  import srisc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  iw_entry_t push_entry,
  input  logic      issue_en,
  input  iwidx_t    issue_idx,
  input  logic      wb_en,        // an instruction completes write back
  input  iwidx_t    wb_idx,
  input  logic      wb_has_dest,
  input  preg_t     wb_dest,
  output iw_entry_t ent [IW_DEPTH],
  output logic      full,
  output logic      empty
);
  iwidx_t slot;
  logic   slot_found;

  always_comb begin
    slot_found = 1'b0;
    slot       = wb_idx;
    for (int i = IW_DEPTH - 1; i >= 0; i--) begin
      if (!ent[i].valid) begin
        slot_found = 1'b1;
        slot       = iwidx_t'(i);
      end
    end
    full  = !slot_found;
    empty = 1'b1;
    for (int i = 0; i < IW_DEPTH; i++) if (ent[i].valid) empty = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < IW_DEPTH; i++) ent[i] <= '0;
    end else begin
      for (int i = 0; i < IW_DEPTH; i++) begin
        if (wb_en && wb_has_dest && ent[i].valid) begin
          if (ent[i].src1 == wb_dest) ent[i].v1 <= 1'b1;
          if (ent[i].src2 == wb_dest) ent[i].v2 <= 1'b1;
        end
        if (ent[i].valid)
          ent[i].age <= ent[i].age + age_t'(push)
                        - age_t'(wb_en && ent[i].age > ent[wb_idx].age);
      end
      if (issue_en) ent[issue_idx].issued <= 1'b1;
      if (wb_en)    ent[wb_idx].valid     <= 1'b0;
      if (push) begin
        ent[slot]     <= push_entry;
        ent[slot].age <= '0;
      end
    end
  end

  a_push_room: assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || wb_en));
  a_issue_ok:  assert property (@(posedge clk) disable iff (!rst_n)
                                issue_en |-> ent[issue_idx].valid && !ent[issue_idx].issued);
  a_wb_ok:     assert property (@(posedge clk) disable iff (!rst_n)
                                wb_en |-> ent[wb_idx].valid && ent[wb_idx].issued);
endmodule
