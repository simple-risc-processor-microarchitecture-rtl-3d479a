// tb_srisc_iw: random pushes, issues and write backs on the instruction
// window, checked entry by entry against a reference: placement in the
// lowest free entry (or in the entry freed in the same cycle when full),
// the issued mark, the release at write back, the ages (number of younger
// entries still in the window), the broadcast that sets the
// source valid bits of every entry waiting on the written register, and the
// full and empty flags.
`timescale 1ns/1ps
module tb_srisc_iw;
  import srisc_pkg::*;

  logic      clk = 1'b0, rst_n;
  logic      push, issue_en, wb_en, wb_has_dest, full, empty;
  iw_entry_t push_entry;
  iwidx_t    issue_idx, wb_idx;
  preg_t     wb_dest;
  iw_entry_t ent [IW_DEPTH];

  srisc_iw dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  iw_entry_t r [IW_DEPTH];

  function automatic int pick(logic want_issued);
    int c[$];
    for (int i = 0; i < IW_DEPTH; i++) if (r[i].valid && r[i].issued == want_issued) c.push_back(i);
    if (c.size() == 0) return -1;
    return c[$urandom_range(c.size() - 1)];
  endfunction

  initial begin
    int ii, wi, slot, nvalid, ok;
    age_t wage;
    int fulls = 0;
    rst_n = 0; push = 0; issue_en = 0; wb_en = 0; wb_has_dest = 0;
    push_entry = '0; issue_idx = 0; wb_idx = 0; wb_dest = 0;
    for (int i = 0; i < IW_DEPTH; i++) r[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      nvalid = 0;
      for (int i = 0; i < IW_DEPTH; i++) nvalid += int'(r[i].valid);
      ii = pick(0);
      wi = pick(1);
      issue_en = (ii >= 0) && ($urandom_range(2) != 0);
      issue_idx = iwidx_t'(ii < 0 ? 0 : ii);
      // phases: fill the window for a while, then drain it
      wb_en = (wi >= 0) && ($urandom_range(((c / 500) % 2 == 0) ? 4 : 1) == 0);
      wb_idx = iwidx_t'(wi < 0 ? 0 : wi);
      wb_has_dest = wb_en && 1'($urandom);
      wb_dest = preg_t'($urandom_range(7));
      push_entry = '{valid: 1'b1, issued: 1'b0, op: OP_ADD, has_dest: 1'($urandom),
                     dest: preg_t'($urandom_range(NPHYS - 1)), src1: preg_t'($urandom_range(7)),
                     src2: preg_t'($urandom_range(7)), v1: 1'($urandom), v2: 1'($urandom),
                     age: age_t'($urandom), imm: 14'($urandom), pc: $urandom};
      push = (nvalid < IW_DEPTH || wb_en) && ($urandom_range(((c / 500) % 2 == 0) ? 1 : 4) == 0);
      #1;
      checks++;
      if (full != (nvalid == IW_DEPTH) || empty != (nvalid == 0)) begin
        failures++;
        $display("FAIL flags cycle %0d", c);
      end
      if (full) fulls++;
      @(posedge clk);
      slot = -1;
      for (int i = IW_DEPTH - 1; i >= 0; i--) if (!r[i].valid) slot = i;
      if (slot < 0) slot = wi;
      for (int i = 0; i < IW_DEPTH; i++)
        if (wb_has_dest && r[i].valid) begin
          if (r[i].src1 == wb_dest) r[i].v1 = 1;
          if (r[i].src2 == wb_dest) r[i].v2 = 1;
        end
      wage = (wi >= 0) ? r[wi].age : 0;
      for (int i = 0; i < IW_DEPTH; i++)
        if (r[i].valid)
          r[i].age = r[i].age + age_t'(push) - age_t'(wb_en && r[i].age > wage);
      if (issue_en) r[ii].issued = 1;
      if (wb_en) r[wi].valid = 0;
      if (push) begin r[slot] = push_entry; r[slot].age = 0; end
      #1;
      ok = 1;
      for (int i = 0; i < IW_DEPTH; i++)
        if (ent[i].valid != r[i].valid || (r[i].valid && ent[i] != r[i])) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL entries cycle %0d push %0d wb %0d wi %0d slot %0d", c, push, wb_en, wi, slot);
        for (int i = 0; i < IW_DEPTH; i++) if (ent[i] != r[i]) $display("  %0d: age %0d/%0d v %0d/%0d", i, ent[i].age, r[i].age, ent[i].valid, r[i].valid);
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL window never full"); end
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
