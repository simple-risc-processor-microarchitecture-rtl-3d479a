// srisc_wb: WRITE BACK stage with its input pipeline register.
//
// Each cycle the finished execution units (EXI, EXLS, EXF) offer a result.
// Only the oldest of them enters the write-back register at the
// clock edge (grant); the others stay stalled in their units. Ages are the
// current ages of the instructions' window entries (done_age). In the next
// cycle the stage writes the result into its destination register and sets
// the register's valid bit (6), broadcasts the destination to the window,
// and frees the instruction's window entry. For a load the result is the
// data memory output (data in) of that cycle. A control instruction sends
// its next PC to fetch in the same cycle.
// Oldest-first arbitration and one write back per cycle follow the
// description.
module srisc_wb
  import srisc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    done_valid [3],   // indexed by unit_e
  input  wb_pkt_t done_pkt   [3],
  input  age_t    done_age   [3],   // window age of each offered instruction
  output logic    grant      [3],
  input  word_t   dmem_rdata,
  // write back outputs (valid during the write-back cycle, act at its end)
  output logic    wb_en,            // an instruction completes
  output logic    wb_reg_en,        // ... and writes a register
  output preg_t   wb_dest,
  output word_t   wb_data,
  output iwidx_t  wb_idx,
  output logic    redirect_en,
  output word_t   redirect_pc,
  output logic    conflict          // more than one unit finished this cycle
);
  logic    v;
  wb_pkt_t q;
  int      win;

  always_comb begin
    win = -1;
    for (int u = 0; u < 3; u++)
      if (done_valid[u] && (win < 0 || older(done_age[u], done_age[win])))
        win = u;
    for (int u = 0; u < 3; u++) grant[u] = (win == u);
    conflict = (int'(done_valid[0]) + int'(done_valid[1]) + int'(done_valid[2])) > 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v <= 1'b0;
    else        v <= (win >= 0);
    if (win >= 0) q <= done_pkt[win];
  end

  assign wb_en       = v;
  assign wb_reg_en   = v && q.has_dest;
  assign wb_dest     = q.dest;
  assign wb_data     = q.is_load ? dmem_rdata : q.result;
  assign wb_idx      = q.iw_idx;
  assign redirect_en = v && q.redirect;
  assign redirect_pc = q.next_pc;
endmodule
