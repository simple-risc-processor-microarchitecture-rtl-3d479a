// srisc_prf: physical register set. Each register holds a value, a valid
// bit v (the value is ready) and a counter cnt (how many renamed
// instructions still have to read the value).
//
// Ports, all acting at the same clock edge:
//  * rename: up to two source reads of v (with the write-back write of this
//    cycle forwarded, so an entry whose source is written right now enters
//    the window already valid), one cnt increment per used source, and the
//    allocated destination's v cleared;
//  * read stage: two combinational value reads and one cnt decrement per
//    source the issued instruction used;
//  * write back: value written and v set.
// Both sources of one instruction may name the same register, so cnt moves
// by the sum of all increments and decrements of the cycle. After reset all
// values are zero, all registers valid and all counters zero (this design's
// choice). Register fields follow the description; widths are assumed.
module srisc_prf
  import srisc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // rename
  input  preg_t            ren_src1,
  input  preg_t            ren_src2,
  output logic             ren_v1,
  output logic             ren_v2,
  input  logic             ren_inc1,
  input  logic             ren_inc2,
  input  logic             ren_alloc,
  input  preg_t            ren_dest,
  // read stage
  input  preg_t            rd_src1,
  input  preg_t            rd_src2,
  output word_t            rd_val1,
  output word_t            rd_val2,
  input  logic             rd_dec1,
  input  logic             rd_dec2,
  // write back
  input  logic             wb_en,
  input  preg_t            wb_dest,
  input  word_t            wb_data,
  // status
  output logic [NPHYS-1:0] valid,
  output logic [NPHYS-1:0] cnt_zero
);
  word_t value [NPHYS];
  cnt_t  cnt   [NPHYS];

  assign rd_val1 = value[rd_src1];
  assign rd_val2 = value[rd_src2];
  assign ren_v1  = valid[ren_src1] || (wb_en && wb_dest == ren_src1);
  assign ren_v2  = valid[ren_src2] || (wb_en && wb_dest == ren_src2);

  always_comb
    for (int i = 0; i < NPHYS; i++) cnt_zero[i] = (cnt[i] == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPHYS; i++) begin
        value[i] <= '0;
        cnt[i]   <= '0;
      end
      valid <= '1;
    end else begin
      for (int i = 0; i < NPHYS; i++) begin
        cnt[i] <= cnt[i]
                  + cnt_t'(ren_inc1 && ren_src1 == preg_t'(i))
                  + cnt_t'(ren_inc2 && ren_src2 == preg_t'(i))
                  - cnt_t'(rd_dec1  && rd_src1  == preg_t'(i))
                  - cnt_t'(rd_dec2  && rd_src2  == preg_t'(i));
      end
      if (ren_alloc) valid[ren_dest] <= 1'b0;
      if (wb_en) begin
        value[wb_dest] <= wb_data;
        valid[wb_dest] <= 1'b1;
      end
    end
  end

  // A destination is only allocated when valid, and only pending registers are written.
  a_alloc_valid: assert property (@(posedge clk) disable iff (!rst_n) ren_alloc |-> valid[ren_dest]);
  a_wb_pending:  assert property (@(posedge clk) disable iff (!rst_n) wb_en |-> !valid[wb_dest]);
endmodule
