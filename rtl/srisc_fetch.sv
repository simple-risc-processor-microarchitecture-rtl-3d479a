// srisc_fetch: FETCH stage with program counter and instruction register (IR).
//
// Each cycle the PC addresses the program memory (combinational read, the
// word arrives in the same cycle) and the word is loaded into the IR while
// the PC advances by one word. The stage holds when the IR is full and
// decode does not take it. When decode accepts a control instruction the
// stage stops fetching and drops the IR contents: it waits for the branch to
// reach write back, which sends the next PC on redirect_en. A HALT accepted
// by decode stops fetching for good.
// Following the description: the stage keeps and updates the PC and its
// output acts as the IR. Word addressing, reset PC 0, and waiting for
// control instructions instead of predicting them are this design's choices.
module srisc_fetch
  import srisc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output word_t imem_addr,
  input  word_t imem_data,
  // IR towards decode&rename
  output logic  ir_valid,
  output word_t ir,
  output word_t ir_pc,
  input  logic  dec_accept,   // decode takes the IR this cycle
  input  logic  dec_ctrl,     // ... and it is a control instruction
  input  logic  dec_halt,     // ... and it is HALT
  // from write back
  input  logic  redirect_en,
  input  word_t redirect_pc
);
  word_t pc;
  logic  waiting, halted;

  assign imem_addr = pc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc       <= '0;
      ir       <= '0;
      ir_pc    <= '0;
      ir_valid <= 1'b0;
      waiting  <= 1'b0;
      halted   <= 1'b0;
    end else if (redirect_en) begin
      pc       <= redirect_pc;
      ir_valid <= 1'b0;
      waiting  <= 1'b0;
    end else if (dec_accept && (dec_ctrl || dec_halt)) begin
      ir_valid <= 1'b0;
      waiting  <= dec_ctrl;
      halted   <= dec_halt;
    end else if (!waiting && !halted && (!ir_valid || dec_accept)) begin
      ir       <= imem_data;
      ir_pc    <= pc;
      ir_valid <= 1'b1;
      pc       <= pc + 1;
    end else if (dec_accept) begin
      ir_valid <= 1'b0;
    end
  end

  // The IR only moves on when decode accepts it.
  a_accept_valid: assert property (@(posedge clk) disable iff (!rst_n) dec_accept |-> ir_valid);
endmodule
