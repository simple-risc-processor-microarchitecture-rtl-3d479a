// srisc_exls: load/store execution unit EXLS.
//
// The dispatched packet is held in the unit's input pipeline register. The
// unit drives the memory address addr = src1 + imm (word address) and, for a
// store, the data to write (data out = src2). The memory is accessed in the
// cycle the packet is granted the write-back slot: a store is written at
// that clock edge (dmem_we), and a load's read strobe (dmem_re) makes the
// memory deliver the word one cycle later, in the write-back stage, as the
// description puts load data there (data in). While not granted the packet
// waits and the unit is not ready. The one-cycle synchronous memory timing
// is this design's choice.
module srisc_exls
  import srisc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ex_pkt_t in_pkt,
  output logic    ready,
  output logic    done_valid,
  output wb_pkt_t done_pkt,
  input  logic    grant,
  output word_t   dmem_addr,
  output word_t   dmem_wdata,
  output logic    dmem_we,
  output logic    dmem_re
);
  logic    v;
  ex_pkt_t q;

  always_ff @(posedge clk) begin
    if (!rst_n)     v <= 1'b0;
    else if (ready) v <= in_valid;
    if (ready && in_valid) q <= in_pkt;
  end

  assign ready      = !v || grant;
  assign done_valid = v;
  assign dmem_addr  = q.a + word_t'(q.imm);
  assign dmem_wdata = q.b;
  assign dmem_we    = v && grant && q.op == OP_SW;
  assign dmem_re    = v && grant && q.op == OP_LW;

  always_comb begin
    done_pkt          = '0;
    done_pkt.has_dest = q.has_dest;
    done_pkt.dest     = q.dest;
    done_pkt.iw_idx   = q.iw_idx;
    done_pkt.is_load  = (q.op == OP_LW);
  end
endmodule
