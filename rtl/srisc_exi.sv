// srisc_exi: integer execution unit EXI (arithmetic, logic and control).
//
// The dispatched packet is held in the unit's input pipeline register; the
// result is computed combinationally from it and offered to write back in
// the same cycle (one cycle through the unit). If write back gives the slot
// to an older result (grant low), the packet stays in the register and the
// unit reports not ready, which blocks issue to this unit only.
// Control instructions compute their next PC here: BEQ/BNE branch to pc+imm
// when taken and continue at pc+1 otherwise, JAL jumps to pc+imm and writes
// pc+1 as its result. The operation list is this design's own instruction
// set; the unit's role follows the description.
module srisc_exi
  import srisc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ex_pkt_t in_pkt,
  output logic    ready,
  output logic    done_valid,
  output wb_pkt_t done_pkt,
  input  logic    grant
);
  logic    v;
  ex_pkt_t q;
  word_t   simm, res, target;
  logic    taken;

  always_ff @(posedge clk) begin
    if (!rst_n)     v <= 1'b0;
    else if (ready) v <= in_valid;
    if (ready && in_valid) q <= in_pkt;
  end

  assign ready      = !v || grant;
  assign done_valid = v;

  always_comb begin
    simm   = word_t'(q.imm);          // sign extended
    target = q.pc + simm;
    taken  = 1'b0;
    case (q.op)
      OP_ADD:  res = q.a + q.b;
      OP_SUB:  res = q.a - q.b;
      OP_AND:  res = q.a & q.b;
      OP_OR:   res = q.a | q.b;
      OP_XOR:  res = q.a ^ q.b;
      OP_SLT:  res = word_t'($signed(q.a) < $signed(q.b));
      OP_SLL:  res = q.a << q.b[4:0];
      OP_SRL:  res = q.a >> q.b[4:0];
      OP_ADDI: res = q.a + simm;
      OP_JAL:  begin res = q.pc + 1; taken = 1'b1; end
      OP_BEQ:  begin res = '0; taken = (q.a == q.b); end
      OP_BNE:  begin res = '0; taken = (q.a != q.b); end
      default: res = '0;
    endcase
    done_pkt.has_dest = q.has_dest;
    done_pkt.dest     = q.dest;
    done_pkt.iw_idx   = q.iw_idx;
    done_pkt.result   = res;
    done_pkt.is_load  = 1'b0;
    done_pkt.redirect = op_is_ctrl(q.op);
    done_pkt.next_pc  = taken ? target : q.pc + 1;
  end
endmodule
