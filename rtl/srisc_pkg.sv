// srisc_pkg: sizes, instruction set and pipeline packet types shared by the
// Simple RISC out-of-order core.
//
// The core renames architectural registers onto a larger physical register
// set and schedules instructions dynamically from a central instruction
// window (op, dest, src1, src2, age, v1, v2 per entry). The list of fields and
// the three execution unit classes (integer/control, load/store, floating
// point) follow the microarchitecture description; the register counts, the
// window depth and the whole instruction encoding below are this design's
// own choices, since no instruction set is defined there.
//
// Instruction word (32 bits):
//   [31:26] opcode   [25:22] rd   [21:18] rs1   [17:14] rs2   [13:0] imm (signed)
// PC and data addresses count 32-bit words.
package srisc_pkg;

  localparam int XLEN       = 32;
  localparam int NARCH      = 16;  // architectural registers
  localparam int NPHYS      = 24;  // physical registers (fewer than NARCH + IW_DEPTH)
  localparam int IW_DEPTH   = 16;  // instruction window entries

  localparam int AREG_W = $clog2(NARCH);
  localparam int PREG_W = $clog2(NPHYS);
  localparam int IWI_W  = $clog2(IW_DEPTH);
  // The age of a window entry is the number of younger entries in the window,
  // so it is below IW_DEPTH.
  localparam int AGE_W  = IWI_W;
  // A register can be awaited by both sources of every window entry.
  localparam int CNT_W  = $clog2(2 * IW_DEPTH + 1);
  localparam int IMM_W  = 14;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [IWI_W-1:0]  iwidx_t;
  typedef logic [AGE_W-1:0]  age_t;
  typedef logic [CNT_W-1:0]  cnt_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,  OP_OR   = 6'd4,
    OP_XOR  = 6'd5,  OP_SLT  = 6'd6,  OP_SLL  = 6'd7,  OP_SRL  = 6'd8,
    OP_ADDI = 6'd9,
    OP_BEQ  = 6'd16, OP_BNE  = 6'd17, OP_JAL  = 6'd18,
    OP_LW   = 6'd24, OP_SW   = 6'd25,
    OP_FADD = 6'd32, OP_FSUB = 6'd33, OP_FMUL = 6'd34,
    OP_HALT = 6'd63
  } op_e;

  typedef enum logic [1:0] { U_EXI = 2'd0, U_EXLS = 2'd1, U_EXF = 2'd2 } unit_e;

  // Decoded properties of an opcode.
  function automatic unit_e op_unit(op_e op);
    case (op)
      OP_LW, OP_SW:              return U_EXLS;
      OP_FADD, OP_FSUB, OP_FMUL: return U_EXF;
      default:                   return U_EXI;
    endcase
  endfunction

  function automatic logic op_has_dest(op_e op);
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI,
      OP_JAL, OP_LW, OP_FADD, OP_FSUB, OP_FMUL: return 1'b1;
      default:                                  return 1'b0;
    endcase
  endfunction

  function automatic logic op_uses_rs1(op_e op);
    case (op)
      OP_NOP, OP_JAL, OP_HALT: return 1'b0;
      default:                 return 1'b1;
    endcase
  endfunction

  function automatic logic op_uses_rs2(op_e op);
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL,
      OP_BEQ, OP_BNE, OP_SW, OP_FADD, OP_FSUB, OP_FMUL: return 1'b1;
      default:                                          return 1'b0;
    endcase
  endfunction

  function automatic logic op_is_ctrl(op_e op);
    return op inside {OP_BEQ, OP_BNE, OP_JAL};
  endfunction

  // Entry with age a is older than entry with age b (both in the window).
  function automatic logic older(age_t a, age_t b);
    return a > b;
  endfunction

  // Instruction window entry (fields of the window plus what execution needs).
  typedef struct packed {
    logic                   valid;   // entry in use
    logic                   issued;  // left the read stage, waiting for write back
    op_e                    op;
    logic                   has_dest;
    preg_t                  dest;
    preg_t                  src1;
    preg_t                  src2;
    logic                   v1;
    logic                   v2;
    age_t                   age;
    logic signed [IMM_W-1:0] imm;
    word_t                  pc;
  } iw_entry_t;

  // Packet written into an execution unit's input pipeline register.
  typedef struct packed {
    op_e                    op;
    logic                   has_dest;
    preg_t                  dest;
    iwidx_t                 iw_idx;
    word_t                  a;
    word_t                  b;
    logic signed [IMM_W-1:0] imm;
    word_t                  pc;
  } ex_pkt_t;

  // Packet a finished execution unit offers to the write-back stage.
  typedef struct packed {
    logic   has_dest;
    preg_t  dest;
    iwidx_t iw_idx;
    word_t  result;
    logic   is_load;   // result comes from the data memory (data in)
    logic   redirect;  // control instruction: fetch continues at next_pc
    word_t  next_pc;
  } wb_pkt_t;

endpackage
