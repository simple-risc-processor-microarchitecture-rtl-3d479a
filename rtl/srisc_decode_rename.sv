// srisc_decode_rename: DECODE&RENAME stage.
//
// Decodes the IR, looks the architectural sources and destination up in the
// register map (1), and builds the renamed window entry (2): source physical
// registers with their valid bits as read from the register set (the
// register set forwards a write-back of the same cycle) and the destination
// chosen by the free register allocator (3); the window gives the entry its
// age. Unused sources enter the window already valid and are not counted as
// readers. Which sources and destination an opcode uses comes from the
// package's own instruction set.
// The instruction stalls here, and fetch with it, when the window is full and
// no instruction leaves it this cycle, or when it needs a destination and no
// physical register is free. HALT never enters the window; it only stops fetch.
// Purely combinational; everything it decides takes effect at the next clock
// edge in the blocks it drives.
module srisc_decode_rename
  import srisc_pkg::*;
(
  input  logic             ir_valid,
  input  word_t            ir,
  input  word_t            ir_pc,
  output logic             accept,
  output logic             is_ctrl,
  output logic             is_halt,
  // register map
  output areg_t            rs1,
  output areg_t            rs2,
  output areg_t            rd,
  input  preg_t            p_rs1,
  input  preg_t            p_rs2,
  output logic             map_wr,
  // free register allocate
  output logic [NPHYS-1:0] alloc_exclude,
  input  logic             alloc_found,
  input  preg_t            alloc_preg,
  input  logic             alloc_remap,
  // register set
  input  logic             v1_in,
  input  logic             v2_in,
  output logic             inc1,
  output logic             inc2,
  output logic             alloc_en,
  // instruction window
  input  logic             iw_full,
  input  logic             iw_exit,     // an entry is freed by write back this cycle
  output logic             iw_push,
  output iw_entry_t        iw_entry,
  // stall causes, for observation
  output logic             stall_iw,
  output logic             stall_reg
);
  op_e   op;
  logic  use1, use2, dst;

  always_comb begin
    op   = op_e'(ir[31:26]);
    rd   = ir[25:22];
    rs1  = ir[21:18];
    rs2  = ir[17:14];
    use1 = op_uses_rs1(op);
    use2 = op_uses_rs2(op);
    dst  = op_has_dest(op);
    is_ctrl = op_is_ctrl(op);
    is_halt = (op == OP_HALT);
  end

  // Registers the instruction reads may not become its destination.
  always_comb begin
    alloc_exclude = '0;
    if (use1) alloc_exclude[p_rs1] = 1'b1;
    if (use2) alloc_exclude[p_rs2] = 1'b1;
  end

  always_comb begin
    stall_iw  = ir_valid && !is_halt && iw_full && !iw_exit;
    stall_reg = ir_valid && !is_halt && dst && !alloc_found;
    accept    = ir_valid && !stall_iw && !stall_reg;
    iw_push   = accept && !is_halt;

    inc1     = iw_push && use1;
    inc2     = iw_push && use2;
    alloc_en = iw_push && dst;
    map_wr   = alloc_en && alloc_remap;
  end

  always_comb begin

    iw_entry          = '0;
    iw_entry.valid    = 1'b1;
    iw_entry.issued   = 1'b0;
    iw_entry.op       = op;
    iw_entry.has_dest = dst;
    iw_entry.dest     = dst ? alloc_preg : '0;
    iw_entry.src1     = p_rs1;
    iw_entry.src2     = p_rs2;
    iw_entry.v1       = !use1 || v1_in;
    iw_entry.v2       = !use2 || v2_in;
    iw_entry.age      = '0;
    iw_entry.imm      = ir[IMM_W-1:0];
    iw_entry.pc       = ir_pc;
  end
endmodule
