// srisc_core: Simple RISC out-of-order processor core (top level).
//
// Pipeline: FETCH (PC, IR) -> DECODE&RENAME -> instruction window -> READ
// (issue, operand read, dispatch) -> EXI | EXLS | EXF -> WRITE BACK.
// Architectural registers are renamed onto physical registers through the
// register map and the free register allocator; each physical register
// carries a valid bit and a count of instructions still to read it, so a
// register is reused only once every reader has read it. Instructions issue
// out of order, oldest ready first (or round robin over window slots when
// ISSUE_RR = 1), and complete out of order, one per cycle,
// oldest finished unit first; a unit that loses write back holds and blocks
// issue to itself only. "Oldest" is the age kept in each window entry: the
// number of younger entries in the window. Loads and stores issue in program
// order among themselves. Control instructions stop fetch until they resolve
// in write back (no prediction). HALT stops fetch; halted rises once every
// instruction has left the window.
// Interfaces: program memory read combinationally at imem_addr; data memory
// with address, store data and strobes from EXLS, load data expected on
// dmem_rdata one cycle after dmem_re. Synchronous active-low reset.
// The stage structure, register fields and scheduling rules follow the
// description; the instruction set, the sizes in srisc_pkg, the age
// encoding, the memory ordering and timing and the branch handling are this
// design's choices.
module srisc_core
  import srisc_pkg::*;
#(
  parameter bit ISSUE_RR = 1'b0   // issue choice: 0 oldest ready first, 1 round robin
) (
  input  logic  clk,
  input  logic  rst_n,
  output word_t imem_addr,
  input  word_t imem_data,
  output word_t dmem_addr,
  output word_t dmem_wdata,
  output logic  dmem_we,
  output logic  dmem_re,
  input  word_t dmem_rdata,
  output logic  halted
);
  // fetch / decode
  logic  ir_valid, dec_accept, dec_ctrl, dec_halt;
  word_t ir, ir_pc;
  // register map / allocation
  areg_t rs1, rs2, rd;
  preg_t p_rs1, p_rs2, p_rd, alloc_preg;
  logic  map_wr, alloc_found, alloc_remap;
  logic [NPHYS-1:0] mapped, alloc_exclude, reg_valid, cnt_zero;
  // register set
  logic  ren_v1, ren_v2, inc1, inc2, alloc_en;
  preg_t rd_src1, rd_src2;
  word_t rd_val1, rd_val2;
  logic  rd_dec1, rd_dec2;
  // window / read
  logic      iw_push, iw_full, iw_empty, issue_en, stall_iw, stall_reg, ooo_issue;
  iw_entry_t iw_entry;
  iw_entry_t ent [IW_DEPTH];
  iwidx_t    issue_idx;
  logic      unit_ready [3];
  logic      disp_valid [3];
  ex_pkt_t   disp_pkt;
  // execution / write back
  logic    done_valid [3];
  wb_pkt_t done_pkt   [3];
  age_t    done_age   [3];
  logic    grant      [3];
  logic    wb_en, wb_reg_en, redirect_en, wb_conflict;
  preg_t   wb_dest;
  word_t   wb_data, redirect_pc;
  iwidx_t  wb_idx;
  logic    halt_seen;

  srisc_fetch u_fetch (
    .clk, .rst_n, .imem_addr, .imem_data,
    .ir_valid, .ir, .ir_pc,
    .dec_accept, .dec_ctrl, .dec_halt,
    .redirect_en, .redirect_pc
  );

  srisc_decode_rename u_dec (
    .ir_valid, .ir, .ir_pc,
    .accept(dec_accept), .is_ctrl(dec_ctrl), .is_halt(dec_halt),
    .rs1, .rs2, .rd, .p_rs1, .p_rs2, .map_wr,
    .alloc_exclude, .alloc_found, .alloc_preg, .alloc_remap,
    .v1_in(ren_v1), .v2_in(ren_v2), .inc1, .inc2, .alloc_en,
    .iw_full, .iw_exit(wb_en), .iw_push, .iw_entry,
    .stall_iw, .stall_reg
  );

  srisc_regmap u_map (
    .clk, .rst_n, .rs1, .rs2, .rd, .p_rs1, .p_rs2, .p_rd,
    .wr_en(map_wr), .wr_areg(rd), .wr_preg(alloc_preg), .mapped
  );

  srisc_free_alloc u_alloc (
    .reg_valid, .cnt_zero, .mapped, .cur(p_rd), .exclude(alloc_exclude),
    .found(alloc_found), .preg(alloc_preg), .remap(alloc_remap)
  );

  srisc_prf u_prf (
    .clk, .rst_n,
    .ren_src1(p_rs1), .ren_src2(p_rs2), .ren_v1, .ren_v2,
    .ren_inc1(inc1), .ren_inc2(inc2), .ren_alloc(alloc_en), .ren_dest(alloc_preg),
    .rd_src1, .rd_src2, .rd_val1, .rd_val2, .rd_dec1, .rd_dec2,
    .wb_en(wb_reg_en), .wb_dest, .wb_data,
    .valid(reg_valid), .cnt_zero
  );

  srisc_iw u_iw (
    .clk, .rst_n, .push(iw_push), .push_entry(iw_entry),
    .issue_en, .issue_idx,
    .wb_en, .wb_idx, .wb_has_dest(wb_reg_en), .wb_dest,
    .ent, .full(iw_full), .empty(iw_empty)
  );

  srisc_read #(.ISSUE_RR(ISSUE_RR)) u_read (
    .clk, .rst_n, .ent, .unit_ready, .issue_en, .issue_idx,
    .rd_src1, .rd_src2, .rd_val1, .rd_val2, .rd_dec1, .rd_dec2,
    .disp_valid, .disp_pkt, .ooo_issue
  );

  srisc_exi u_exi (
    .clk, .rst_n, .in_valid(disp_valid[U_EXI]), .in_pkt(disp_pkt),
    .ready(unit_ready[U_EXI]), .done_valid(done_valid[U_EXI]),
    .done_pkt(done_pkt[U_EXI]), .grant(grant[U_EXI])
  );

  srisc_exls u_exls (
    .clk, .rst_n, .in_valid(disp_valid[U_EXLS]), .in_pkt(disp_pkt),
    .ready(unit_ready[U_EXLS]), .done_valid(done_valid[U_EXLS]),
    .done_pkt(done_pkt[U_EXLS]), .grant(grant[U_EXLS]),
    .dmem_addr, .dmem_wdata, .dmem_we, .dmem_re
  );

  srisc_exf u_exf (
    .clk, .rst_n, .in_valid(disp_valid[U_EXF]), .in_pkt(disp_pkt),
    .ready(unit_ready[U_EXF]), .done_valid(done_valid[U_EXF]),
    .done_pkt(done_pkt[U_EXF]), .grant(grant[U_EXF])
  );

  // current window age of each finished instruction, for write-back arbitration
  always_comb
    for (int u = 0; u < 3; u++) done_age[u] = ent[done_pkt[u].iw_idx].age;

  srisc_wb u_wb (
    .clk, .rst_n, .done_valid, .done_pkt, .done_age, .grant, .dmem_rdata,
    .wb_en, .wb_reg_en, .wb_dest, .wb_data, .wb_idx,
    .redirect_en, .redirect_pc, .conflict(wb_conflict)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                     halt_seen <= 1'b0;
    else if (dec_accept && dec_halt) halt_seen <= 1'b1;
  end
  assign halted = halt_seen && iw_empty;
endmodule
