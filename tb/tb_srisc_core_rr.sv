// tb_srisc_core_rr: end-to-end test of the core with round-robin issue.
//
// Each run builds a program, executes it on the core with a program memory
// (combinational read) and a data memory (synchronous, load data one cycle
// after the read strobe), and executes the same program on an instruction
// set reference model written here. After HALT has drained the window, every
// architectural register (read through the register map and the physical
// register set) and every data memory word are compared with the model.
// Run 0 is a directed program: a chain of dependent FMULs holds back a long
// run of dependent adds so that the window and the physical registers fill.
// The other runs are random programs with a counted loop (BNE taken and not
// taken), a JAL, loads, stores and FP operations. Every cycle the ages of
// the window entries must rank them (distinct, below the number of entries).
// The test counts how often each mechanism of the microarchitecture occurred
// and fails if any never did.
// This copy builds the core with round-robin issue (ISSUE_RR = 1) and also
// counts the cycles in which it issues a younger instruction while an older
// one is ready.
`timescale 1ns/1ps
module tb_srisc_core_rr;
  import srisc_pkg::*;
  import srisc_tb_pkg::*;

  localparam int NRUNS = 40;
  localparam int MEMW  = 256;

  logic  clk = 1'b0;
  logic  rst_n;
  word_t imem_addr, imem_data, dmem_addr, dmem_wdata, dmem_rdata;
  logic  dmem_we, dmem_re, halted;

  word_t imem [MEMW];
  word_t dmem [MEMW];
  word_t dmem0 [MEMW];

  srisc_core #(.ISSUE_RR(1'b1)) dut (.*);

  always #5 clk = ~clk;

  assign imem_data = imem[imem_addr[7:0]];
  always_ff @(posedge clk) begin
    if (dmem_re) dmem_rdata <= dmem[dmem_addr[7:0]];
    if (dmem_we) dmem[dmem_addr[7:0]] <= dmem_wdata;
  end

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  // ---------------- mechanism counters ----------------
  typedef enum int { M_REMAP, M_REUSE, M_STALL_IW, M_STALL_REG, M_IW_FULL_EXIT,
                     M_OOO_ISSUE, M_WB_CONFLICT, M_OOO_WB, M_REN_BYPASS,
                     M_REDIRECT, M_LOAD, M_STORE, M_EXF, M_MEM_ORDER, M_RR_PASS, M_NUM } mech_e;
  int mech [M_NUM];
  int age_errors = 0;
  string mname [M_NUM] = '{"remap_new_register", "reuse_current_mapping", "stall_window_full",
                           "stall_no_free_register", "push_into_freed_entry", "out_of_order_issue",
                           "writeback_conflict_stall", "out_of_order_writeback",
                           "rename_valid_bypass", "branch_redirect", "load", "store", "fp_issue",
                           "memory_order_hold",
                           "round_robin_passes_older"};

  always @(posedge clk) if (rst_n) begin
    if (dut.map_wr)                                   mech[M_REMAP]++;
    if (dut.alloc_en && !dut.alloc_remap)             mech[M_REUSE]++;
    if (dut.stall_iw)                                 mech[M_STALL_IW]++;
    if (dut.stall_reg)                                mech[M_STALL_REG]++;
    if (dut.iw_push && dut.iw_full)                   mech[M_IW_FULL_EXIT]++;
    if (dut.ooo_issue)                                mech[M_OOO_ISSUE]++;
    if (dut.wb_conflict)                              mech[M_WB_CONFLICT]++;
    if ((dut.inc1 && !dut.reg_valid[dut.p_rs1] && dut.ren_v1) ||
        (dut.inc2 && !dut.reg_valid[dut.p_rs2] && dut.ren_v2)) mech[M_REN_BYPASS]++;
    if (dut.redirect_en)                              mech[M_REDIRECT]++;
    if (dmem_re)                                      mech[M_LOAD]++;
    if (dmem_we)                                      mech[M_STORE]++;
    if (dut.disp_valid[U_EXF])                        mech[M_EXF]++;
    if (dut.u_read.mem_hold)                          mech[M_MEM_ORDER]++;
    if (dut.issue_en)
      for (int i = 0; i < IW_DEPTH; i++)
        if (dut.u_read.ready[i] && older(dut.ent[i].age, dut.ent[dut.issue_idx].age)) begin
          mech[M_RR_PASS]++;
          break;
        end
    // window ages must rank the valid entries: distinct and below their count
    begin
      int nv;
      logic [IW_DEPTH-1:0] seen;
      nv = 0;
      seen = '0;
      for (int i = 0; i < IW_DEPTH; i++) if (dut.ent[i].valid) nv++;
      for (int i = 0; i < IW_DEPTH; i++)
        if (dut.ent[i].valid) begin
          if (int'(dut.ent[i].age) >= nv || seen[dut.ent[i].age]) age_errors++;
          seen[dut.ent[i].age] = 1'b1;
        end
    end
    if (dut.wb_en) begin
      for (int i = 0; i < IW_DEPTH; i++)
        if (dut.ent[i].valid && iwidx_t'(i) != dut.wb_idx &&
            older(dut.ent[i].age, dut.ent[dut.wb_idx].age)) begin
          mech[M_OOO_WB]++;
          break;
        end
    end
  end

  // ---------------- reference model ----------------
  word_t rr [NARCH];
  word_t rm [MEMW];

  task automatic ref_run(output int executed);
    int pc = 0;
    executed = 0;
    for (int i = 0; i < NARCH; i++) rr[i] = '0;
    for (int i = 0; i < MEMW; i++) rm[i] = dmem0[i];
    while (executed < 100000) begin
      word_t w   = imem[pc[7:0]];
      op_e   op  = op_e'(w[31:26]);
      int    rd  = int'(w[25:22]);
      word_t a   = rr[w[21:18]];
      word_t b   = rr[w[17:14]];
      word_t imm = word_t'($signed(w[13:0]));
      int    npc = pc + 1;
      executed++;
      case (op)
        OP_ADD:  rr[rd] = a + b;
        OP_SUB:  rr[rd] = a - b;
        OP_AND:  rr[rd] = a & b;
        OP_OR:   rr[rd] = a | b;
        OP_XOR:  rr[rd] = a ^ b;
        OP_SLT:  rr[rd] = ($signed(a) < $signed(b)) ? 1 : 0;
        OP_SLL:  rr[rd] = a << b[4:0];
        OP_SRL:  rr[rd] = a >> b[4:0];
        OP_ADDI: rr[rd] = a + imm;
        OP_BEQ:  if (a == b) npc = pc + int'(imm);
        OP_BNE:  if (a != b) npc = pc + int'(imm);
        OP_JAL:  begin rr[rd] = pc + 1; npc = pc + int'(imm); end
        OP_LW:   rr[rd] = rm[8'(a + imm)];
        OP_SW:   rm[8'(a + imm)] = b;
        OP_FADD: rr[rd] = real_to_f32(f32_to_real(a) + f32_to_real(b));
        OP_FSUB: rr[rd] = real_to_f32(f32_to_real(a) - f32_to_real(b));
        OP_FMUL: rr[rd] = real_to_f32(f32_to_real(a) * f32_to_real(b));
        OP_HALT: return;
        default: ;
      endcase
      pc = npc;
    end
  endtask

  // ---------------- program generation ----------------
  // Registers: r0 stays zero, r1..r10 integer, r11 loop counter, r12..r15 FP.
  int n;
  function automatic void put(word_t w);
    imem[n] = w;
    n++;
  endfunction

  function automatic void rand_instr();
    int k = int'($urandom_range(99));
    int d = 1 + int'($urandom_range(9));
    int s1 = int'($urandom_range(10));
    int s2 = int'($urandom_range(10));
    int f1 = 12 + int'($urandom_range(3));
    int f2 = 12 + int'($urandom_range(3));
    int fd = 12 + int'($urandom_range(3));
    if (k < 40)      put(enc(op_e'(1 + $urandom_range(7)), d, s1, s2, 0));
    else if (k < 50) put(enc(OP_ADDI, d, s1, 0, int'($urandom_range(200)) - 100));
    else if (k < 62) put(enc(OP_LW, d, s1, 0, int'($urandom_range(255))));
    else if (k < 74) put(enc(OP_SW, 0, s1, $urandom_range(15), int'($urandom_range(255))));
    else if (k < 80) put(enc(OP_SW, 0, 0, $urandom_range(15), int'($urandom_range(180))));
    else             put(enc(op_e'(OP_FADD + $urandom_range(2)), fd, f1, f2, 0));
  endfunction

  function automatic void gen_program(int run);
    int loop_start;
    n = 0;
    for (int i = 0; i < MEMW; i++) imem[i] = enc(OP_HALT, 0, 0, 0, 0);
    for (int i = 0; i < 200; i++) dmem0[i] = $urandom;
    for (int i = 200; i < MEMW; i++) dmem0[i] = rand_f32(120, 134);
    for (int f = 12; f < 16; f++) put(enc(OP_LW, f, 0, 0, 200 + f));
    if (run == 0) begin
      for (int i = 0; i < 6; i++) put(enc(OP_FMUL, 12, 12, 13, 0));
      for (int i = 0; i < 24; i++) put(enc(OP_ADD, 1 + i % 2, 12, 2 - i % 2, 0));
      put(enc(OP_FADD, 14, 14, 15, 0));
      put(enc(OP_SW, 0, 0, 1, 3));
      put(enc(OP_SW, 0, 0, 2, 4));
      // stores have no destination: they fill the window without using registers
      for (int i = 0; i < 6; i++) put(enc(OP_FMUL, 13, 13, 14, 0));
      for (int i = 0; i < 24; i++) put(enc(OP_SW, 0, 0, 13, 10 + i));
      // a load behind a store to the same word whose data is still being computed
      put(enc(OP_FMUL, 14, 14, 15, 0));
      put(enc(OP_SW, 0, 0, 14, 50));
      put(enc(OP_LW, 3, 0, 0, 50));
      put(enc(OP_SW, 0, 0, 3, 51));
    end else begin
      put(enc(OP_ADDI, 11, 0, 0, 3));
      loop_start = n;
      for (int i = 0; i < 40; i++) rand_instr();
      put(enc(OP_ADDI, 11, 11, 0, -1));
      put(enc(OP_BNE, 0, 11, 0, loop_start - n));
      put(enc(OP_JAL, 10, 0, 0, 2));
      put(enc(OP_ADDI, 10, 10, 0, 99));       // skipped by the JAL
      put(enc(OP_BEQ, 0, 0, 0, 2));           // always taken
      put(enc(OP_ADDI, 9, 9, 0, 77));         // skipped
      put(enc(OP_SW, 0, 0, 10, 5));
    end
    put(enc(OP_HALT, 0, 0, 0, 0));
  endfunction

  initial begin
    int executed, t0;
    rst_n = 1'b0;
    for (int run = 0; run < NRUNS; run++) begin
      gen_program(run);
      for (int i = 0; i < MEMW; i++) dmem[i] = dmem0[i];
      ref_run(executed);
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      t0 = cycles;
      while (!halted && cycles - t0 < 20000) @(posedge clk);
      checks++;
      if (!halted) begin
        failures++;
        $display("run %0d: core did not halt", run);
      end
      @(negedge clk);
      for (int r = 0; r < NARCH; r++) begin
        word_t got;
        got = dut.u_prf.value[dut.u_map.map[r]];
        checks++;
        if (got !== rr[r]) begin
          failures++;
          $display("run %0d: r%0d = %h, expected %h", run, r, got, rr[r]);
        end
      end
      for (int i = 0; i < MEMW; i++) begin
        checks++;
        if (dmem[i] !== rm[i]) begin
          failures++;
          $display("run %0d: mem[%0d] = %h, expected %h", run, i, dmem[i], rm[i]);
        end
      end
      if (run < 3) $display("run %0d: %0d instructions in %0d cycles", run, executed, cycles - t0);
    end
    checks++;
    if (age_errors != 0) begin
      failures++;
      $display("window ages not a ranking in %0d cycles", age_errors);
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-26s %0d", mname[m], mech[m]);
      checks++;
      if (mech[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
