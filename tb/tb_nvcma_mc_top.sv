// tb_nvcma_mc_top: end-to-end run of the whole chip at its default sizes.
//
// The host loads input data, two different random array configurations
// (contexts 0 and 1) and a microcontroller program. The program runs
// context 0 on the data, stores every NVFF with the two-step store (verify,
// short store, verify, long store), repeats the store on unchanged domains
// (which the first verify skips), runs context 0 again with the three other
// contexts powered off, stores the data memory, sleeps with everything but
// the instruction memory powered off (one pause runs out, one is ended by
// ext_wake), powers the data memory and context 1 back on, restores them
// from the MTJs and runs context 1. A second program phase selects context 0
// and powers the data memory off by instruction while the outside
// controller overrides both. Every result is compared with a reference
// model of the array; data written after the last store must be lost
// across the sleep. Each mechanism is counted and must occur at least once.
module tb_nvcma_mc_top;
  import nvcma_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ext_wake = 0;
  logic ext_ctx_sel = 0, ext_pg_sel = 0;
  logic [1:0] ext_ctx = 0;
  logic [NPD-1:0] ext_pd = 0;
  logic h_we = 0;
  logic [1:0] h_sel = 0, h_ctx = 0;
  logic [DADDR_W-1:0] h_addr = 0;
  logic [IW-1:0] h_wdata = 0;
  logic [DW-1:0] h_rdata;
  logic done, running, paused, array_en;
  logic [1:0] active_ctx;
  logic [NPD-1:0] pd_on;
  logic [NSD-1:0] bitmap, flags, sd_cmp;
  nvff_ctrl_t nv_ctrl [NSD];
  logic [DW-1:0] gather_q [COLS];
  longint unsigned store_bit_cycles, verify_bits;

  nvcma_mc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ images
  logic [DW-1:0] din [COLS];
  logic [DW-1:0] cimg [2][CTX_WORDS];
  logic [IW-1:0] prog [IMEM_DEPTH];
  int pc = 0;

  task automatic emit(logic [IW-1:0] i);
    prog[pc] = i;
    pc++;
  endtask

  function automatic logic [NSD-1:0] doms(int lo, int n);
    logic [NSD-1:0] m = 0;
    for (int i = lo; i < lo + n; i++) m[i] = 1'b1;
    return m;
  endfunction

  task automatic nvc(bit set, logic [NCTRL-1:0] m);
    emit(mk_i(OP_NVC, 0, 0, {3'b000, set, 6'b0, m}));
  endtask

  task automatic verify_seq();
    nvc(1, M_SR3); nvc(0, M_RB_N); nvc(1, M_RB_N); nvc(0, M_SR3);
  endtask

  // Two-step store of the domains in bm; returns nothing, branches forward.
  task automatic tss(logic [NSD-1:0] bm);
    int b1, b2;
    emit(mk_bm(bm));
    nvc(1, M_LPGB_N);
    verify_seq();
    b1 = pc; emit('0);                              // BNW end
    nvc(1, M_SR1 | M_SR2 | M_CTRL); nvc(0, M_SR1 | M_SR2 | M_CTRL);   // 1 clock
    verify_seq();
    b2 = pc; emit('0);                              // BNW end
    nvc(1, M_SR1 | M_SR2 | M_CTRL); emit(mk_i(OP_WAIT, 0, 0, 3));
    nvc(0, M_SR1 | M_SR2 | M_CTRL);                 // 4 clocks
    prog[b1] = mk_i(OP_BNW, 0, 0, 20'(pc));
    prog[b2] = mk_i(OP_BNW, 0, 0, 20'(pc));
    nvc(0, M_LPGB_N);
  endtask

  task automatic run_array(int ctx, int dst, int cycles);
    emit(mk_i(OP_CTX, 0, 0, 20'(ctx)));
    emit(mk_i(OP_LDI, 1, 0, 0));
    emit(mk_i(OP_LDF, 0, 1, 0));
    emit(mk_i(OP_EXE, 0, 0, 20'(cycles)));
    emit(mk_i(OP_LDI, 2, 0, 20'(dst)));
    emit(mk_i(OP_STG, 0, 2, 0));
  endtask

  // --------------------------------------------------- reference model
  function automatic void ref_result(int k, output logic [DW-1:0] res [COLS]);
    logic [DW-1:0] a0 [COLS], a1 [COLS], n0 [COLS], n1 [COLS], f [COLS];
    pe_cfg_t cfg;
    for (int c = 0; c < COLS; c++) begin
      int p = int'(cimg[k][CTX_FPERM0 + c / 6][(c % 6) * 4 +: 4]);
      f[c] = (p < COLS) ? din[p] : '0;
    end
    a0 = f; a1 = f;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        logic [2*DW-1:0] v;
        cfg = pe_cfg_t'(cimg[k][r * COLS + c][PE_CFG_W-1:0]);
        v = ref_pe(cfg, a0[c], a1[c], c > 0 ? a0[c-1] : '0, c < COLS - 1 ? a0[c+1] : '0,
                   cimg[k][CTX_CONST0 + int'(cfg.cidx)]);
        n0[c] = v[DW-1:0]; n1[c] = v[2*DW-1:DW];
      end
      a0 = n0; a1 = n1;
    end
    for (int j = 0; j < COLS; j++) begin
      int p = int'(cimg[k][CTX_GPERM0 + j / 6][(j % 6) * 4 +: 4]);
      res[j] = (p < COLS) ? a0[p] : '0;
    end
  endfunction

  task automatic host_write(logic [1:0] sel, logic [1:0] ctx, int addr, logic [IW-1:0] d);
    @(negedge clk);
    h_we = 1; h_sel = sel; h_ctx = ctx; h_addr = DADDR_W'(addr); h_wdata = d;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic check_block(int base, logic [DW-1:0] e [COLS], string what);
    for (int j = 0; j < COLS; j++) begin
      h_addr = DADDR_W'(base + j); #1;
      checks++;
      if (h_rdata !== e[j]) begin
        failures++;
        if (failures < 8) $display("FAIL %s word %0d: %h vs %h", what, j, h_rdata, e[j]);
      end
    end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_ctx_instr = 0, n_ctx_ext = 0, n_pg_off = 0, n_pg_ext = 0;
  int n_tss_short = 0, n_tss_retry = 0, n_tss_skip = 0;
  int n_pse_timer = 0, n_pse_wake = 0, n_restore = 0, n_exe = 0, n_lost = 0;
  int bnw_seen = 0, en_run = 0, sr1_run = 0;
  int pulse_len [$];
  logic [1:0] last_ctx = 0;
  logic [NPD-1:0] last_pd = '1;
  logic last_paused = 0, wake_seen = 0;
  logic [NSD-1:0] bnw_addr_first = 0;

  always @(posedge clk) if (rst_n) begin
    if (active_ctx != last_ctx) begin
      if (ext_ctx_sel) n_ctx_ext++; else n_ctx_instr++;
    end
    last_ctx <= active_ctx;
    if ((last_pd & ~pd_on) != 0) n_pg_off++;
    last_pd <= pd_on;
    if (ext_pg_sel && ext_pd != dut.pgc_reg) n_pg_ext++;
    if (dut.u_uc.exec && dut.u_uc.op == OP_BNW) begin
      // first BNW of a store sequence follows SETBM by 6 instructions
      if (prog[dut.u_uc.pc - 8'd6][31:26] == OP_SETBM) begin
        if (dut.u_uc.need_write) n_tss_short++; else n_tss_skip++;
      end else if (dut.u_uc.need_write) n_tss_retry++;
    end
    if (ext_wake) wake_seen <= 1;
    if (last_paused && !paused) begin
      if (wake_seen) n_pse_wake++; else n_pse_timer++;
      wake_seen <= 0;
    end
    last_paused <= paused;
    for (int d = 0; d < NSD; d++)
      if (nv_ctrl[d].sr3 && !nv_ctrl[d].sb_n) begin n_restore++; break; end
    if (nv_ctrl[0].sr1) sr1_run <= sr1_run + 1;
    else if (sr1_run != 0) begin pulse_len.push_back(sr1_run); sr1_run <= 0; end
    if (array_en) en_run <= en_run + 1;
    else if (en_run != 0) begin if (en_run >= 8) n_exe++; en_run <= 0; end
  end

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(int n, string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: mechanism never happened: %s", what); end
  endtask

  initial begin
    logic [DW-1:0] r0 [COLS], r1 [COLS], old [COLS];
    longint unsigned e_first;
    int phase2, b_ph;

    // ---------------- images
    for (int c = 0; c < COLS; c++) din[c] = rand_w();
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < CTX_WORDS; i++) cimg[k][i] = rand_w();
      for (int i = 0; i < CTX_PE_WORDS; i++) cimg[k][i] = DW'(rand_cfg());
      for (int w = 0; w < 2; w++) begin
        cimg[k][CTX_FPERM0 + w] = '0;
        cimg[k][CTX_GPERM0 + w] = '0;
        for (int e = 0; e < 6; e++) begin
          cimg[k][CTX_FPERM0 + w][e*4 +: 4] = 4'($urandom_range(0, 11));
          cimg[k][CTX_GPERM0 + w][e*4 +: 4] = 4'($urandom_range(0, 11));
        end
      end
    end
    ref_result(0, r0);
    ref_result(1, r1);

    // ---------------- program
    for (int i = 0; i < IMEM_DEPTH; i++) prog[i] = '0;
    b_ph = pc; emit('0);                                    // BNZ r7, phase2
    run_array(0, 100, 8);                                   // A
    tss('1);                                                // B: all 24 domains
    tss(doms(SD_IMEM0, 2) | doms(SD_CTX1, NSD - SD_CTX1));  // C: unchanged domains
    emit(mk_i(OP_PGC, 0, 0, 6'b100011));                    // D: Run_PG
    run_array(0, 120, 8);
    tss(doms(SD_DMEM0, 9));                                 // E
    emit(mk_i(OP_LDI, 3, 0, 200));                          // volatile-only word
    emit(mk_i(OP_STG, 0, 3, 0));                            //   written after the store
    emit(mk_i(OP_PGC, 0, 0, 6'b000001));                    // F: Sleep
    emit(mk_i(OP_PSE, 0, 0, 1));
    emit(mk_i(OP_PSE, 0, 0, 200));
    emit(mk_i(OP_PGC, 0, 0, 6'b100101));                    // G: Recover
    emit(mk_bm(doms(SD_DMEM0, 9) | doms(SD_CTX1, 3)));
    nvc(1, M_SR3); nvc(0, M_SB_N); nvc(1, M_SB_N); nvc(0, M_SR3);
    run_array(1, 140, 9);
    emit(mk_i(OP_LDI, 7, 0, 1));
    emit(mk_i(OP_HALT, 0, 0, 0));
    phase2 = pc;
    emit(mk_i(OP_PGC, 0, 0, 6'b000001));
    run_array(0, 160, 8);
    emit(mk_i(OP_HALT, 0, 0, 0));
    prog[b_ph] = mk_i(OP_BNZ, 0, 7, 20'(phase2));

    // ---------------- load
    #12 rst_n = 1;
    for (int i = 0; i < pc; i++) host_write(2'd1, 0, i, prog[i]);
    for (int c = 0; c < COLS; c++) host_write(2'd0, 0, c, IW'(din[c]));
    for (int c = 0; c < COLS; c++) host_write(2'd0, 0, 200 + c, IW'(c + 1));
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < CTX_WORDS; i++) host_write(2'd2, 2'(k), i, IW'(cimg[k][i]));

    // ---------------- phase 1
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (n_pse_timer == 1);
    wait (paused);
    repeat (40) @(negedge clk);
    ext_wake = 1; @(negedge clk); ext_wake = 0;
    wait (done);
    @(negedge clk);
    check_block(100, r0, "context 0 result, stored");
    check_block(120, r0, "context 0 result under Run_PG, stored");
    check_block(140, r1, "context 1 result after restore");
    // 200..211 held c+1 when everything was stored; the array result
    // written there afterwards was only volatile and is gone.
    for (int j = 0; j < COLS; j++) begin
      old[j] = DW'(j + 1);
      h_addr = DADDR_W'(200 + j); #1;
      if (h_rdata == old[j] && r0[j] != old[j]) n_lost++;
    end
    check_block(200, old, "word written after the last store is lost");
    checks++; if (pd_on !== 6'b100101) failures++;

    // ---------------- phase 2: outside controller overrides
    ext_ctx_sel = 1; ext_ctx = 2'd0;
    repeat (2) @(negedge clk);
    ext_ctx = 2'd1;
    ext_pg_sel = 1; ext_pd = 6'b100101;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    check_block(160, r1, "external context and power selection");

    // store pulses: 1 clock (35.7 ns >= 35 ns) and 4 clocks (142.9 ns >= 140 ns)
    foreach (pulse_len[i]) begin
      checks++;
      if (pulse_len[i] != 1 && pulse_len[i] != 4) begin
        failures++; $display("FAIL: store pulse of %0d clocks", pulse_len[i]);
      end
    end
    checks++;
    if (!(1 inside {pulse_len}) || !(4 inside {pulse_len})) failures++;
    $display("mechanisms:");
    mech(n_ctx_instr, "context switch by instruction");
    mech(n_ctx_ext, "context switch from outside");
    mech(n_pg_off, "power domains switched off (PGC)");
    mech(n_pg_ext, "power control from outside");
    mech(n_tss_short, "verify: need to write -> short store");
    mech(n_tss_retry, "verify: failed -> long store retry");
    mech(n_tss_skip, "verify: no need to write -> skip");
    mech(n_pse_timer, "PSE pause ended by its counter");
    mech(n_pse_wake, "PSE pause ended by ext_wake");
    mech(n_restore, "restore from MTJ");
    mech(n_exe, "multi-cycle pipelined array execution");
    mech(n_lost, "volatile data lost across power-off");
    $display("store current %0d bit-cycles, verify reads %0d bits", store_bit_cycles, verify_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
