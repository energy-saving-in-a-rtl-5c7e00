// tb_workload_intermittent: the intermittent application of the power
// gating study, at its real time scale. Each 1 ms period at 28 MHz has
// about 500 us of run time and 500 us of standby:
//   Run_PG   contexts 1..3 powered off; context 0 is applied to the data
//            memory over and over (each result is the next input), then the
//            last result is kept in a per-period slot;
//   store    two-step store of the data memory and context 0 (context 0 is
//            unchanged after the first period, so its verify skips it);
//   Sleep    everything but the instruction memory powered off, PSE 55
//            (55 x 256 = 14,080 clocks = 503 us);
//   Recover  data memory and context 0 powered on and restored.
// Three periods run from one program. The results must match a reference
// model through all three sleeps, each sleep and run phase is timed, and
// the power state in each phase is checked. The time from each wake-up to
// the first array run (power-up, restore, reload) must stay under 1 us.
// The share of clocks for which the four context memories are powered is
// printed as a leakage proxy.
module tb_workload_intermittent;
  import nvcma_pkg::*;
  import tb_ref_pkg::*;

  localparam int PERIODS = 3;
  localparam int ITERS   = 480;            // array runs per run phase
  localparam int SLEEP_N = 55;             // PSE operand

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

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ images
  logic [DW-1:0] din [COLS];
  logic [DW-1:0] cimg [CTX_WORDS];
  logic [IW-1:0] prog [IMEM_DEPTH];
  int pc = 0;

  task automatic emit(logic [IW-1:0] i);
    prog[pc] = i;
    pc++;
  endtask

  task automatic nvc(bit set, logic [NCTRL-1:0] m);
    emit(mk_i(OP_NVC, 0, 0, {3'b000, set, 6'b0, m}));
  endtask

  task automatic verify_seq();
    nvc(1, M_SR3); nvc(0, M_RB_N); nvc(1, M_RB_N); nvc(0, M_SR3);
  endtask

  task automatic tss(logic [NSD-1:0] bm);
    int b1, b2;
    emit(mk_bm(bm));
    nvc(1, M_LPGB_N);
    verify_seq();
    b1 = pc; emit('0);
    nvc(1, M_SR1 | M_SR2 | M_CTRL); nvc(0, M_SR1 | M_SR2 | M_CTRL);
    verify_seq();
    b2 = pc; emit('0);
    nvc(1, M_SR1 | M_SR2 | M_CTRL); emit(mk_i(OP_WAIT, 0, 0, 3));
    nvc(0, M_SR1 | M_SR2 | M_CTRL);
    prog[b1] = mk_i(OP_BNW, 0, 0, 20'(pc));
    prog[b2] = mk_i(OP_BNW, 0, 0, 20'(pc));
    nvc(0, M_LPGB_N);
  endtask

  // one pass of the array over words 0..11, result back to words 0..11
  function automatic void ref_step(ref logic [DW-1:0] d [COLS]);
    logic [DW-1:0] a0 [COLS], a1 [COLS], n0 [COLS], n1 [COLS], f [COLS];
    pe_cfg_t cfg;
    for (int c = 0; c < COLS; c++) begin
      int p = int'(cimg[CTX_FPERM0 + c / 6][(c % 6) * 4 +: 4]);
      f[c] = (p < COLS) ? d[p] : '0;
    end
    a0 = f; a1 = f;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        logic [2*DW-1:0] v;
        cfg = pe_cfg_t'(cimg[r * COLS + c][PE_CFG_W-1:0]);
        v = ref_pe(cfg, a0[c], a1[c], c > 0 ? a0[c-1] : '0, c < COLS - 1 ? a0[c+1] : '0,
                   cimg[CTX_CONST0 + int'(cfg.cidx)]);
        n0[c] = v[DW-1:0]; n1[c] = v[2*DW-1:DW];
      end
      a0 = n0; a1 = n1;
    end
    for (int j = 0; j < COLS; j++) begin
      int p = int'(cimg[CTX_GPERM0 + j / 6][(j % 6) * 4 +: 4]);
      d[j] = (p < COLS) ? a0[p] : '0;
    end
  endfunction

  task automatic host_write(logic [1:0] sel, int addr, logic [IW-1:0] d);
    @(negedge clk);
    h_we = 1; h_sel = sel; h_ctx = 0; h_addr = DADDR_W'(addr); h_wdata = d;
    @(negedge clk);
    h_we = 0;
  endtask

  // ------------------------------------------------ phase timing monitor
  int sleep_len [$], run_len [$], wake_len [$];
  int wcnt = -1;
  int cnt = 0, ctx_on = 0, total = 0, bad_sleep_pd = 0, bad_run_pd = 0;
  logic last_paused = 0, counting_run = 0;

  always @(posedge clk) if (rst_n && running) begin
    total++;
    ctx_on += $countones(pd_on[4:1]);
    if (paused && pd_on != 6'b000001) bad_sleep_pd++;
    if (array_en && pd_on != 6'b100011) bad_run_pd++;
    // a run phase is timed from the first array run after a start or a
    // wake-up to the last store pulse before the next pause
    if (array_en) counting_run = 1;
    // wake-up to first array run: power-up, restore, reloading the array
    if (last_paused && !paused) wcnt = 0;
    else if (wcnt >= 0 && array_en) begin wake_len.push_back(wcnt); wcnt = -1; end
    else if (wcnt >= 0) wcnt++;
    if (paused != last_paused) begin
      if (paused) begin
        if (counting_run) run_len.push_back(cnt);
        counting_run = 0;
      end else sleep_len.push_back(cnt);
      cnt = 0;
    end else if (paused || counting_run) cnt++;
    last_paused = paused;
  end

  initial begin
    logic [DW-1:0] d [COLS];
    int lp_per, lp_it;

    for (int c = 0; c < COLS; c++) din[c] = rand_w();
    for (int i = 0; i < CTX_WORDS; i++) cimg[i] = rand_w();
    for (int i = 0; i < CTX_PE_WORDS; i++) cimg[i] = DW'(rand_cfg());
    for (int w = 0; w < 2; w++) begin
      cimg[CTX_FPERM0 + w] = '0;
      cimg[CTX_GPERM0 + w] = '0;
      for (int e = 0; e < 6; e++) begin
        cimg[CTX_FPERM0 + w][e*4 +: 4] = 4'($urandom_range(0, 11));
        cimg[CTX_GPERM0 + w][e*4 +: 4] = 4'($urandom_range(0, 11));
      end
    end

    // ---------------- program
    for (int i = 0; i < IMEM_DEPTH; i++) prog[i] = '0;
    emit(mk_i(OP_LDI, 5, 0, 20'(PERIODS)));
    emit(mk_i(OP_LDI, 6, 0, 100));
    emit(mk_i(OP_CTX, 0, 0, 0));
    emit(mk_i(OP_LDI, 1, 0, 0));
    lp_per = pc;
    emit(mk_i(OP_PGC, 0, 0, 20'(6'b100011)));                    // Run_PG
    emit(mk_i(OP_LDI, 4, 0, 20'(ITERS)));
    lp_it = pc;
    emit(mk_i(OP_LDF, 0, 1, 0));
    emit(mk_i(OP_EXE, 0, 0, 8));
    emit(mk_i(OP_STG, 0, 1, 0));
    emit(mk_i(OP_ADDI, 4, 4, 20'hFFFF));
    emit(mk_i(OP_BNZ, 0, 4, 20'(lp_it)));
    emit(mk_i(OP_STG, 0, 6, 0));                            // per-period slot
    emit(mk_i(OP_ADDI, 6, 6, 20'(COLS)));
    tss({9'b0, 4'hF, 2'b0, 9'h1FF});      // DMEM + context 0
    emit(mk_i(OP_PGC, 0, 0, 20'(6'b000001)));                    // Sleep
    emit(mk_i(OP_PSE, 0, 0, 20'(SLEEP_N)));
    emit(mk_i(OP_PGC, 0, 0, 20'(6'b100011)));                    // Recover
    emit(mk_bm({9'b0, 4'hF, 2'b0, 9'h1FF}));
    nvc(1, M_SR3); nvc(0, M_SB_N); nvc(1, M_SB_N); nvc(0, M_SR3);
    emit(mk_i(OP_ADDI, 5, 5, 20'hFFFF));
    emit(mk_i(OP_BNZ, 0, 5, 20'(lp_per)));
    emit(mk_i(OP_HALT, 0, 0, 0));

    // ---------------- load and run
    #12 rst_n = 1;
    for (int i = 0; i < pc; i++) host_write(2'd1, i, prog[i]);
    for (int c = 0; c < COLS; c++) host_write(2'd0, c, IW'(din[c]));
    for (int i = 0; i < CTX_WORDS; i++) host_write(2'd2, i, IW'(cimg[i]));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);

    // ---------------- results: every period's slot and the final data
    d = din;
    for (int p = 0; p < PERIODS; p++) begin
      for (int i = 0; i < ITERS; i++) ref_step(d);
      for (int j = 0; j < COLS; j++) begin
        h_addr = DADDR_W'(100 + p * COLS + j); #1;
        chk(h_rdata === d[j], $sformatf("period %0d word %0d: %h vs %h", p, j, h_rdata, d[j]));
      end
    end
    for (int j = 0; j < COLS; j++) begin
      h_addr = DADDR_W'(j); #1;
      chk(h_rdata === d[j], $sformatf("final word %0d", j));
    end

    // ---------------- timing and power state
    chk(sleep_len.size() == PERIODS, "one sleep per period");
    chk(run_len.size() == PERIODS, "one run phase per period");
    foreach (sleep_len[i]) begin
      $display("  period %0d: run %0d clocks (%.1f us), sleep %0d clocks (%.1f us) at 28 MHz",
               i, run_len[i], run_len[i] / 28.0, sleep_len[i], sleep_len[i] / 28.0);
      chk(sleep_len[i] >= 14000 && sleep_len[i] <= 14100, "sleep lasts about 500 us");
      chk(run_len[i] >= 13300 && run_len[i] <= 14700, "run lasts 500 us within 5 %");
    end
    foreach (wake_len[i]) begin
      $display("  wake-up %0d: first array run after %0d clocks (%.2f us)", i, wake_len[i], wake_len[i] / 28.0);
      chk(wake_len[i] < 28, "back to work within 1 us of waking");
    end
    chk(wake_len.size() == PERIODS - 1, "every wake-up but the last leads to a run");
    chk(bad_sleep_pd == 0, "only the instruction memory powered while asleep");
    chk(bad_run_pd == 0, "contexts 1..3 powered off while running");
    $display("  context memories powered %.1f %% of the time (100 %% without power gating)",
             100.0 * ctx_on / (4.0 * total));
    chk(ctx_on < total, "context memory power below one context on average");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
