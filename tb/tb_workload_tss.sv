// tb_workload_tss: store-energy sweep on one store domain of 2,400 VR-NVFFs
// (96 words of 25 bits), comparing the two-step store (verify, 1-clock
// store, verify, 4-clock store) with the long-store-only control (verify,
// 4-clock store) for different numbers of bits to be written.
//
// Energy is counted in units of one bit-clock of store current. A verify
// reads every bit of the domain; its cost per bit (VERIFY_COST) is not
// known from silicon here and is set so that the two controls break even
// near 100 written bits, as measured on the real chip. With it, the
// two-step store must save at least 60 % at 2,400 bits, still win at
// 240 bits and lose at 24 bits. The pure store current must drop by about
// 72 % (at least 65 %) at 2,400 bits. All bits must end up stored.
//
// Before that, the store time is swept: all 2,400 bits are stored to 0
// (then to 1) for 1..6 clocks, the pass rate PR is counted, and the
// estimated energy of a short store of t clocks followed by a 4-clock long
// store of the failed bits, t + 4 * (1 - PR(t)) in units of one clock of
// full-domain store current, is printed. PR must saturate at 100 % by
// 4 clocks (143 ns) and the estimate must be lowest at 1 clock (36 ns).
module tb_workload_tss;
  import nvcma_pkg::*;

  localparam int W = 25, DEPTH = 96, NBITS = W * DEPTH;
  localparam real VERIFY_COST = 0.12;

  logic clk = 0;
  nvff_ctrl_t ctrl [1];
  logic [6:0] a_addr = 0, b_addr = 0;
  logic a_we = 0, b_we = 0;
  logic [W-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [DEPTH*W-1:0] q_all;
  logic [0:0] cmp_out;
  longint unsigned store_bit_cycles, verify_bits;

  logic [W-1:0] base [DEPTH], flip [DEPTH];
  int perm [NBITS];
  int checks = 0, failures = 0;

  vr_nvff_array #(.W(W), .DEPTH(DEPTH), .NDOM(1), .SEED(2400)) dut (
    .clk, .ctrl, .pwr_on(1'b1), .a_addr, .a_we, .a_wdata, .a_rdata,
    .b_addr, .b_we, .b_wdata, .b_rdata, .q_all, .cmp_out, .store_bit_cycles, .verify_bits);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic load(logic [W-1:0] img [DEPTH]);
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_we = 1; a_addr = 7'(i); a_wdata = img[i];
    end
    @(negedge clk); a_we = 0;
  endtask

  function automatic nvff_ctrl_t cv(bit sr1, bit sr2, bit sr3, bit rb_n);
    nvff_ctrl_t c = NVFF_CTRL_RESET;
    c.sr1 = sr1; c.sr2 = sr2; c.ctrl = sr1; c.sr3 = sr3; c.rb_n = rb_n; c.lpgb_n = 1'b1;
    return c;
  endfunction

  task automatic hold(nvff_ctrl_t c, int n);
    @(negedge clk); ctrl[0] = c;
    repeat (n) @(negedge clk);
    ctrl[0] = cv(0, 0, 0, 1);
  endtask

  task automatic verify(output bit need);
    hold(cv(0, 0, 1, 0), 1); #1;
    need = cmp_out[0];
  endtask

  // returns store bit-clocks, verifies and bits still failing after step 1
  task automatic run(bit tss, output longint unsigned st, output int nver, output longint unsigned failed);
    longint unsigned s0 = store_bit_cycles, s1;
    bit need;
    nver = 1; failed = 0;
    verify(need);
    if (need && tss) begin
      hold(cv(1, 1, 0, 1), 1);
      nver++;
      verify(need);
      s1 = store_bit_cycles;
      if (need) hold(cv(1, 1, 0, 1), 4);
      failed = (store_bit_cycles - s1) / 4;
    end else if (need) begin
      hold(cv(1, 1, 0, 1), 4);
    end
    st = store_bit_cycles - s0;
    verify(need);
    chk(!need, "every bit stored");
  endtask

  // pass rate after storing every bit to v for t clocks, from the opposite value
  task automatic pass_rate(bit v, int t, output real pr);
    logic [W-1:0] img [DEPTH];
    longint unsigned s0;
    bit need;
    foreach (img[i]) img[i] = v ? '0 : '1;
    load(img);
    hold(cv(1, 0, 0, 1), 4);                       // MTJs hold the opposite value
    foreach (img[i]) img[i] = v ? '1 : '0;
    load(img);
    verify(need);
    hold(cv(1, 1, 0, 1), t);
    verify(need);
    s0 = store_bit_cycles;
    hold(cv(1, 1, 0, 1), 4);                       // only failed bits draw current
    pr = 1.0 - real'(store_bit_cycles - s0) / 4.0 / real'(NBITS);
  endtask

  initial begin
    int counts [6] = '{2400, 1200, 600, 240, 100, 24};
    longint unsigned st_c, st_t, fl_c, fl_t;
    int nv_c, nv_t;
    real e_c, e_t;
    ctrl[0] = cv(0, 0, 0, 1);
    for (int v = 0; v < 2; v++) begin
      real pr [7], e [7];
      $display("store all to %0d: t  PR        short+long energy", v);
      for (int t = 1; t <= 6; t++) begin
        pass_rate(v[0], t, pr[t]);
        e[t] = t + 4.0 * (1.0 - pr[t]);
        $display("                 %0d  %6.2f%%   %5.3f", t, 100.0 * pr[t], e[t]);
      end
      chk(pr[1] > 0.9 && pr[1] < 1.0, "most but not all bits pass a 1-clock store");
      chk(pr[4] == 1.0 && pr[6] == 1.0, "pass rate saturates by 4 clocks");
      for (int t = 2; t <= 6; t++) chk(e[1] < e[t], "1-clock short store is the cheapest");
    end
    for (int i = 0; i < DEPTH; i++) base[i] = W'({$urandom, $urandom});
    for (int i = 0; i < NBITS; i++) perm[i] = i;
    perm.shuffle();
    load(base);
    run(0, st_c, nv_c, fl_c);                     // MTJs now hold base
    $display("  bits  long-only   two-step  saving  store-current saving  PR after short store");
    foreach (counts[k]) begin
      int n;
      n = counts[k];
      flip = base;
      for (int j = 0; j < n; j++) flip[perm[j] / W][perm[j] % W] = ~flip[perm[j] / W][perm[j] % W];
      load(flip);                                  // n bits differ from the MTJs
      run(0, st_c, nv_c, fl_c);
      load(base);                                  // the same n bits differ again
      run(1, st_t, nv_t, fl_t);
      chk(st_c == longint'(4 * n), $sformatf("long-only store current %0d for %0d bits", st_c, n));
      e_c = real'(st_c) + VERIFY_COST * NBITS * nv_c;
      e_t = real'(st_t) + VERIFY_COST * NBITS * nv_t;
      $display("  %4d  %9.0f  %9.0f  %5.1f%%  %5.1f%%                %6.2f%%", n, e_c, e_t,
               100.0 * (e_c - e_t) / e_c, 100.0 * (real'(st_c) - real'(st_t)) / real'(st_c),
               100.0 * real'(NBITS - fl_t) / real'(NBITS));
      if (n == 2400) begin
        chk((e_c - e_t) / e_c >= 0.60, "two-step saves at least 60 % at 2,400 bits");
        chk((real'(st_c) - real'(st_t)) / real'(st_c) >= 0.65, "store current drops at least 65 %");
      end
      if (n == 240) chk(e_t < e_c, "two-step still wins at 240 bits");
      if (n == 24)  chk(e_t > e_c, "long-only wins at 24 bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
