// tb_vr_nvff_array: exercises the VR-NVFF memory model through the
// two-step store (verify, short store, verify, long store) and the
// conventional long-only store, checking CMP_OUT at each verify, data
// survival across a power cut with restore, loss of volatile data when
// unpowered or slave-gated, write blocking under clock gating, and that the
// two-step store draws less store current than the long-only store.
module tb_vr_nvff_array;
  import nvcma_pkg::*;

  localparam int W = 25, DEPTH = 64, NDOM = 2, HALF = DEPTH / NDOM;

  logic clk = 0;
  nvff_ctrl_t ctrl [NDOM];
  logic [NDOM-1:0] pwr_on = '1;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic a_we = 0, b_we = 0;
  logic [W-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [DEPTH*W-1:0] q_all;
  logic [NDOM-1:0] cmp_out;
  longint unsigned store_bit_cycles, verify_bits;

  logic [W-1:0] img [DEPTH];
  int checks = 0, failures = 0;
  int tss_verify_skip = 0, tss_retry = 0;

  vr_nvff_array #(.W(W), .DEPTH(DEPTH), .NDOM(NDOM), .SEED(7)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_all(int d);
    for (int i = d * HALF; i < (d + 1) * HALF; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 6'(i); a_wdata = W'({$urandom, $urandom}); img[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
  endtask

  task automatic pulse(int d, nvff_ctrl_t c, int n);
    @(negedge clk); ctrl[d] = c;
    repeat (n) @(negedge clk);
    ctrl[d] = NVFF_CTRL_RESET;
    ctrl[d].lpgb_n = 1'b1;      // balloon kept powered during the sequence
  endtask

  function automatic nvff_ctrl_t cv(bit sr1, bit sr2, bit sr3, bit sb_n, bit rb_n, bit ctl);
    nvff_ctrl_t c = NVFF_CTRL_RESET;
    c.sr1 = sr1; c.sr2 = sr2; c.sr3 = sr3; c.sb_n = sb_n; c.rb_n = rb_n; c.ctrl = ctl;
    c.lpgb_n = 1'b1;
    return c;
  endfunction

  task automatic power_cycle_restore(int d);
    @(negedge clk); pwr_on[d] = 0;
    @(negedge clk);
    b_addr = 6'(d * HALF); #1;
    chk(b_rdata == 0, "unpowered domain reads zero");
    pwr_on[d] = 1;
    pulse(d, cv(0, 0, 1, 0, 1, 0), 1);        // restore
    for (int i = d * HALF; i < (d + 1) * HALF; i++) begin
      b_addr = 6'(i); #1;
      chk(b_rdata == img[i], $sformatf("restored word %0d", i));
      chk(q_all[i*W +: W] == img[i], "q_all view");
    end
  endtask

  initial begin
    longint unsigned e0, e_conv, e_tss;
    for (int d = 0; d < NDOM; d++) begin ctrl[d] = NVFF_CTRL_RESET; ctrl[d].lpgb_n = 1; end
    #12;
    // ---- conventional: verify + long store (4 clocks) on domain 0
    write_all(0);
    pulse(0, cv(0, 0, 1, 1, 0, 0), 1); #1;      // verify read
    chk(cmp_out[0] == 1, "fresh data differs from MTJ");
    e0 = store_bit_cycles;
    pulse(0, cv(1, 0, 0, 1, 1, 1), 4);
    e_conv = store_bit_cycles - e0;
    pulse(0, cv(0, 0, 1, 1, 0, 0), 1); #1;
    chk(cmp_out[0] == 0, "long store wrote every bit");
    power_cycle_restore(0);
    // ---- two-step store on domain 1
    write_all(1);
    pulse(1, cv(0, 0, 1, 1, 0, 0), 1); #1;
    chk(cmp_out[1] == 1, "need to write");
    e0 = store_bit_cycles;
    pulse(1, cv(1, 1, 0, 1, 1, 1), 1);          // short store, verify-gated
    pulse(1, cv(0, 0, 1, 1, 0, 0), 1); #1;
    chk(cmp_out[1] == 1, "some bits need more than one clock");
    if (cmp_out[1]) tss_retry++;
    pulse(1, cv(1, 1, 0, 1, 1, 1), 4);          // long store on failing bits
    e_tss = store_bit_cycles - e0;
    pulse(1, cv(0, 0, 1, 1, 0, 0), 1); #1;
    chk(cmp_out[1] == 0, "retry completed the store");
    chk(e_tss < e_conv / 2, $sformatf("TSS current %0d vs long-only %0d", e_tss, e_conv));
    power_cycle_restore(1);
    // ---- nothing changed: verify says no need to write, gated store draws nothing
    pulse(1, cv(0, 0, 1, 1, 0, 0), 1); #1;
    chk(cmp_out[1] == 0, "no need to write");
    if (!cmp_out[1]) tss_verify_skip++;
    e0 = store_bit_cycles;
    pulse(1, cv(1, 1, 0, 1, 1, 1), 4);
    chk(store_bit_cycles == e0, "gated store with equal data draws no current");
    // ---- clock gating blocks writes, slave gating loses data
    @(negedge clk); ctrl[0].cg = 1; a_we = 1; a_addr = 0; a_wdata = ~img[0];
    @(negedge clk); a_we = 0; ctrl[0].cg = 0; #1;
    chk(a_rdata == img[0], "clock-gated write ignored");
    @(negedge clk); ctrl[0].lpga_n = 0;
    @(negedge clk); ctrl[0].lpga_n = 1; a_addr = 1; #1;
    chk(a_rdata == 0, "slave latch gating loses data");
    // ---- port B wins a same-word conflict
    @(negedge clk); a_we = 1; b_we = 1; a_addr = 3; b_addr = 3; a_wdata = 1; b_wdata = 2;
    @(negedge clk); a_we = 0; b_we = 0; #1;
    chk(a_rdata == 2, "port B priority");
    chk(verify_bits > 0, "verify reads counted");
    chk(tss_retry > 0 && tss_verify_skip > 0, "both TSS branches taken");
    $display("store current: TSS %0d, long-only %0d bit-cycles", e_tss, e_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
