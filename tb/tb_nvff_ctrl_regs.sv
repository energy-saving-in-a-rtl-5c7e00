// tb_nvff_ctrl_regs: random sequences of bitmap loads, NVC set/reset, CBB
// and CMP_OUT captures, compared with a behavioural model of the registers.
module tb_nvff_ctrl_regs;
  import nvcma_pkg::*;

  logic clk = 0, rst_n = 0;
  logic bm_load = 0, nvc_en = 0, nvc_set = 0, cbb_en = 0, cap_en = 0;
  logic [NSD-1:0] bm_wdata = 0, cmp_in = 0, bitmap, flags;
  logic [NCTRL-1:0] nvc_mask = 0;
  nvff_ctrl_t ctrl [NSD];
  logic bm_after_cbb_nz, need_write;

  logic [NSD-1:0]   m_bm = 0, m_fl = 0;
  logic [NCTRL-1:0] m_ctl [NSD];
  int checks = 0, failures = 0;

  nvff_ctrl_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NSD-1:0] clr_low(logic [NSD-1:0] v);
    for (int i = 0; i < NSD; i++) if (v[i]) begin v[i] = 0; return v; end
    return v;
  endfunction

  initial begin
    for (int d = 0; d < NSD; d++) m_ctl[d] = NVFF_CTRL_RESET;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      bm_load = 0; nvc_en = 0; cbb_en = 0; cap_en = 0;
      cmp_in  = NSD'($urandom);
      case ($urandom_range(0, 3))
        0: begin bm_load = 1; bm_wdata = NSD'($urandom) & NSD'($urandom); end
        1: begin nvc_en = 1; nvc_set = $urandom_range(0, 1); nvc_mask = NCTRL'($urandom); end
        2: cbb_en = 1;
        default: cap_en = 1;
      endcase
      #1;
      checks += 2;
      if (bm_after_cbb_nz !== (clr_low(m_bm) != 0)) failures++;
      if (need_write !== ((cmp_in & m_bm) != 0)) failures++;
      for (int d = 0; d < NSD; d++) begin
        if (nvc_en && m_bm[d]) m_ctl[d] = nvc_set ? (m_ctl[d] | nvc_mask) : (m_ctl[d] & ~nvc_mask);
        if (cap_en && m_bm[d]) m_fl[d] = cmp_in[d];
      end
      if (bm_load) m_bm = bm_wdata;
      else if (cbb_en) m_bm = clr_low(m_bm);
      @(negedge clk);
      bm_load = 0; nvc_en = 0; cbb_en = 0; cap_en = 0;
      checks += 2;
      if (bitmap !== m_bm) failures++;
      if (flags !== m_fl) failures++;
      for (int d = 0; d < NSD; d++) begin
        checks++;
        if (ctrl[d] !== nvff_ctrl_t'(m_ctl[d])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
