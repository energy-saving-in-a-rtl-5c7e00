// nvff_ctrl_regs: the NVFF management registers of the microcontroller.
//
// Holds a 24-bit bitmap register (one bit per store domain), a 10-bit NVFF
// control register per store domain whose bits drive that domain's VR-NVFF
// control signals, and a per-domain flag register that can load the
// domain's OR-ed CMP_OUT or keep its value. These three follow the
// architecture's description of the microcontroller.
//   nvc_en   : for every domain whose bitmap bit is 1, set (nvc_set=1) or
//              clear (nvc_set=0) the control bits selected by nvc_mask.
//   cbb_en   : clear the lowest set bit of the bitmap (CBB instruction);
//              bm_after_cbb_nz tells whether any bit would remain.
//   cap_en   : flags of bitmap-selected domains load cmp_in (others hold);
//              need_write is the OR of cmp_in over bitmap-selected domains.
//   bm_load  : bitmap <= bm_wdata (SETBM instruction).
// All updates happen on the rising clock edge; reset (active low, async)
// puts every control register at NVFF_CTRL_RESET and clears bitmap/flags.
// Which bit CBB clears, how the bitmap is loaded and when flags load are
// this design's choices.
module nvff_ctrl_regs
  import nvcma_pkg::*;
#(
  parameter int N = NSD
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bm_load,
  input  logic [N-1:0]     bm_wdata,
  input  logic             nvc_en,
  input  logic             nvc_set,
  input  logic [NCTRL-1:0] nvc_mask,
  input  logic             cbb_en,
  input  logic             cap_en,
  input  logic [N-1:0]     cmp_in,
  output logic [N-1:0]     bitmap,
  output nvff_ctrl_t       ctrl [N],
  output logic [N-1:0]     flags,
  output logic             bm_after_cbb_nz,
  output logic             need_write
);

  logic [N-1:0] bm_cleared;

  // Clearing the lowest set bit: x & (x - 1).
  always_comb begin
    bm_cleared      = bitmap & (bitmap - N'(1));
    bm_after_cbb_nz = |bm_cleared;
    need_write      = |(cmp_in & bitmap);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitmap <= '0;
    end else if (bm_load) begin
      bitmap <= bm_wdata;
    end else if (cbb_en) begin
      bitmap <= bm_cleared;
    end
  end

  for (genvar d = 0; d < N; d++) begin : g_dom
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ctrl[d]  <= NVFF_CTRL_RESET;
        flags[d] <= 1'b0;
      end else begin
        if (nvc_en && bitmap[d]) begin
          if (nvc_set) ctrl[d] <= ctrl[d] | nvff_ctrl_t'(nvc_mask);
          else         ctrl[d] <= ctrl[d] & ~nvff_ctrl_t'(nvc_mask);
        end
        // Fig. 6 style: load CMP_OUT or recirculate the held value.
        flags[d] <= (cap_en && bitmap[d]) ? cmp_in[d] : flags[d];
      end
    end
  end

endmodule
