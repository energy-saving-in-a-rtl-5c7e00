// context_mem: configuration and constant registers of one hardware
// context, built from VR-NVFFs.
//
// 116 words of 25 bits: words 0..95 hold the configuration of PE(r,c) at
// word r*12+c (low 17 bits, pe_cfg_t), words 96..111 the sixteen constant
// registers, words 112..113 the fetch permutation and 114..115 the gather
// permutation (six 4-bit entries per word, entry 0 in the low bits). The
// words are spread over NDOM store domains whose control signals come in
// on ctrl; pwr_on is the context's power domain. Writing is through a
// single host port (one word per clock edge); all contents are presented
// in decoded form at once. Keeping configuration and constants of a context
// in NVFFs, and giving each context its own store and power domains,
// follows the architecture; the layout is this design's choice.
module context_mem
  import nvcma_pkg::*;
#(
  parameter int          NDOM = 3,
  parameter int unsigned SEED = 11
) (
  input  logic                  clk,
  input  nvff_ctrl_t            ctrl [NDOM],
  input  logic                  pwr_on,
  input  logic                  we,
  input  logic [CTX_ADDR_W-1:0] addr,
  input  logic [DW-1:0]         wdata,
  output logic [DW-1:0]         rdata,
  output pe_cfg_t               cfg    [ROWS][COLS],
  output logic [DW-1:0]         consts [NCONST],
  output logic [3:0]            fperm  [COLS],
  output logic [3:0]            gperm  [COLS],
  output logic [NDOM-1:0]       cmp_out,
  output longint unsigned       store_bit_cycles,
  output longint unsigned       verify_bits
);

  logic [CTX_WORDS*DW-1:0] q;
  logic [DW-1:0]           unused_a;

  vr_nvff_array #(.W(DW), .DEPTH(CTX_WORDS), .NDOM(NDOM), .SEED(SEED)) u_cells (
    .clk,
    .ctrl,
    .pwr_on ({NDOM{pwr_on}}),
    .a_addr ('0),
    .a_we   (1'b0),
    .a_wdata('0),
    .a_rdata(unused_a),
    .b_addr (addr),
    .b_we   (we),
    .b_wdata(wdata),
    .b_rdata(rdata),
    .q_all  (q),
    .cmp_out,
    .store_bit_cycles,
    .verify_bits
  );

  function automatic logic [DW-1:0] word(int i);
    return q[i*DW +: DW];
  endfunction

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        cfg[r][c] = pe_cfg_t'(word(r * COLS + c)[PE_CFG_W-1:0]);
    for (int k = 0; k < NCONST; k++) consts[k] = word(CTX_CONST0 + k);
    for (int c = 0; c < COLS; c++) begin
      fperm[c] = word(CTX_FPERM0 + c / 6)[(c % 6) * 4 +: 4];
      gperm[c] = word(CTX_GPERM0 + c / 6)[(c % 6) * 4 +: 4];
    end
  end

endmodule
