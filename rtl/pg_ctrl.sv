// pg_ctrl: power-gating control for the six power domains.
//
// The PGC instruction writes a 6-bit operand, one bit per power domain
// (1 = powered), into a register; bit k drives power domain k+1
// (PD1 instruction memory, PD2..PD5 configuration memories of contexts
// 0..3, PD6 data memory). A per-chip select chooses, for all domains,
// between that register and enables driven from outside the chip
// (ext_sel=1), as the external/internal control multiplexers do.
// The register resets to all domains powered. pd_on is combinational from
// the register and the external inputs; the register updates on the rising
// edge when pgc_en is high. The bit-to-domain order is this design's
// choice.
module pg_ctrl
  import nvcma_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           pgc_en,
  input  logic [NPD-1:0] pgc_val,
  input  logic           ext_sel,
  input  logic [NPD-1:0] ext_pd,
  output logic [NPD-1:0] pgc_reg,
  output logic [NPD-1:0] pd_on
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pgc_reg <= '1;
    else if (pgc_en) pgc_reg <= pgc_val;
  end

  assign pd_on = ext_sel ? ext_pd : pgc_reg;

endmodule
