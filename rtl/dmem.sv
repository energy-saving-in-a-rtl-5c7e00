// dmem: the interleaved dual-port data memory, built from VR-NVFFs.
//
// Two banks of 256 x 25-bit words; even word addresses live in bank 0 and
// odd ones in bank 1, so the transfer port reads or writes the pair
// (2k, 2k+1) in one clock: x_addr is the pair index k, x_rdata[b] comes
// from bank b combinationally and x_we[b] writes bank b on the rising edge.
// The second port (host side, h_*) reaches any single word; it wins a
// same-word conflict. Bank 0 spans store domains 0..4 and bank 1 domains
// 5..8 of the chip; all are in the data-memory power domain. Two
// interleaved banks of 25-bit words follow the predecessor chip's data
// memory; the port split and the domain split are this design's choices.
module dmem
  import nvcma_pkg::*;
(
  input  logic                 clk,
  input  nvff_ctrl_t           ctrl [9],
  input  logic                 pwr_on,
  input  logic [DADDR_W-2:0]   x_addr,
  input  logic [1:0]           x_we,
  input  logic [DW-1:0]        x_wdata [2],
  output logic [DW-1:0]        x_rdata [2],
  input  logic [DADDR_W-1:0]   h_addr,
  input  logic                 h_we,
  input  logic [DW-1:0]        h_wdata,
  output logic [DW-1:0]        h_rdata,
  output logic [8:0]           cmp_out,
  output longint unsigned      store_bit_cycles,
  output longint unsigned      verify_bits
);

  nvff_ctrl_t      ctrl0 [5];
  nvff_ctrl_t      ctrl1 [4];
  logic [DW-1:0]   hr    [2];
  longint unsigned sbc   [2];
  longint unsigned vb    [2];
  logic [BANK_DEPTH*DW-1:0] unused_q0, unused_q1;

  always_comb begin
    for (int d = 0; d < 5; d++) ctrl0[d] = ctrl[d];
    for (int d = 0; d < 4; d++) ctrl1[d] = ctrl[5 + d];
  end

  vr_nvff_array #(.W(DW), .DEPTH(BANK_DEPTH), .NDOM(5), .SEED(101)) u_bank0 (
    .clk, .ctrl(ctrl0), .pwr_on({5{pwr_on}}),
    .a_addr(x_addr), .a_we(x_we[0]), .a_wdata(x_wdata[0]), .a_rdata(x_rdata[0]),
    .b_addr(h_addr[DADDR_W-1:1]), .b_we(h_we && !h_addr[0]), .b_wdata(h_wdata),
    .b_rdata(hr[0]), .q_all(unused_q0), .cmp_out(cmp_out[4:0]),
    .store_bit_cycles(sbc[0]), .verify_bits(vb[0])
  );

  vr_nvff_array #(.W(DW), .DEPTH(BANK_DEPTH), .NDOM(4), .SEED(202)) u_bank1 (
    .clk, .ctrl(ctrl1), .pwr_on({4{pwr_on}}),
    .a_addr(x_addr), .a_we(x_we[1]), .a_wdata(x_wdata[1]), .a_rdata(x_rdata[1]),
    .b_addr(h_addr[DADDR_W-1:1]), .b_we(h_we && h_addr[0]), .b_wdata(h_wdata),
    .b_rdata(hr[1]), .q_all(unused_q1), .cmp_out(cmp_out[8:5]),
    .store_bit_cycles(sbc[1]), .verify_bits(vb[1])
  );

  assign h_rdata          = hr[h_addr[0]];
  assign store_bit_cycles = sbc[0] + sbc[1];
  assign verify_bits      = vb[0] + vb[1];

endmodule
