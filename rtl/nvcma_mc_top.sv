// nvcma_mc_top: a multi-context coarse-grained reconfigurable array whose
// every storage element is a verify-and-retrievable non-volatile flip-flop.
//
// Data words are fetched from the interleaved data memory through the data
// manipulator into twelve fetch registers, pass through the 12 x 8 PE array
// (a pipeline register after each of the first seven rows) and are caught
// in the gather registers, then written back. Four hardware contexts each
// hold a full array configuration, constants and data-manipulator tables;
// one is active, chosen by the microcontroller's CTX instruction or, when
// ext_ctx_sel is high, by ext_ctx. The microcontroller also drives the
// control signals of 24 NVFF store domains (9 data memory, 2 instruction
// memory, 13 contexts) and the six power-domain enables, which an outside
// controller can take over (ext_pg_sel).
//
// Host port: with h_we high a word is written on the rising edge to the
// data memory (h_sel 0, word h_addr), the instruction memory (h_sel 1,
// h_addr[7:0]) or context h_ctx (h_sel 2, word h_addr[6:0]); h_rdata reads
// data-memory word h_addr combinationally. start launches the program at
// address 0; done rises at HALT. ext_wake ends a PSE pause.
// store_bit_cycles and verify_bits add up the NVFF energy proxies of all
// memories. Structure, sizes and the domain counts follow the
// architecture; the host port and the status outputs are this design's.
module nvcma_mc_top
  import nvcma_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               ext_wake,
  input  logic               ext_ctx_sel,
  input  logic [1:0]         ext_ctx,
  input  logic               ext_pg_sel,
  input  logic [NPD-1:0]     ext_pd,
  input  logic               h_we,
  input  logic [1:0]         h_sel,
  input  logic [1:0]         h_ctx,
  input  logic [DADDR_W-1:0] h_addr,
  input  logic [IW-1:0]      h_wdata,
  output logic [DW-1:0]      h_rdata,
  output logic               done,
  output logic               running,
  output logic               paused,
  output logic [1:0]         active_ctx,
  output logic [NPD-1:0]     pd_on,
  output logic [NSD-1:0]     bitmap,
  output logic [NSD-1:0]     flags,
  output logic [NSD-1:0]     sd_cmp,
  output nvff_ctrl_t         nv_ctrl [NSD],
  output logic               array_en,
  output logic [DW-1:0]      gather_q [COLS],
  output longint unsigned    store_bit_cycles,
  output longint unsigned    verify_bits
);

  localparam int CTX_SD0 [NCTX] = '{SD_CTX0, SD_CTX1, SD_CTX2, SD_CTX3};
  localparam int CTX_ND  [NCTX] = '{SD_CTX1 - SD_CTX0, SD_CTX2 - SD_CTX1,
                                    SD_CTX3 - SD_CTX2, NSD - SD_CTX3};

  // ------------------------------------------------------------ microcontroller
  logic [IADDR_W-1:0] imem_addr;
  logic [IW-1:0]      imem_rdata;
  logic               pgc_en;
  logic [NPD-1:0]     pgc_val, pgc_reg;
  logic [1:0]         uc_ctx;
  logic               ldf_start, stg_start, exe_start, xfer_busy;
  logic [DADDR_W-1:0] xfer_base;
  logic [15:0]        exe_cycles;

  nvcma_uc u_uc (
    .clk, .rst_n, .start, .ext_wake, .done, .running, .paused,
    .imem_addr, .imem_rdata,
    .cmp_in(sd_cmp), .nv_ctrl, .bitmap, .flags,
    .pgc_en, .pgc_val, .ctx(uc_ctx),
    .ldf_start, .stg_start, .exe_start, .xfer_base, .exe_cycles, .xfer_busy
  );

  pg_ctrl u_pg (
    .clk, .rst_n, .pgc_en, .pgc_val,
    .ext_sel(ext_pg_sel), .ext_pd, .pgc_reg, .pd_on
  );

  assign active_ctx = ext_ctx_sel ? ext_ctx : uc_ctx;

  // --------------------------------------------------------- instruction memory
  nvff_ctrl_t         imem_ctrl [2];
  logic [IW-1:0]      imem_unused_b;
  logic [IMEM_DEPTH*IW-1:0] imem_unused_q;
  longint unsigned    sbc_imem, vb_imem;

  assign imem_ctrl[0] = nv_ctrl[SD_IMEM0];
  assign imem_ctrl[1] = nv_ctrl[SD_IMEM0 + 1];

  vr_nvff_array #(.W(IW), .DEPTH(IMEM_DEPTH), .NDOM(2), .SEED(303)) u_imem (
    .clk, .ctrl(imem_ctrl), .pwr_on({2{pd_on[PD_IMEM]}}),
    .a_addr(imem_addr), .a_we(1'b0), .a_wdata('0), .a_rdata(imem_rdata),
    .b_addr(h_addr[IADDR_W-1:0]), .b_we(h_we && h_sel == 2'd1), .b_wdata(h_wdata),
    .b_rdata(imem_unused_b), .q_all(imem_unused_q),
    .cmp_out(sd_cmp[SD_IMEM0 +: 2]),
    .store_bit_cycles(sbc_imem), .verify_bits(vb_imem)
  );

  // ---------------------------------------------------------------- data memory
  nvff_ctrl_t         dmem_ctrl [9];
  logic [DADDR_W-2:0] x_addr;
  logic [1:0]         x_we;
  logic [DW-1:0]      x_wdata [2];
  logic [DW-1:0]      x_rdata [2];
  longint unsigned    sbc_dmem, vb_dmem;

  always_comb for (int d = 0; d < 9; d++) dmem_ctrl[d] = nv_ctrl[SD_DMEM0 + d];

  dmem u_dmem (
    .clk, .ctrl(dmem_ctrl), .pwr_on(pd_on[PD_DMEM]),
    .x_addr, .x_we, .x_wdata, .x_rdata,
    .h_addr, .h_we(h_we && h_sel == 2'd0), .h_wdata(h_wdata[DW-1:0]), .h_rdata,
    .cmp_out(sd_cmp[SD_DMEM0 +: 9]),
    .store_bit_cycles(sbc_dmem), .verify_bits(vb_dmem)
  );

  // ------------------------------------------------------------------- contexts
  pe_cfg_t         c_cfg    [NCTX][ROWS][COLS];
  logic [DW-1:0]   c_consts [NCTX][NCONST];
  logic [3:0]      c_fperm  [NCTX][COLS];
  logic [3:0]      c_gperm  [NCTX][COLS];
  longint unsigned sbc_ctx  [NCTX];
  longint unsigned vb_ctx   [NCTX];

  for (genvar k = 0; k < NCTX; k++) begin : g_ctx
    localparam int ND  = CTX_ND[k];
    localparam int SD0 = CTX_SD0[k];
    nvff_ctrl_t    cctrl [ND];
    logic [DW-1:0] unused_rd;
    for (genvar d = 0; d < ND; d++) begin : g_d
      assign cctrl[d] = nv_ctrl[SD0 + d];
    end
    context_mem #(.NDOM(ND), .SEED(1000 + k)) u_ctx (
      .clk, .ctrl(cctrl), .pwr_on(pd_on[PD_CTX0 + k]),
      .we(h_we && h_sel == 2'd2 && h_ctx == 2'(k)),
      .addr(h_addr[CTX_ADDR_W-1:0]), .wdata(h_wdata[DW-1:0]), .rdata(unused_rd),
      .cfg(c_cfg[k]), .consts(c_consts[k]), .fperm(c_fperm[k]), .gperm(c_gperm[k]),
      .cmp_out(sd_cmp[SD0 +: ND]),
      .store_bit_cycles(sbc_ctx[k]), .verify_bits(vb_ctx[k])
    );
  end

  // ------------------------------------------------------- transfer and array
  logic [DW-1:0] fetch_q   [COLS];
  logic [DW-1:0] array_out [COLS];

  cma_xfer u_xfer (
    .clk, .rst_n, .ldf_start, .stg_start, .exe_start,
    .base(xfer_base), .exe_cycles, .busy(xfer_busy),
    .x_addr, .x_we, .x_wdata, .x_rdata,
    .fperm(c_fperm[active_ctx]), .gperm(c_gperm[active_ctx]),
    .array_en, .fetch_q, .array_out, .gather_q
  );

  pe_array u_array (
    .clk, .rst_n, .en(array_en), .fetch(fetch_q),
    .cfg(c_cfg[active_ctx]), .consts(c_consts[active_ctx]), .out(array_out)
  );

  assign store_bit_cycles = sbc_imem + sbc_dmem + sbc_ctx[0] + sbc_ctx[1] + sbc_ctx[2] + sbc_ctx[3];
  assign verify_bits      = vb_imem + vb_dmem + vb_ctx[0] + vb_ctx[1] + vb_ctx[2] + vb_ctx[3];

endmodule
