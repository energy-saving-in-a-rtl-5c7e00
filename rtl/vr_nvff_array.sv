// vr_nvff_array: behavioural model (not synthesizable logic) of a memory
// built from verify-and-retrievable non-volatile flip-flops (VR-NVFFs).
//
// Each bit is a volatile slave latch backed by a complementary MTJ pair and
// a "balloon" latch that reads the MTJ back. The bits are split into NDOM
// store domains (word i belongs to domain i*NDOM/DEPTH); all bits of a
// domain share one set of ten control signals (nvcma_pkg::nvff_ctrl_t).
// Per clock edge, for a powered domain (pwr_on & PS_EN):
//   SR3 & !SB_N            restore: slave latch <= MTJ
//   SR3 & !RB_N & LPGB_N   verify read: balloon latch <= MTJ
//   SR1 & CTRL             store current; with SR2 set only bits whose
//                          CMP_OUT is 1 (MTJ differs from slave) draw current
//   CMP_OUT(bit)           LPGB_N & (balloon ^ slave); per domain the OR
// A bit's MTJ takes the slave value once store current has flowed for its
// required number of cycles. That number comes from a fixed hash of the
// bit index: about 31 of 32 bits switch within one cycle, the rest need
// 2..4 cycles. At the 28 MHz clock (35.7 ns) that matches the measured
// pass-rate shape: most bits store within 35 ns, all within 140 ns.
// An unpowered domain, or one whose slave latch is gated (LPGA_N low),
// loses its volatile data (reads 0); the MTJs keep theirs.
// Two ports (A, B) read combinationally and write on the clock edge while
// the domain is powered and its clock is not gated (CG low); B wins a
// same-word conflict. q_all shows every word for wide readers.
// store_bit_cycles counts bit-cycles of store current and verify_bits the
// bits read by verify operations, as an energy proxy.
// The signal semantics of SR1..CTRL are this model's reading of the cell
// schematic; the hashing of write times is a modelling choice.
module vr_nvff_array
  import nvcma_pkg::*;
#(
  parameter int          W     = 25,
  parameter int          DEPTH = 64,
  parameter int          NDOM  = 2,
  parameter int unsigned SEED  = 1
) (
  input  logic                     clk,
  input  nvff_ctrl_t               ctrl    [NDOM],
  input  logic [NDOM-1:0]          pwr_on,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [W-1:0]             a_wdata,
  output logic [W-1:0]             a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  logic [W-1:0]             b_wdata,
  output logic [W-1:0]             b_rdata,
  output logic [DEPTH*W-1:0]       q_all,
  output logic [NDOM-1:0]          cmp_out,
  output longint unsigned          store_bit_cycles,
  output longint unsigned          verify_bits
);

  logic [W-1:0] slave   [DEPTH];
  logic [W-1:0] mtj     [DEPTH];
  logic [W-1:0] balloon [DEPTH];
  logic [2:0]   cnt     [DEPTH][W];
  logic [2:0]   need    [DEPTH][W];

  function automatic int dom_of(int i);
    return (i * NDOM) / DEPTH;
  endfunction

  function automatic logic [2:0] need_cycles(int i, int b);
    logic [31:0] h;
    h = 32'(i * W + b) * 32'h9E37_79B1 + SEED * 32'h85EB_CA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    if (h[4:0] != 5'd0) return 3'd1;
    return 3'd2 + 3'(h[9:8] % 3);
  endfunction

  initial begin
    store_bit_cycles = 0;
    verify_bits      = 0;
    for (int i = 0; i < DEPTH; i++) begin
      slave[i]   = '0;
      mtj[i]     = '0;
      balloon[i] = '0;
      for (int b = 0; b < W; b++) begin
        cnt[i][b]  = '0;
        need[i][b] = need_cycles(i, b);
      end
    end
  end

  function automatic logic powered(int d);
    return pwr_on[d] && ctrl[d].ps_en;
  endfunction

  always_comb begin
    a_rdata = slave[a_addr];
    b_rdata = slave[b_addr];
    for (int i = 0; i < DEPTH; i++) q_all[i*W +: W] = slave[i];
    cmp_out = '0;
    for (int i = 0; i < DEPTH; i++)
      if (ctrl[dom_of(i)].lpgb_n && powered(dom_of(i)))
        cmp_out[dom_of(i)] = cmp_out[dom_of(i)] | (|(balloon[i] ^ slave[i]));
  end

  always @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      automatic int         d   = dom_of(i);
      automatic nvff_ctrl_t c   = ctrl[d];
      automatic logic [W-1:0] cmp = c.lpgb_n ? (balloon[i] ^ slave[i]) : '0;
      if (!powered(d)) begin
        slave[i]   <= '0;
        balloon[i] <= '0;
        for (int b = 0; b < W; b++) cnt[i][b] <= '0;
      end else begin
        // store
        for (int b = 0; b < W; b++) begin
          if (c.sr1 && c.ctrl && (!c.sr2 || cmp[b])) begin
            store_bit_cycles++;
            if (cnt[i][b] + 3'd1 >= need[i][b]) mtj[i][b] <= slave[i][b];
            if (cnt[i][b] != 3'd7) cnt[i][b] <= cnt[i][b] + 3'd1;
          end else begin
            cnt[i][b] <= '0;
          end
        end
        // verify read into the balloon latch
        if (!c.lpgb_n) balloon[i] <= '0;
        else if (c.sr3 && !c.rb_n) begin
          balloon[i] <= mtj[i];
          verify_bits += 64'(W);
        end
        // slave latch: gated, restored or written
        if (!c.lpga_n) slave[i] <= '0;
        else if (c.sr3 && !c.sb_n) slave[i] <= mtj[i];
        else if (!c.cg) begin
          if (b_we && b_addr == i[$clog2(DEPTH)-1:0]) slave[i] <= b_wdata;
          else if (a_we && a_addr == i[$clog2(DEPTH)-1:0]) slave[i] <= a_wdata;
        end
      end
    end
  end

endmodule
