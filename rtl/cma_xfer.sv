// cma_xfer: fetch registers, gather registers and the transfer sequencer
// that moves data between the data memory and the PE array.
//
// ldf_start (LDF): reads the twelve words base..base+11 two per clock
// through the interleaved data-memory port (6 clocks), then loads the
// fetch registers through the data manipulator (1 clock): busy 7 clocks.
// exe_start (EXE n): enables the array clock for n clocks (n = 0 is taken
// as 1) and loads the gather registers from the array outputs on the n-th;
// with the array's seven pipeline registers, n must be at least 8 for the
// gather registers to see the current fetch data. stg_start (STG): writes
// the gather registers, permuted by the data manipulator, to
// base..base+11, two words per clock: busy 6 clocks. base must be even
// (bit 0 is ignored). Start pulses are accepted only when not busy.
// The fetch-compute-gather order and the multi-cycle execution follow the
// architecture; the clock counts are this design's.
module cma_xfer
  import nvcma_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ldf_start,
  input  logic               stg_start,
  input  logic               exe_start,
  input  logic [DADDR_W-1:0] base,
  input  logic [15:0]        exe_cycles,
  output logic               busy,
  // data memory transfer port
  output logic [DADDR_W-2:0] x_addr,
  output logic [1:0]         x_we,
  output logic [DW-1:0]      x_wdata [2],
  input  logic [DW-1:0]      x_rdata [2],
  // data manipulator tables of the active context
  input  logic [3:0]         fperm [COLS],
  input  logic [3:0]         gperm [COLS],
  // PE array
  output logic               array_en,
  output logic [DW-1:0]      fetch_q  [COLS],
  input  logic [DW-1:0]      array_out [COLS],
  output logic [DW-1:0]      gather_q [COLS]
);

  typedef enum logic [2:0] {S_IDLE, S_LDF_RD, S_LDF_LOAD, S_EXE, S_STG_WR} state_e;

  state_e             state;
  logic [2:0]         k;
  logic [15:0]        cnt;
  logic [DADDR_W-2:0] pair0;
  logic [DW-1:0]      rbuf   [COLS];
  logic [DW-1:0]      fperm_out [COLS];
  logic [DW-1:0]      wb     [COLS];

  data_manipulator u_dm (
    .mem_words(rbuf), .fperm, .fetch(fperm_out),
    .gather(gather_q), .gperm, .wb_words(wb)
  );

  assign busy     = (state != S_IDLE);
  assign array_en = (state == S_EXE);
  assign x_addr   = pair0 + (DADDR_W-1)'(k);
  assign x_we     = (state == S_STG_WR) ? 2'b11 : 2'b00;
  assign x_wdata[0] = wb[2 * k];
  assign x_wdata[1] = wb[2 * k + 1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      cnt   <= '0;
      pair0 <= '0;
      for (int c = 0; c < COLS; c++) begin
        rbuf[c]     <= '0;
        fetch_q[c]  <= '0;
        gather_q[c] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: begin
          k     <= '0;
          pair0 <= base[DADDR_W-1:1];
          if (ldf_start)      state <= S_LDF_RD;
          else if (stg_start) state <= S_STG_WR;
          else if (exe_start) begin
            state <= S_EXE;
            cnt   <= (exe_cycles == 16'd0) ? 16'd1 : exe_cycles;
          end
        end
        S_LDF_RD: begin
          rbuf[2 * k]     <= x_rdata[0];
          rbuf[2 * k + 1] <= x_rdata[1];
          if (k == 3'(COLS / 2 - 1)) state <= S_LDF_LOAD;
          else                       k <= k + 3'd1;
        end
        S_LDF_LOAD: begin
          fetch_q <= fperm_out;
          state   <= S_IDLE;
        end
        S_EXE: begin
          if (cnt == 16'd1) begin
            gather_q <= array_out;
            state    <= S_IDLE;
          end
          cnt <= cnt - 16'd1;
        end
        S_STG_WR: begin
          if (k == 3'(COLS / 2 - 1)) state <= S_IDLE;
          else                       k <= k + 3'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
