// pe_array: the 12-column by 8-row PE array with pipeline registers.
//
// Row 0 takes its inputs from the fetch registers; every other row from
// the pipeline register under it. Pipeline registers 0..6 sit after rows
// 0..6, so a result leaves row 7 (combinationally, on out) seven enabled
// clock edges after the fetch registers were loaded; the gather registers
// outside capture it on the eighth. PE(r,c) receives, from the stage below,
// channels 0 and 1 of column c and channel 0 of columns c-1 and c+1 (zero at
// the array edge). For row 0 both south channels are fetch register c.
// cfg and consts come from the active hardware context. Array size and
// per-row pipelining follow the architecture; the neighbour wiring is this
// design's choice.
module pe_array
  import nvcma_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] fetch  [COLS],
  input  pe_cfg_t       cfg    [ROWS][COLS],
  input  logic [DW-1:0] consts [NCONST],
  output logic [DW-1:0] out    [COLS]
);

  logic [DW-1:0] in0 [ROWS][COLS];   // south channel 0 into each row
  logic [DW-1:0] in1 [ROWS][COLS];   // south channel 1 into each row
  logic [DW-1:0] o0  [ROWS][COLS];   // PE channel 0 outputs
  logic [DW-1:0] o1  [ROWS][COLS];   // PE channel 1 outputs

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    if (r == 0) begin : g_first
      assign in0[0] = fetch;
      assign in1[0] = fetch;
    end else begin : g_pipe
      pipeline_reg_row u_preg (
        .clk, .rst_n, .en,
        .d0(o0[r-1]), .d1(o1[r-1]),
        .q0(in0[r]),  .q1(in1[r])
      );
    end
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [DW-1:0] wv, ev;
      if (c == 0) begin : g_w0
        assign wv = '0;
      end else begin : g_w
        assign wv = in0[r][c-1];
      end
      if (c == COLS - 1) begin : g_e0
        assign ev = '0;
      end else begin : g_e
        assign ev = in0[r][c+1];
      end
      pe u_pe (
        .cfg (cfg[r][c]),
        .s0  (in0[r][c]),
        .s1  (in1[r][c]),
        .w   (wv),
        .e   (ev),
        .cval(consts[cfg[r][c].cidx]),
        .ch0 (o0[r][c]),
        .ch1 (o1[r][c])
      );
    end
  end

  assign out = o0[ROWS-1];

endmodule
