// pipeline_reg_row: the pipeline register between two rows of PEs.
//
// Captures both output channels of every PE in a row on the rising clock
// edge while en is high, and holds them otherwise; en models the array
// clock, which runs only while the array executes. Reset (async, active
// low) clears the register. One register per row boundary follows the
// architecture; the enable and reset are this design's choices.
module pipeline_reg_row
  import nvcma_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] d0 [COLS],
  input  logic [DW-1:0] d1 [COLS],
  output logic [DW-1:0] q0 [COLS],
  output logic [DW-1:0] q1 [COLS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < COLS; c++) begin
        q0[c] <= '0;
        q1[c] <= '0;
      end
    end else if (en) begin
      q0 <= d0;
      q1 <= d1;
    end
  end

endmodule
