// data_manipulator: the permutation network between the data memory and
// the fetch/gather registers.
//
// Fetch direction: twelve consecutive data-memory words (mem_words[0] at the
// base address) are routed so that fetch register c receives
// mem_words[fperm[c]]. Gather direction: data-memory word base+j receives
// gather register gperm[j]. An index of 12 or more yields zero. Both
// directions are combinational; the permutation tables come from the
// active hardware context. A full 12x12 crossbar is this design's choice
// for the otherwise unspecified network.
module data_manipulator
  import nvcma_pkg::*;
(
  input  logic [DW-1:0] mem_words [COLS],
  input  logic [3:0]    fperm     [COLS],
  output logic [DW-1:0] fetch     [COLS],
  input  logic [DW-1:0] gather    [COLS],
  input  logic [3:0]    gperm     [COLS],
  output logic [DW-1:0] wb_words  [COLS]
);

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      fetch[c]    = (int'(fperm[c]) < COLS) ? mem_words[fperm[c]] : '0;
      wb_words[c] = (int'(gperm[c]) < COLS) ? gather[gperm[c]]    : '0;
    end
  end

endmodule
