// tb_pe_array: random configurations of all 96 PEs and random constants,
// with a new fetch vector on every enabled clock. The output must equal the
// reference array function of the fetch vector applied seven enabled
// edges earlier (seven pipeline registers), and must hold while disabled.
module tb_pe_array;
  import nvcma_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [DW-1:0] fetch [COLS], consts [NCONST], out [COLS];
  pe_cfg_t cfg [ROWS][COLS];
  logic [DW-1:0] hist [$][COLS];
  logic [DW-1:0] expv [COLS];
  int checks = 0, failures = 0;

  pe_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_array(input logic [DW-1:0] f [COLS], output logic [DW-1:0] o [COLS]);
    logic [DW-1:0] a0 [COLS], a1 [COLS], n0 [COLS], n1 [COLS];
    a0 = f; a1 = f;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        logic [2*DW-1:0] v = ref_pe(cfg[r][c], a0[c], a1[c], c > 0 ? a0[c-1] : '0,
                                    c < COLS - 1 ? a0[c+1] : '0, consts[cfg[r][c].cidx]);
        n0[c] = v[DW-1:0];
        n1[c] = v[2*DW-1:DW];
      end
      a0 = n0; a1 = n1;
    end
    o = a0;
  endfunction

  task automatic check_out(logic [DW-1:0] e [COLS]);
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (out[c] !== e[c]) failures++;
    end
  endtask

  initial begin
    logic [DW-1:0] f0 [COLS], f1 [COLS], e0 [COLS], e1 [COLS];
    // Latency check: pass-through rows, last row adds a constant.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        cfg[r][c] = '{cidx: 4'(c), se: SRC_S1, op: (r == ROWS - 1) ? ALU_ADD : ALU_PASSA,
                      opb: SRC_CONST, opa: SRC_S0};
    for (int k = 0; k < NCONST; k++) consts[k] = rand_w();
    for (int c = 0; c < COLS; c++) begin f0[c] = rand_w(); f1[c] = rand_w(); end
    ref_array(f0, e0);
    ref_array(f1, e1);
    fetch = f0;
    #12 rst_n = 1;
    @(negedge clk); en = 1;
    repeat (7) @(negedge clk);
    en = 0; check_out(e0);
    fetch = f1; en = 1;
    repeat (6) @(negedge clk);
    en = 0; check_out(e0);           // not yet through after six edges
    repeat (3) @(negedge clk);
    check_out(e0);                   // held while the array clock is off
    en = 1; @(negedge clk); en = 0;
    check_out(e1);                   // seventh edge delivers it
    // Random configurations, streaming.
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) cfg[r][c] = rand_cfg();
      for (int k = 0; k < NCONST; k++) consts[k] = rand_w();
      hist.delete();
      en = 1;
      for (int i = 0; i < 40; i++) begin
        for (int c = 0; c < COLS; c++) fetch[c] = (i % 5 == 0) ? DW'($urandom_range(0, 40)) : rand_w();
        hist.push_back(fetch);
        @(negedge clk);
        if (hist.size() > 7) begin
          void'(hist.pop_front());
          ref_array(hist[0], expv);
          // out now reflects the fetch vector applied 7 edges ago
        end
        if (i >= 7) begin
          logic [DW-1:0] old [COLS];
          old = hist[0];
          ref_array(old, expv);
          check_out(expv);
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
