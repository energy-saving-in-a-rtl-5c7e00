// tb_data_manipulator: random permutation tables (including out-of-range
// entries) for both directions, checked against direct indexing.
module tb_data_manipulator;
  import nvcma_pkg::*;
  import tb_ref_pkg::*;

  logic [DW-1:0] mem_words [COLS], fetch [COLS], gather [COLS], wb_words [COLS];
  logic [3:0]    fperm [COLS], gperm [COLS];
  int checks = 0, failures = 0;

  data_manipulator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int c = 0; c < COLS; c++) begin
        mem_words[c] = rand_w();
        gather[c]    = rand_w();
        fperm[c]     = 4'($urandom_range(0, 15));
        gperm[c]     = 4'($urandom_range(0, 15));
        if (i == 0) begin fperm[c] = 4'(COLS - 1 - c); gperm[c] = 4'(c); end
      end
      #1;
      for (int c = 0; c < COLS; c++) begin
        checks += 2;
        if (fetch[c] !== (fperm[c] < 12 ? mem_words[fperm[c]] : '0)) failures++;
        if (wb_words[c] !== (gperm[c] < 12 ? gather[gperm[c]] : '0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
