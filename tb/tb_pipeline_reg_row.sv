// tb_pipeline_reg_row: checks reset, capture on enabled edges and holding
// while the enable is low.
module tb_pipeline_reg_row;
  import nvcma_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [DW-1:0] d0 [COLS], d1 [COLS], q0 [COLS], q1 [COLS];
  logic [DW-1:0] m0 [COLS], m1 [COLS];
  int checks = 0, failures = 0;

  pipeline_reg_row dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    for (int c = 0; c < COLS; c++) begin
      checks += 2;
      if (q0[c] !== m0[c]) failures++;
      if (q1[c] !== m1[c]) failures++;
    end
  endtask

  initial begin
    for (int c = 0; c < COLS; c++) begin d0[c] = rand_w(); d1[c] = rand_w(); m0[c] = 0; m1[c] = 0; end
    #12;
    cmp();
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      for (int c = 0; c < COLS; c++) begin d0[c] = rand_w(); d1[c] = rand_w(); end
      if (en) begin m0 = d0; m1 = d1; end
      @(negedge clk);
      en = 0;
      cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
