// tb_pg_ctrl: PGC writes, reset value and the external-control override.
module tb_pg_ctrl;
  import nvcma_pkg::*;

  logic clk = 0, rst_n = 0, pgc_en = 0, ext_sel = 0;
  logic [NPD-1:0] pgc_val = 0, ext_pd = 0, pgc_reg, pd_on;
  logic [NPD-1:0] model = '1;
  int checks = 0, failures = 0;

  pg_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    checks++; if (pd_on !== 6'b111111) failures++;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pgc_en  = $urandom_range(0, 1);
      pgc_val = 6'($urandom);
      ext_sel = ($urandom_range(0, 3) == 0);
      ext_pd  = 6'($urandom);
      if (pgc_en) model = pgc_val;
      @(negedge clk);
      pgc_en = 0;
      checks++;
      if (pd_on !== (ext_sel ? ext_pd : model)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
