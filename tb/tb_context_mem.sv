// tb_context_mem: writes a random context image through the host port and
// checks the decoded PE configurations, constants and permutation tables;
// then stores it to the NVFFs, cuts the context's power, restores and
// checks the image again.
module tb_context_mem;
  import nvcma_pkg::*;

  localparam int NDOM = 3;
  logic clk = 0;
  nvff_ctrl_t ctrl [NDOM];
  logic pwr_on = 1, we = 0;
  logic [CTX_ADDR_W-1:0] addr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  pe_cfg_t cfg [ROWS][COLS];
  logic [DW-1:0] consts [NCONST];
  logic [3:0] fperm [COLS], gperm [COLS];
  logic [NDOM-1:0] cmp_out;
  longint unsigned store_bit_cycles, verify_bits;

  logic [DW-1:0] img [CTX_WORDS];
  int checks = 0, failures = 0;

  context_mem #(.NDOM(NDOM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_image();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (cfg[r][c] !== pe_cfg_t'(img[r*COLS+c][16:0])) failures++;
      end
    for (int k = 0; k < NCONST; k++) begin
      checks++;
      if (consts[k] !== img[96 + k]) failures++;
    end
    for (int c = 0; c < COLS; c++) begin
      checks += 2;
      if (fperm[c] !== img[112 + c / 6][(c % 6) * 4 +: 4]) failures++;
      if (gperm[c] !== img[114 + c / 6][(c % 6) * 4 +: 4]) failures++;
    end
  endtask

  task automatic all_ctrl(nvff_ctrl_t c, int n);
    @(negedge clk);
    for (int d = 0; d < NDOM; d++) ctrl[d] = c;
    repeat (n) @(negedge clk);
    for (int d = 0; d < NDOM; d++) ctrl[d] = NVFF_CTRL_RESET;
  endtask

  initial begin
    nvff_ctrl_t c;
    for (int d = 0; d < NDOM; d++) ctrl[d] = NVFF_CTRL_RESET;
    for (int i = 0; i < CTX_WORDS; i++) begin
      @(negedge clk);
      we = 1; addr = 7'(i); wdata = DW'({$urandom, $urandom}); img[i] = wdata;
    end
    @(negedge clk); we = 0;
    check_image();
    addr = 7'(100); #1;
    checks++; if (rdata !== img[100]) failures++;
    // long store of all domains, power cut, restore
    c = NVFF_CTRL_RESET; c.sr1 = 1; c.ctrl = 1;
    all_ctrl(c, 4);
    @(negedge clk); pwr_on = 0;
    @(negedge clk); pwr_on = 1; #1;
    checks++; if (consts[3] !== '0) failures++;
    c = NVFF_CTRL_RESET; c.sr3 = 1; c.sb_n = 0;
    all_ctrl(c, 1);
    check_image();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
