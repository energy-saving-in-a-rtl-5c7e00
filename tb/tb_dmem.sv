// tb_dmem: host writes of random words, pair reads and pair writes through
// the interleaved transfer port, host read-back, and a store / power cut /
// restore of all nine data-memory store domains.
module tb_dmem;
  import nvcma_pkg::*;

  logic clk = 0;
  nvff_ctrl_t ctrl [9];
  logic pwr_on = 1;
  logic [DADDR_W-2:0] x_addr = 0;
  logic [1:0] x_we = 0;
  logic [DW-1:0] x_wdata [2], x_rdata [2];
  logic [DADDR_W-1:0] h_addr = 0;
  logic h_we = 0;
  logic [DW-1:0] h_wdata = 0, h_rdata;
  logic [8:0] cmp_out;
  longint unsigned store_bit_cycles, verify_bits;

  logic [DW-1:0] img [512];
  int checks = 0, failures = 0;

  dmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_all(nvff_ctrl_t c, int n);
    @(negedge clk);
    for (int d = 0; d < 9; d++) ctrl[d] = c;
    repeat (n) @(negedge clk);
    for (int d = 0; d < 9; d++) ctrl[d] = NVFF_CTRL_RESET;
  endtask

  task automatic check_all();
    for (int p = 0; p < 256; p += 5) begin
      x_addr = 8'(p); #1;
      checks += 2;
      if (x_rdata[0] !== img[2*p] || x_rdata[1] !== img[2*p+1]) failures++;
      h_addr = 9'(2 * p + 1); #1;
      if (h_rdata !== img[2*p+1]) failures++;
    end
  endtask

  initial begin
    nvff_ctrl_t c;
    x_wdata[0] = 0; x_wdata[1] = 0;
    for (int d = 0; d < 9; d++) ctrl[d] = NVFF_CTRL_RESET;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); h_we = 1; h_addr = 9'(i); h_wdata = DW'({$urandom, $urandom}); img[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    check_all();
    for (int p = 10; p < 20; p++) begin
      @(negedge clk);
      x_addr = 8'(p); x_we = 2'($urandom_range(1, 3));
      x_wdata[0] = DW'($urandom); x_wdata[1] = DW'($urandom);
      if (x_we[0]) img[2*p] = x_wdata[0];
      if (x_we[1]) img[2*p+1] = x_wdata[1];
    end
    @(negedge clk); x_we = 0;
    check_all();
    for (int p = 10; p < 20; p++) begin
      x_addr = 8'(p); #1;
      checks++;
      if (x_rdata[0] !== img[2*p] || x_rdata[1] !== img[2*p+1]) failures++;
    end
    c = NVFF_CTRL_RESET; c.sr1 = 1; c.ctrl = 1;
    set_all(c, 4);
    @(negedge clk); pwr_on = 0;
    @(negedge clk); pwr_on = 1; h_addr = 9'd7; #1;
    checks++; if (h_rdata !== '0) failures++;
    c = NVFF_CTRL_RESET; c.sr3 = 1; c.sb_n = 0;
    set_all(c, 1);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
