// tb_cma_xfer: the transfer unit against a two-bank memory model in the
// testbench and a stand-in array output. Checks the permuted fetch, the
// permuted write-back, the busy durations (LDF 7, STG 6, EXE n clocks)
// and that the gather registers load on the n-th execution clock.
module tb_cma_xfer;
  import nvcma_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ldf_start = 0, stg_start = 0, exe_start = 0, busy, array_en;
  logic [DADDR_W-1:0] base = 0;
  logic [15:0] exe_cycles = 0;
  logic [DADDR_W-2:0] x_addr;
  logic [1:0] x_we;
  logic [DW-1:0] x_wdata [2], x_rdata [2];
  logic [3:0] fperm [COLS], gperm [COLS];
  logic [DW-1:0] fetch_q [COLS], array_out [COLS], gather_q [COLS];

  logic [DW-1:0] mem [512];
  int en_count = 0;
  int checks = 0, failures = 0;

  cma_xfer dut (.*);
  always #5 clk = ~clk;

  // memory model: interleaved pair port
  assign x_rdata[0] = mem[{x_addr, 1'b0}];
  assign x_rdata[1] = mem[{x_addr, 1'b1}];
  always @(posedge clk) begin
    if (x_we[0]) mem[{x_addr, 1'b0}] <= x_wdata[0];
    if (x_we[1]) mem[{x_addr, 1'b1}] <= x_wdata[1];
  end
  // stand-in array: output depends on the number of enabled clocks seen
  always @(posedge clk) if (array_en) en_count <= en_count + 1;
  always_comb for (int c = 0; c < COLS; c++) array_out[c] = DW'(en_count * 100 + c) ^ fetch_q[c];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic go(ref logic s, output int cyc);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
    cyc = 0;
    while (busy) begin cyc++; @(negedge clk); end
  endtask

  initial begin
    int cyc, b, n0;
    logic [DW-1:0] fexp [COLS], gexp [COLS];
    for (int i = 0; i < 512; i++) mem[i] = DW'($urandom);
    for (int c = 0; c < COLS; c++) begin
      fperm[c] = 4'((c * 5) % COLS);
      gperm[c] = 4'((c * 7 + 3) % COLS);
    end
    fperm[11] = 4'd15;
    #12 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      b = 2 * $urandom_range(0, 240);
      base = 9'(b);
      go(ldf_start, cyc);
      checks++; if (cyc != 7) begin failures++; $display("LDF busy %0d", cyc); end
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (fetch_q[c] !== (fperm[c] < 12 ? mem[b + fperm[c]] : '0)) failures++;
      end
      exe_cycles = 16'(8 + t);
      n0 = en_count;
      go(exe_start, cyc);
      checks += 2;
      if (cyc != 8 + t) begin failures++; $display("EXE busy %0d", cyc); end
      if (en_count - n0 != 8 + t) failures++;
      for (int c = 0; c < COLS; c++) begin
        fexp[c] = DW'((en_count - 1) * 100 + c) ^ fetch_q[c];
        checks++;
        if (gather_q[c] !== fexp[c]) failures++;
      end
      for (int j = 0; j < COLS; j++) gexp[j] = gather_q[gperm[j]];
      b = 2 * $urandom_range(0, 240);
      base = 9'(b);
      go(stg_start, cyc);
      checks++; if (cyc != 6) begin failures++; $display("STG busy %0d", cyc); end
      @(negedge clk);
      for (int j = 0; j < COLS; j++) begin
        checks++;
        if (mem[b + j] !== gexp[j]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
