// tb_nvcma_uc: runs a short program on the microcontroller with a
// testbench instruction memory and a stand-in transfer unit. Checks a
// counted loop, NVC store pulses of one and four clocks, BNW taken and not
// taken with the captured flag, a CBB loop over three bitmap bits, PGC,
// CTX, a PSE pause that runs out (256 clocks) and one cut short by
// ext_wake, and LDF/EXE/STG stalls with their operands.
module tb_nvcma_uc;
  import nvcma_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ext_wake = 0;
  logic done, running, paused;
  logic [IADDR_W-1:0] imem_addr;
  logic [IW-1:0] imem_rdata;
  logic [NSD-1:0] cmp_in = 0, bitmap, flags;
  nvff_ctrl_t nv_ctrl [NSD];
  logic pgc_en;
  logic [NPD-1:0] pgc_val;
  logic [1:0] ctx;
  logic ldf_start, stg_start, exe_start, xfer_busy;
  logic [DADDR_W-1:0] xfer_base;
  logic [15:0] exe_cycles;

  logic [IW-1:0] prog [IMEM_DEPTH];
  int checks = 0, failures = 0;
  int xbusy = 0, cyc = 0;
  int addi_cnt = 0, cbb_cnt = 0, sr1_run = 0;
  int pulses [$];
  int pause_len [$];
  int prun = 0;
  int starts [$];
  logic [15:0] exe_seen = 0;
  logic [DADDR_W-1:0] base_seen = 0;
  logic [NPD-1:0] pgc_seen = 0;

  nvcma_uc dut (.*);
  always #5 clk = ~clk;
  assign imem_rdata = prog[imem_addr];
  assign xfer_busy  = (xbusy != 0);

  // stand-in transfer unit: busy 5 clocks per command
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (xbusy != 0) xbusy <= xbusy - 1;
    if (ldf_start || stg_start || exe_start) begin
      xbusy <= 5;
      starts.push_back({ldf_start, stg_start, exe_start});
      if (exe_start) exe_seen <= exe_cycles;
      if (ldf_start) base_seen <= xfer_base;
    end
    if (pgc_en) pgc_seen <= pgc_val;
    if (running && imem_addr == 8'd1) addi_cnt <= addi_cnt + 1;
    if (running && !paused && prog[imem_addr][31:26] == OP_CBB && imem_addr == 8'd10) cbb_cnt <= cbb_cnt + 1;
    if (nv_ctrl[0].sr1) sr1_run <= sr1_run + 1;
    else if (sr1_run != 0) begin pulses.push_back(sr1_run); sr1_run <= 0; end
    if (paused) prun <= prun + 1;
    else if (prun != 0) begin pause_len.push_back(prun); prun <= 0; end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int i = 0; i < IMEM_DEPTH; i++) prog[i] = mk_i(OP_NOP, 0, 0, 0);
    prog[0]  = mk_i(OP_LDI, 1, 0, 3);
    prog[1]  = mk_i(OP_ADDI, 1, 1, 16'hFFFF);
    prog[2]  = mk_i(OP_BNZ, 0, 1, 1);
    prog[3]  = mk_bm(24'b111);
    prog[4]  = mk_i(OP_NVC, 0, 0, 20'h10000 | 20'(M_SR1 | M_CTRL));
    prog[5]  = mk_i(OP_NVC, 0, 0, 20'(M_SR1 | M_CTRL));
    prog[6]  = mk_i(OP_NVC, 0, 0, 20'h10000 | 20'(M_SR1 | M_CTRL));
    prog[7]  = mk_i(OP_WAIT, 0, 0, 3);
    prog[8]  = mk_i(OP_NVC, 0, 0, 20'(M_SR1 | M_CTRL));
    prog[9]  = mk_i(OP_BNW, 0, 0, 13);
    prog[10] = mk_i(OP_CBB, 0, 0, 10);
    prog[11] = mk_bm(24'h000020);
    prog[12] = mk_i(OP_BNW, 0, 0, 14);
    prog[13] = mk_i(OP_CTX, 0, 0, 3);
    prog[14] = mk_i(OP_PGC, 0, 0, 6'b100011);
    prog[15] = mk_i(OP_CTX, 0, 0, 2);
    prog[16] = mk_i(OP_PSE, 0, 0, 1);
    prog[17] = mk_i(OP_PSE, 0, 0, 100);
    prog[18] = mk_i(OP_LDI, 2, 0, 24);
    prog[19] = mk_i(OP_LDF, 0, 2, 0);
    prog[20] = mk_i(OP_EXE, 0, 0, 10);
    prog[21] = mk_i(OP_STG, 0, 2, 0);
    prog[22] = mk_i(OP_HALT, 0, 0, 0);
    cmp_in = 24'b010;
    #12 rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // wait for the second pause, then wake it early
    wait (pause_len.size() == 1);
    wait (paused);
    repeat (50) @(negedge clk);
    ext_wake = 1; @(negedge clk); ext_wake = 0;
    wait (done);
    repeat (3) @(negedge clk);
    chk(addi_cnt == 3, $sformatf("loop ran %0d times", addi_cnt));
    chk(pulses.size() == 2 && pulses[0] == 1 && pulses[1] == 4, "store pulses 1 and 4 clocks");
    chk(flags == 24'b010, "flag captured for domain 1 only");
    chk(cbb_cnt == 3, $sformatf("CBB executed %0d times", cbb_cnt));
    chk(bitmap == 24'h000020, "bitmap after SETBM");
    chk(ctx == 2, "context 2 selected, CTX 3 skipped by BNW");
    chk(pgc_seen == 6'b100011, "PGC operand");
    chk(pause_len.size() == 2 && pause_len[0] == 256, "PSE 1 pauses 256 clocks");
    chk(pause_len.size() == 2 && pause_len[1] >= 50 && pause_len[1] <= 52, "ext_wake ends pause");
    chk(starts.size() == 3 && starts[0] == 3'b100 && starts[1] == 3'b001 && starts[2] == 3'b010, "LDF, EXE, STG issued in order");
    chk(base_seen == 9'd24 && exe_seen == 16'd10, "transfer operands");
    chk(nv_ctrl[0].sr1 == 0 && nv_ctrl[0].ctrl == 0 && nv_ctrl[3] == NVFF_CTRL_RESET, "control registers");
    chk(!running, "halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
