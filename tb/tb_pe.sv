// tb_pe: drives the PE with random configurations and operands and compares
// both channels against the reference ALU and switch model.
module tb_pe;
  import nvcma_pkg::*;
  import tb_ref_pkg::*;

  pe_cfg_t       cfg;
  logic [DW-1:0] s0, s1, w, e, cval, ch0, ch1;
  int checks = 0, failures = 0;

  pe dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*DW-1:0] exp;
    for (int i = 0; i < 4000; i++) begin
      cfg = rand_cfg();
      if (i < 14 * 6) begin  // every op with every operand-A source
        cfg.op  = alu_op_e'(i % 14);
        cfg.opa = src_e'(i / 14);
      end
      s0 = rand_w(); s1 = rand_w(); w = rand_w(); e = rand_w(); cval = rand_w();
      if (i % 7 == 0) s1 = DW'($urandom_range(0, 30));
      #1;
      exp = ref_pe(cfg, s0, s1, w, e, cval);
      checks += 2;
      if (ch0 !== exp[DW-1:0]) begin
        failures++;
        if (failures < 10) $display("ch0 mismatch op=%0d got %h exp %h", cfg.op, ch0, exp[DW-1:0]);
      end
      if (ch1 !== exp[2*DW-1:DW]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
