// pe: one processing element of the array, an ALU plus a switching element.
//
// Inputs are the two channels coming up from the south (s0, s1) and
// channel 0 of the south-west and south-east neighbours (w, e), all taken
// from the pipeline register below (or the fetch registers for row 0), so
// the array has no combinational loops. Operand A and B each select one of
// s0, s1, w, e, the PE's constant register or zero; channel 0 carries the
// ALU result and channel 1 the switching element's selection: one of the
// same inputs, or (SRC_ALU) the ALU result, so a result can travel on both
// channels.
// Purely combinational; the configuration word is pe_cfg_t. Two output
// channels per PE mirror the two-channel interconnect; the ALU operation
// set, the source encoding and the diagonal neighbour wiring are this
// design's choices.
module pe
  import nvcma_pkg::*;
(
  input  pe_cfg_t        cfg,
  input  logic [DW-1:0]  s0,
  input  logic [DW-1:0]  s1,
  input  logic [DW-1:0]  w,
  input  logic [DW-1:0]  e,
  input  logic [DW-1:0]  cval,
  output logic [DW-1:0]  ch0,
  output logic [DW-1:0]  ch1
);

  function automatic logic [DW-1:0] pick(src_e s, logic [DW-1:0] a0, logic [DW-1:0] a1,
                                         logic [DW-1:0] aw, logic [DW-1:0] ae,
                                         logic [DW-1:0] ac);
    case (s)
      SRC_S0:    return a0;
      SRC_S1:    return a1;
      SRC_W:     return aw;
      SRC_E:     return ae;
      SRC_CONST: return ac;
      default:   return '0;
    endcase
  endfunction

  logic [DW-1:0] a, b;
  logic [4:0]    sh;

  always_comb begin
    a  = pick(cfg.opa, s0, s1, w, e, cval);
    b  = pick(cfg.opb, s0, s1, w, e, cval);
    sh = b[4:0];
    case (cfg.op)
      ALU_ADD:   ch0 = a + b;
      ALU_SUB:   ch0 = a - b;
      ALU_AND:   ch0 = a & b;
      ALU_OR:    ch0 = a | b;
      ALU_XOR:   ch0 = a ^ b;
      ALU_SLL:   ch0 = a << sh;
      ALU_SRL:   ch0 = a >> sh;
      ALU_SRA:   ch0 = DW'($signed(a) >>> sh);
      ALU_PASSA: ch0 = a;
      ALU_PASSB: ch0 = b;
      ALU_SLT:   ch0 = DW'($signed(a) < $signed(b));
      ALU_EQ:    ch0 = DW'(a == b);
      ALU_MIN:   ch0 = ($signed(a) < $signed(b)) ? a : b;
      ALU_MAX:   ch0 = ($signed(a) < $signed(b)) ? b : a;
      default:   ch0 = '0;
    endcase
    ch1 = (cfg.se == SRC_ALU) ? ch0 : pick(cfg.se, s0, s1, w, e, cval);
  end

endmodule
