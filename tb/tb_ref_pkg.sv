// tb_ref_pkg: reference models shared by the testbenches. They are written
// from the specification of each operation, independently of the RTL.
package tb_ref_pkg;
  import nvcma_pkg::*;

  function automatic logic [DW-1:0] ref_src(int s, logic [DW-1:0] s0, logic [DW-1:0] s1,
                                            logic [DW-1:0] w, logic [DW-1:0] e,
                                            logic [DW-1:0] c);
    if (s == 0) return s0;
    if (s == 1) return s1;
    if (s == 2) return w;
    if (s == 3) return e;
    if (s == 4) return c;
    return 0;
  endfunction

  function automatic longint sx(logic [DW-1:0] v);
    return v[DW-1] ? longint'(v) - (longint'(1) << DW) : longint'(v);
  endfunction

  function automatic logic [DW-1:0] ref_alu(int op, logic [DW-1:0] a, logic [DW-1:0] b);
    int sh = int'(b % 32);
    longint m = (longint'(1) << DW) - 1;
    case (op)
      0:  return DW'((longint'(a) + longint'(b)) & m);
      1:  return DW'((longint'(a) - longint'(b)) & m);
      2:  return a & b;
      3:  return a | b;
      4:  return a ^ b;
      5:  return (sh >= DW) ? '0 : DW'((longint'(a) << sh) & m);
      6:  return (sh >= DW) ? '0 : DW'(longint'(a) >> sh);
      7:  return DW'((sx(a) >>> ((sh >= DW) ? DW - 1 : sh)) & m);
      8:  return a;
      9:  return b;
      10: return (sx(a) < sx(b)) ? 1 : 0;
      11: return (a == b) ? 1 : 0;
      12: return (sx(a) < sx(b)) ? a : b;
      13: return (sx(a) < sx(b)) ? b : a;
      default: return 0;
    endcase
  endfunction

  // One PE: returns {ch1, ch0}.
  function automatic logic [2*DW-1:0] ref_pe(pe_cfg_t cfg, logic [DW-1:0] s0, logic [DW-1:0] s1,
                                             logic [DW-1:0] w, logic [DW-1:0] e,
                                             logic [DW-1:0] c);
    logic [DW-1:0] a = ref_src(int'(cfg.opa), s0, s1, w, e, c);
    logic [DW-1:0] b = ref_src(int'(cfg.opb), s0, s1, w, e, c);
    logic [DW-1:0] r = ref_alu(int'(cfg.op), a, b);
    return {(int'(cfg.se) == 6) ? r : ref_src(int'(cfg.se), s0, s1, w, e, c), r};
  endfunction

  function automatic pe_cfg_t rand_cfg();
    pe_cfg_t c;
    c.opa  = src_e'($urandom_range(0, 5));
    c.opb  = src_e'($urandom_range(0, 5));
    c.op   = alu_op_e'($urandom_range(0, 13));
    c.se   = src_e'($urandom_range(0, 6));
    c.cidx = 4'($urandom_range(0, 15));
    return c;
  endfunction

  function automatic logic [DW-1:0] rand_w();
    return DW'({$urandom, $urandom});
  endfunction
endpackage
