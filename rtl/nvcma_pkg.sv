// nvcma_pkg: sizes, types and encodings shared by the NVCMA/MC blocks.
//
// The array is 12 columns by 8 rows of processing elements, with four
// hardware contexts, 24 NVFF store domains and 6 power domains; those
// numbers follow the architecture. The data width (25 bits), the memory
// depths, the PE configuration word, the instruction encoding and the
// assignment of store domains to memories are this design's own choices.
package nvcma_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int DW         = 25;   // data path width (bits)
  localparam int COLS       = 12;   // PE columns
  localparam int ROWS       = 8;    // PE rows
  localparam int NCTX       = 4;    // hardware contexts
  localparam int NSD        = 24;   // NVFF store domains
  localparam int NPD        = 6;    // power domains
  localparam int NCONST     = 16;   // constant registers per context
  localparam int NCTRL      = 10;   // NVFF control signals per store domain
  localparam int BANK_DEPTH = 256;  // words per data-memory bank (2 banks)
  localparam int DADDR_W    = 9;    // data-memory word address (2 x 256)
  localparam int IW         = 32;   // instruction width
  localparam int IMEM_DEPTH = 256;  // instruction words
  localparam int IADDR_W    = 8;

  // Context memory layout, in DW-bit words.
  localparam int CTX_PE_WORDS = ROWS * COLS;            // one config word per PE
  localparam int CTX_CONST0   = CTX_PE_WORDS;           // 16 constants
  localparam int CTX_FPERM0   = CTX_CONST0 + NCONST;    // 2 words fetch permutation
  localparam int CTX_GPERM0   = CTX_FPERM0 + 2;         // 2 words gather permutation
  localparam int CTX_WORDS    = CTX_GPERM0 + 2;         // 116
  localparam int CTX_ADDR_W   = 7;

  // Store domain map: 9 data memory, 2 instruction memory, 13 contexts.
  localparam int SD_DMEM0 = 0;   // bank 0: 0..4, bank 1: 5..8
  localparam int SD_IMEM0 = 9;   // 9..10
  localparam int SD_CTX0  = 11;  // context 0: 11..14 (4 domains)
  localparam int SD_CTX1  = 15;  // context 1: 15..17
  localparam int SD_CTX2  = 18;  // context 2: 18..20
  localparam int SD_CTX3  = 21;  // context 3: 21..23

  // Power domains (index k is PDk+1): 0 imem, 1..4 contexts 0..3, 5 dmem.
  localparam int PD_IMEM = 0;
  localparam int PD_CTX0 = 1;
  localparam int PD_DMEM = 5;

  function automatic int sd_to_pd(int sd);
    if (sd < SD_IMEM0)      return PD_DMEM;
    else if (sd < SD_CTX0)  return PD_IMEM;
    else if (sd < SD_CTX1)  return PD_CTX0;
    else if (sd < SD_CTX2)  return PD_CTX0 + 1;
    else if (sd < SD_CTX3)  return PD_CTX0 + 2;
    else                    return PD_CTX0 + 3;
  endfunction

  // ------------------------------------------------ NVFF control signals
  // Bit order follows the order the signals are listed in: SR1 is bit 0.
  typedef struct packed {
    logic cg;      // 9: clock gating (1 = clock stopped, no writes)
    logic ps_en;   // 8: power switch enable (1 = powered)
    logic ctrl;    // 7: MTJ common line driven for a store
    logic lpga_n;  // 6: slave latch power (0 = gated, data lost)
    logic lpgb_n;  // 5: balloon latch power (0 = gated)
    logic rb_n;    // 4: 0 = read MTJ into balloon latch (with SR3)
    logic sb_n;    // 3: 0 = restore MTJ into slave latch (with SR3)
    logic sr3;     // 2: MTJ read path enable
    logic sr2;     // 1: verify gating: write only bits whose CMP_OUT is 1
    logic sr1;     // 0: store current enable
  } nvff_ctrl_t;

  localparam nvff_ctrl_t NVFF_CTRL_RESET = '{
    cg: 1'b0, ps_en: 1'b1, ctrl: 1'b0, lpga_n: 1'b1, lpgb_n: 1'b0,
    rb_n: 1'b1, sb_n: 1'b1, sr3: 1'b0, sr2: 1'b0, sr1: 1'b0};

  // Mask bits for the NVC instruction operand, same positions as above.
  localparam logic [NCTRL-1:0] M_SR1 = 10'h001, M_SR2 = 10'h002, M_SR3 = 10'h004,
                               M_SB_N = 10'h008, M_RB_N = 10'h010, M_LPGB_N = 10'h020,
                               M_LPGA_N = 10'h040, M_CTRL = 10'h080, M_PS_EN = 10'h100,
                               M_CG = 10'h200;

  // ------------------------------------------------------- PE configuration
  typedef enum logic [2:0] {
    SRC_S0 = 3'd0, SRC_S1 = 3'd1, SRC_W = 3'd2, SRC_E = 3'd3,
    SRC_CONST = 3'd4, SRC_ZERO = 3'd5, SRC_ALU = 3'd6  // SRC_ALU: switch only
  } src_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_SUB = 4'd1, ALU_AND = 4'd2, ALU_OR = 4'd3,
    ALU_XOR = 4'd4, ALU_SLL = 4'd5, ALU_SRL = 4'd6, ALU_SRA = 4'd7,
    ALU_PASSA = 4'd8, ALU_PASSB = 4'd9, ALU_SLT = 4'd10, ALU_EQ = 4'd11,
    ALU_MIN = 4'd12, ALU_MAX = 4'd13
  } alu_op_e;

  typedef struct packed {
    logic [3:0] cidx;   // constant register index
    src_e       se;     // switching element: source forwarded on channel 1
                        // (SRC_ALU forwards the ALU result)
    alu_op_e    op;     // ALU operation, result on channel 0
    src_e       opb;    // ALU operand B
    src_e       opa;    // ALU operand A
  } pe_cfg_t;           // 17 bits, stored in the low bits of a DW-bit word

  localparam int PE_CFG_W = $bits(pe_cfg_t);

  // ---------------------------------------------------------- instructions
  // [31:26] opcode, [25:23] rd, [22:20] rs, [23:0] or [15:0] immediate.
  typedef enum logic [5:0] {
    OP_NOP = 6'd0, OP_HALT = 6'd1, OP_LDI = 6'd2, OP_ADDI = 6'd3,
    OP_JMP = 6'd4, OP_BNZ = 6'd5, OP_SETBM = 6'd6, OP_NVC = 6'd7,
    OP_CBB = 6'd8, OP_BNW = 6'd9, OP_PGC = 6'd10, OP_PSE = 6'd11,
    OP_CTX = 6'd12, OP_LDF = 6'd13, OP_EXE = 6'd14, OP_STG = 6'd15,
    OP_WAIT = 6'd16
  } opcode_e;

  function automatic logic [IW-1:0] mk_i(opcode_e op, logic [2:0] rd, logic [2:0] rs,
                                        logic [19:0] imm);
    return {op, rd, rs, imm};
  endfunction

  // SETBM carries a 24-bit bitmap in [23:0].
  function automatic logic [IW-1:0] mk_bm(logic [NSD-1:0] bm);
    return {OP_SETBM, 2'b00, bm};
  endfunction

endpackage
