// nvcma_uc: the microcontroller that sequences the array and manages the
// non-volatile flip-flops and power gating.
//
// A one-instruction-per-clock machine with eight 16-bit registers (r0 reads
// as zero) and an 8-bit program counter, reading 32-bit instructions from
// the instruction memory combinationally. Besides basic RISC-style
// instructions (LDI, ADDI, JMP, BNZ, WAIT n) it has:
//   LDF rs / EXE n / STG rs : fetch twelve words at r[rs] into the fetch
//                       registers, run the array n clocks, write the
//                       gather registers back; it stalls until done.
//   SETBM imm24       : load the store-domain bitmap register.
//   NVC set, mask10   : set (bit 16 = 1) or reset the masked NVFF control
//                       bits of every domain selected in the bitmap.
//   CBB target        : clear the lowest bitmap bit; branch unless the
//                       bitmap became all zero.
//   BNW target        : capture CMP_OUT of the bitmap domains into their
//                       flag registers; branch if none needs writing.
//   PGC imm6          : write the six power-domain enables.
//   PSE n             : pause for n << PSE_SHIFT clocks, or until ext_wake.
//   CTX imm2          : select the active hardware context.
//   HALT              : stop and raise done; start restarts at address 0.
// NVC, CBB, PGC and PSE and their effects follow the architecture; the
// encoding, register file, BNW, the pause prescaler and all timing are
// this design's choices. A store pulse of n clocks is NVC-set, WAIT n-1,
// NVC-reset (a single clock when the two NVCs are adjacent).
module nvcma_uc
  import nvcma_pkg::*;
#(
  parameter int PSE_SHIFT = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               ext_wake,
  output logic               done,
  output logic               running,
  output logic               paused,
  // instruction memory
  output logic [IADDR_W-1:0] imem_addr,
  input  logic [IW-1:0]      imem_rdata,
  // NVFF management
  input  logic [NSD-1:0]     cmp_in,
  output nvff_ctrl_t         nv_ctrl [NSD],
  output logic [NSD-1:0]     bitmap,
  output logic [NSD-1:0]     flags,
  // power gating and contexts
  output logic               pgc_en,
  output logic [NPD-1:0]     pgc_val,
  output logic [1:0]         ctx,
  // transfer unit
  output logic               ldf_start,
  output logic               stg_start,
  output logic               exe_start,
  output logic [DADDR_W-1:0] xfer_base,
  output logic [15:0]        exe_cycles,
  input  logic               xfer_busy
);

  typedef enum logic [2:0] {U_IDLE, U_RUN, U_XWAIT, U_PAUSE, U_WAIT} ustate_e;

  ustate_e            st;
  logic [IADDR_W-1:0] pc;
  logic [15:0]        r [8];
  logic [31:0]        tcnt;

  opcode_e     op;
  logic [2:0]  rd, rs;
  logic [15:0] imm;
  logic [15:0] rsv;
  logic        exec;

  logic bm_load, nvc_en, cbb_en, cap_en;
  logic bm_nz, need_write;

  assign op   = opcode_e'(imem_rdata[31:26]);
  assign rd   = imem_rdata[25:23];
  assign rs   = imem_rdata[22:20];
  assign imm  = imem_rdata[15:0];
  assign rsv  = (rs == 3'd0) ? 16'd0 : r[rs];
  assign exec = (st == U_RUN);

  assign imem_addr = pc;
  assign running   = (st != U_IDLE);
  assign paused    = (st == U_PAUSE);

  assign bm_load    = exec && op == OP_SETBM;
  assign nvc_en     = exec && op == OP_NVC;
  assign cbb_en     = exec && op == OP_CBB;
  assign cap_en     = exec && op == OP_BNW;
  assign pgc_en     = exec && op == OP_PGC;
  assign pgc_val    = imem_rdata[NPD-1:0];
  assign ldf_start  = exec && op == OP_LDF;
  assign stg_start  = exec && op == OP_STG;
  assign exe_start  = exec && op == OP_EXE;
  assign xfer_base  = rsv[DADDR_W-1:0];
  assign exe_cycles = imm;

  nvff_ctrl_regs #(.N(NSD)) u_nvregs (
    .clk, .rst_n,
    .bm_load, .bm_wdata(imem_rdata[NSD-1:0]),
    .nvc_en, .nvc_set(imem_rdata[16]), .nvc_mask(imem_rdata[NCTRL-1:0]),
    .cbb_en, .cap_en, .cmp_in,
    .bitmap, .ctrl(nv_ctrl), .flags,
    .bm_after_cbb_nz(bm_nz), .need_write
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= U_IDLE;
      pc   <= '0;
      tcnt <= '0;
      done <= 1'b0;
      ctx  <= '0;
      for (int i = 0; i < 8; i++) r[i] <= '0;
    end else begin
      case (st)
        U_IDLE: if (start) begin
          st   <= U_RUN;
          pc   <= '0;
          done <= 1'b0;
        end
        U_RUN: begin
          pc <= pc + 1'b1;
          case (op)
            OP_HALT: begin st <= U_IDLE; done <= 1'b1; end
            OP_LDI:  r[rd] <= imm;
            OP_ADDI: r[rd] <= rsv + imm;
            OP_JMP:  pc <= imm[IADDR_W-1:0];
            OP_BNZ:  if (rsv != 16'd0) pc <= imm[IADDR_W-1:0];
            OP_CBB:  if (bm_nz) pc <= imm[IADDR_W-1:0];
            OP_BNW:  if (!need_write) pc <= imm[IADDR_W-1:0];
            OP_CTX:  ctx <= imem_rdata[1:0];
            OP_LDF, OP_STG, OP_EXE: st <= U_XWAIT;
            OP_PSE: begin
              st   <= U_PAUSE;
              tcnt <= 32'(imm) << PSE_SHIFT;
            end
            OP_WAIT: if (imm > 16'd1) begin
              st   <= U_WAIT;
              tcnt <= 32'(imm) - 32'd1;
            end
            default: ;
          endcase
        end
        U_XWAIT: if (!xfer_busy) st <= U_RUN;
        U_PAUSE: begin
          if (ext_wake || tcnt <= 32'd1) st <= U_RUN;
          tcnt <= tcnt - 32'd1;
        end
        U_WAIT: begin
          if (tcnt <= 32'd1) st <= U_RUN;
          tcnt <= tcnt - 32'd1;
        end
        default: st <= U_IDLE;
      endcase
      r[0] <= '0;
    end
  end

endmodule
