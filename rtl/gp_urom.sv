// gp_urom: microprogram store and instruction mapping tables.
//
// Holds the 32-bit microwords (type uword_t) that run every instruction,
// addressed by an 8-bit micro-PC (256 words x 32 bits = 1 Kbyte of store;
// this program uses 84 of them). The store is a combinational table
// written as a case statement, so it synthesizes to ROM logic.
//
// Besides the store, two mapping functions turn the instruction register
// into routine addresses:
//   disp_addr - the routine that starts an instruction after decode: for
//               memory-reference instructions it picks the operand routine
//               for the addressing mode (8-bit operand, 16-bit operand or
//               store address), or the branch/call/return routine; for
//               register and I/O instructions it is the execute word.
//   exec_addr - the execute word reached after the operand is in MD:
//               U_X_BASE + op-code.
// Op-codes missing from the tables run as no-operations.
//
// Every memory cycle reads or writes the byte at MA, so the microprogram
// moves PC or SP into MA before using them as addresses.
// Microprogram outline (every instruction starts with FETCH and DECODE):
//   FETCH   MA <- PC; IR <- [MA], PC++, MA++
//   DECODE  go to disp_addr
//   operand, immediate : MD_L <- [PC], PC++           (8-bit)
//                        MD <- [PC],[PC+1], PC += 2    (16-bit, high byte first)
//   operand, direct    : MD <- [PC],[PC+1], PC += 2; MA <- MD
//   operand, indirect  : MA <- Y
//   operand, based     : MD <- 0:[PC], PC++; MA <- BASE + MD
//   then MD_L <- [MA] (8-bit) or MD <- [MA],[MA+1] (16-bit); execute word.
//   branches           : MD <- 16-bit immediate; PC <- MD if the condition holds
//   CALL               : [SP] <- PC_H, [SP+1] <- PC_L, SP += 2, PC <- target
//   RET                : SP -= 2, PC <- [SP],[SP+1]
//   interrupt entry    : push PC as CALL does, PC <- interrupt vector
//   HALT               : wait for an interrupt
// The routines, field layout and encodings are this design's own; the
// published facts are the microword width, the store size and the
// instruction semantics.
module gp_urom
  import gp_pkg::*;
(
  input  logic [UADDR_BITS-1:0] upc,
  input  logic [7:0]            ir,
  output uword_t                uw,
  output logic [UADDR_BITS-1:0] disp_addr,
  output logic [UADDR_BITS-1:0] exec_addr
);

  // microword builder: fields not given default to "do nothing, next word"
  function automatic uword_t w(nx_e nx = NX_SEQ, mem_e mem = M_NONE,
                               pc_e pc = PC_HOLD, sp_e sp = SP_HOLD,
                               ma_e ma = MA_HOLD, yb_e yb = YB_NONE,
                               fn_e fn = F_NONE, cond_e cond = C_CF,
                               logic [7:0] jaddr = 8'h00);
    uword_t u;
    u.nx = nx; u.cond = cond; u.addr = jaddr; u.mem = mem; u.rsvd = 2'b00;
    u.pc = pc; u.sp = sp; u.ma = ma; u.yb = yb; u.fn = fn;
    return u;
  endfunction

  // ------------------------------------------------------------ store
  // A read from the instruction stream is "[MA], PC+1, MA+1": MA follows PC
  // from FETCH on, so consecutive operand bytes need no extra address step.
  always_comb begin
    unique case (upc)
      U_FETCH:        uw = w(.ma(MA_LD_PC));
      U_FETCH+8'd1:   uw = w(.mem(M_RD_IR), .pc(PC_INC), .ma(MA_INC));
      U_DECODE:       uw = w(.nx(NX_DISP));
      // interrupt entry: push the return address, jump to the vector
      U_INT:          uw = w(.ma(MA_LD_SP));
      U_INT+8'd1:     uw = w(.mem(M_WR_PCH), .sp(SP_INC), .ma(MA_INC));
      U_INT+8'd2:     uw = w(.nx(NX_END), .mem(M_WR_PCL), .sp(SP_INC), .pc(PC_LD_VEC));
      U_NOP:          uw = w(.nx(NX_END));
      U_HALT:         uw = w(.nx(NX_JCOND), .cond(C_IRQ), .jaddr(U_INT));
      U_HALT+8'd1:    uw = w(.nx(NX_JMP), .jaddr(U_HALT));
      // data phase shared by all addressing modes except immediate
      U_R8:           uw = w(.nx(NX_EXEC), .mem(M_RD_MDL));
      U_R16:          uw = w(.mem(M_RD_MDH), .ma(MA_INC));
      U_R16+8'd1:     uw = w(.nx(NX_EXEC), .mem(M_RD_MDL));
      U_W8:           uw = w(.nx(NX_END), .mem(M_WR_AC));
      // 8-bit operand
      U_D8_IMM:       uw = w(.nx(NX_EXEC), .mem(M_RD_MDL), .pc(PC_INC));
      U_D8_DIR:       uw = w(.mem(M_RD_MDH), .pc(PC_INC), .ma(MA_INC));
      U_D8_DIR+8'd1:  uw = w(.mem(M_RD_MDL), .pc(PC_INC));
      U_D8_DIR+8'd2:  uw = w(.nx(NX_JMP), .jaddr(U_R8), .ma(MA_LD_MD));
      U_D8_IND:       uw = w(.nx(NX_JMP), .jaddr(U_R8), .ma(MA_LD_Y));
      U_D8_BAS:       uw = w(.mem(M_RD_MDL_CLRH), .pc(PC_INC));
      U_D8_BAS+8'd1:  uw = w(.nx(NX_JMP), .jaddr(U_R8), .ma(MA_LD_BASEMD));
      // 16-bit operand
      U_D16_IMM:      uw = w(.mem(M_RD_MDH), .pc(PC_INC), .ma(MA_INC));
      U_D16_IMM+8'd1: uw = w(.nx(NX_EXEC), .mem(M_RD_MDL), .pc(PC_INC));
      U_D16_DIR:      uw = w(.mem(M_RD_MDH), .pc(PC_INC), .ma(MA_INC));
      U_D16_DIR+8'd1: uw = w(.mem(M_RD_MDL), .pc(PC_INC));
      U_D16_DIR+8'd2: uw = w(.nx(NX_JMP), .jaddr(U_R16), .ma(MA_LD_MD));
      U_D16_IND:      uw = w(.nx(NX_JMP), .jaddr(U_R16), .ma(MA_LD_Y));
      U_D16_BAS:      uw = w(.mem(M_RD_MDL_CLRH), .pc(PC_INC));
      U_D16_BAS+8'd1: uw = w(.nx(NX_JMP), .jaddr(U_R16), .ma(MA_LD_BASEMD));
      // store address
      U_ST_IMM:       uw = w(.nx(NX_END), .mem(M_WR_AC), .pc(PC_INC));
      U_ST_DIR:       uw = w(.mem(M_RD_MDH), .pc(PC_INC), .ma(MA_INC));
      U_ST_DIR+8'd1:  uw = w(.mem(M_RD_MDL), .pc(PC_INC));
      U_ST_DIR+8'd2:  uw = w(.nx(NX_JMP), .jaddr(U_W8), .ma(MA_LD_MD));
      U_ST_IND:       uw = w(.nx(NX_JMP), .jaddr(U_W8), .ma(MA_LD_Y));
      U_ST_BAS:       uw = w(.mem(M_RD_MDL_CLRH), .pc(PC_INC));
      U_ST_BAS+8'd1:  uw = w(.nx(NX_JMP), .jaddr(U_W8), .ma(MA_LD_BASEMD));
      // branches: 16-bit target follows the op-code
      U_BR:           uw = w(.mem(M_RD_MDH), .pc(PC_INC), .ma(MA_INC));
      U_BR+8'd1:      uw = w(.mem(M_RD_MDL), .pc(PC_INC));
      U_BR+8'd2:      uw = w(.nx(NX_END), .pc(PC_LD_MD));
      U_BC:           uw = w(.nx(NX_JCOND), .cond(C_CF),  .jaddr(U_BR));
      U_BC+8'd1:      uw = w(.pc(PC_INC));
      U_BC+8'd2:      uw = w(.nx(NX_END), .pc(PC_INC));
      U_BZ:           uw = w(.nx(NX_JCOND), .cond(C_ZF),  .jaddr(U_BR));
      U_BZ+8'd1:      uw = w(.pc(PC_INC));
      U_BZ+8'd2:      uw = w(.nx(NX_END), .pc(PC_INC));
      U_BY:           uw = w(.nx(NX_JCOND), .cond(C_YZF), .jaddr(U_BR));
      U_BY+8'd1:      uw = w(.pc(PC_INC));
      U_BY+8'd2:      uw = w(.nx(NX_END), .pc(PC_INC));
      U_CALL:         uw = w(.mem(M_RD_MDH), .pc(PC_INC), .ma(MA_INC));
      U_CALL+8'd1:    uw = w(.mem(M_RD_MDL), .pc(PC_INC));
      U_CALL+8'd2:    uw = w(.ma(MA_LD_SP));
      U_CALL+8'd3:    uw = w(.mem(M_WR_PCH), .sp(SP_INC), .ma(MA_INC));
      U_CALL+8'd4:    uw = w(.nx(NX_END), .mem(M_WR_PCL), .sp(SP_INC), .pc(PC_LD_MD));
      U_RET:          uw = w(.sp(SP_DEC));
      U_RET+8'd1:     uw = w(.sp(SP_DEC), .ma(MA_LD_SP));
      U_RET+8'd2:     uw = w(.mem(M_RD_MDL), .ma(MA_LD_SP));
      U_RET+8'd3:     uw = w(.mem(M_RD_MDH));
      U_RET+8'd4:     uw = w(.nx(NX_END), .pc(PC_LD_MD));
      // execute words of memory-reference instructions
      U_X_BASE+8'(OP_ADD):     uw = w(.nx(NX_END), .fn(F_ADD));
      U_X_BASE+8'(OP_AND):     uw = w(.nx(NX_END), .fn(F_AND));
      U_X_BASE+8'(OP_OR):      uw = w(.nx(NX_END), .fn(F_OR));
      U_X_BASE+8'(OP_CMP):     uw = w(.nx(NX_END), .fn(F_CMP));
      U_X_BASE+8'(OP_LDA):     uw = w(.nx(NX_END), .fn(F_LDA));
      U_X_BASE+8'(OP_LDSP):    uw = w(.nx(NX_END), .sp(SP_LD_MD));
      U_X_BASE+8'(OP_LDY):     uw = w(.nx(NX_END), .yb(YB_Y_LD));
      U_X_BASE+8'(OP_XOR):     uw = w(.nx(NX_END), .fn(F_XOR));
      U_X_BASE+8'(OP_LDB):     uw = w(.nx(NX_END), .yb(YB_BASE_LD));
      U_X_BASE+8'(OP_XOVRML):  uw = w(.nx(NX_END), .fn(F_XOVRML));
      U_X_BASE+8'(OP_XOVRMLM): uw = w(.nx(NX_END), .fn(F_XOVRMLM));
      U_X_BASE+8'(OP_XOVR2):   uw = w(.nx(NX_END), .fn(F_XOVR2));
      // register and I/O instructions: a single execute word each
      U_R_BASE+8'(RO_INC):  uw = w(.nx(NX_END), .yb(YB_Y_INC));
      U_R_BASE+8'(RO_COM):  uw = w(.nx(NX_END), .fn(F_COM));
      U_R_BASE+8'(RO_SHL):  uw = w(.nx(NX_END), .fn(F_SHL));
      U_R_BASE+8'(RO_SHR):  uw = w(.nx(NX_END), .fn(F_SHR));
      U_R_BASE+8'(RO_ROTL): uw = w(.nx(NX_END), .fn(F_ROTL));
      U_R_BASE+8'(RO_ROTR): uw = w(.nx(NX_END), .fn(F_ROTR));
      U_R_BASE+8'(RO_PIN):  uw = w(.nx(NX_END), .fn(F_PIN));
      U_R_BASE+8'(RO_SIN):  uw = w(.nx(NX_END), .fn(F_SIN));
      U_R_BASE+8'(RO_POUT): uw = w(.nx(NX_END), .fn(F_POUT));
      U_R_BASE+8'(RO_SOUT): uw = w(.nx(NX_END), .fn(F_SOUT));
      U_R_BASE+8'(RO_CC):   uw = w(.nx(NX_END), .fn(F_CC));
      U_R_BASE+8'(RO_HALT): uw = w(.nx(NX_JMP), .jaddr(U_HALT));
      U_R_BASE+8'(RO_INV):  uw = w(.nx(NX_END), .fn(F_INV));
      U_R_BASE+8'(RO_MUT1): uw = w(.nx(NX_END), .fn(F_MUT1));
      U_R_BASE+8'(RO_MUT2): uw = w(.nx(NX_END), .fn(F_MUT2));
      default:              uw = w(.nx(NX_END));
    endcase
  end

  // ------------------------------------------------------------ mapping
  logic [4:0] op;
  mode_e      mode;
  assign op   = ir[6:2];
  assign mode = mode_e'(ir[1:0]);

  function automatic logic [7:0] mode_route(mode_e md, logic [7:0] imm,
                                            logic [7:0] dir, logic [7:0] ind,
                                            logic [7:0] bas);
    unique case (md)
      MODE_IMM: return imm;
      MODE_DIR: return dir;
      MODE_IND: return ind;
      default:  return bas;
    endcase
  endfunction

  always_comb begin
    exec_addr = U_X_BASE + {3'b000, op};
    if (ir[7]) begin
      disp_addr = (op <= 5'(RO_MUT2)) ? U_R_BASE + {3'b000, op} : U_NOP;
    end else begin
      unique case (op)
        OP_ADD, OP_AND, OP_OR, OP_CMP, OP_LDA, OP_XOR,
        OP_XOVRML, OP_XOVRMLM, OP_XOVR2:
          disp_addr = mode_route(mode, U_D8_IMM, U_D8_DIR, U_D8_IND, U_D8_BAS);
        OP_LDSP, OP_LDY, OP_LDB:
          disp_addr = mode_route(mode, U_D16_IMM, U_D16_DIR, U_D16_IND, U_D16_BAS);
        OP_ST:   disp_addr = mode_route(mode, U_ST_IMM, U_ST_DIR, U_ST_IND, U_ST_BAS);
        OP_BR:   disp_addr = U_BR;
        OP_BC:   disp_addr = U_BC;
        OP_BZ:   disp_addr = U_BZ;
        OP_BY:   disp_addr = U_BY;
        OP_CALL: disp_addr = U_CALL;
        OP_RET:  disp_addr = U_RET;
        default: disp_addr = U_NOP;
      endcase
    end
  end

endmodule
