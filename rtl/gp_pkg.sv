// gp_pkg: types and constants shared by the genetic-instruction processor.
//
// The processor is an 8-bit accumulator machine with a 16-bit address space.
// Its instruction byte has two forms. Bit 7 = 0 is a memory-reference
// instruction: bits 6..2 hold the op-code and bits 1..0 the addressing mode
// (00 immediate, 01 direct, 10 register indirect, 11 register based). Bit 7 = 1
// is a register or I/O instruction with the op-code in bits 6..2. The op-code
// values follow the published instruction tables.
//
// Control is microprogrammed. A microword is 32 bits wide; its fields (next-
// address control, condition, jump address, memory operation, register
// operations and the accumulator function) are this design's own layout,
// since only the word width and store size are published. Every memory
// cycle uses MA as its address, as in the published datapath, so the
// microprogram first copies PC or SP into MA.
package gp_pkg;

  // ---------------------------------------------------------------- ISA
  typedef enum logic [1:0] {
    MODE_IMM  = 2'b00,   // operand follows the op-code byte
    MODE_DIR  = 2'b01,   // 16-bit address follows the op-code byte
    MODE_IND  = 2'b10,   // address is register Y
    MODE_BAS  = 2'b11    // address is BASE + 8-bit displacement
  } mode_e;

  // memory-reference op-codes (instruction bit 7 = 0)
  typedef enum logic [4:0] {
    OP_ADD     = 5'b00000,
    OP_AND     = 5'b00001,
    OP_OR      = 5'b00010,
    OP_CMP     = 5'b00011,
    OP_LDA     = 5'b00100,
    OP_LDSP    = 5'b00101,
    OP_LDY     = 5'b00110,
    OP_ST      = 5'b00111,
    OP_BR      = 5'b01000,
    OP_BC      = 5'b01001,
    OP_BZ      = 5'b01010,
    OP_BY      = 5'b01011,
    OP_CALL    = 5'b01100,
    OP_RET     = 5'b01101,
    OP_XOR     = 5'b01110,
    OP_LDB     = 5'b01111,
    OP_XOVRML  = 5'b10000,
    OP_XOVRMLM = 5'b10001,
    OP_XOVR2   = 5'b10010
  } mop_e;

  // register and I/O op-codes (instruction bit 7 = 1)
  typedef enum logic [4:0] {
    RO_INC  = 5'b00000,
    RO_COM  = 5'b00001,
    RO_SHL  = 5'b00010,
    RO_SHR  = 5'b00011,
    RO_ROTL = 5'b00100,
    RO_ROTR = 5'b00101,
    RO_PIN  = 5'b00110,
    RO_SIN  = 5'b00111,
    RO_POUT = 5'b01000,
    RO_SOUT = 5'b01001,
    RO_CC   = 5'b01010,
    RO_HALT = 5'b01011,
    RO_INV  = 5'b01100,
    RO_MUT1 = 5'b01101,
    RO_MUT2 = 5'b01110
  } rop_e;

  // ---------------------------------------------------------------- microword
  typedef enum logic [2:0] {
    NX_SEQ   = 3'd0,   // upc + 1
    NX_JMP   = 3'd1,   // addr
    NX_JCOND = 3'd2,   // condition ? addr : upc + 1
    NX_DISP  = 3'd3,   // first mapping: routine for op-code class and mode
    NX_EXEC  = 3'd4,   // second mapping: execute routine for the op-code
    NX_END   = 3'd5    // end of instruction: interrupt entry or fetch
  } nx_e;

  typedef enum logic [1:0] {
    C_CF  = 2'd0,
    C_ZF  = 2'd1,
    C_YZF = 2'd2,
    C_IRQ = 2'd3
  } cond_e;

  typedef enum logic [2:0] {
    M_NONE        = 3'd0,
    M_RD_IR       = 3'd1,  // IR    <- [addr]
    M_RD_MDL      = 3'd2,  // MD_L  <- [addr]
    M_RD_MDH      = 3'd3,  // MD_H  <- [addr]
    M_RD_MDL_CLRH = 3'd4,  // MD_L  <- [addr], MD_H <- 0
    M_WR_AC       = 3'd5,  // [addr] <- AC
    M_WR_PCH      = 3'd6,  // [addr] <- PC(15..8)
    M_WR_PCL      = 3'd7   // [addr] <- PC(7..0)
  } mem_e;

  typedef enum logic [1:0] {
    PC_HOLD   = 2'd0,
    PC_INC    = 2'd1,
    PC_LD_MD  = 2'd2,
    PC_LD_VEC = 2'd3
  } pc_e;

  typedef enum logic [1:0] {
    SP_HOLD  = 2'd0,
    SP_INC   = 2'd1,
    SP_DEC   = 2'd2,
    SP_LD_MD = 2'd3
  } sp_e;

  typedef enum logic [2:0] {
    MA_HOLD      = 3'd0,
    MA_LD_MD     = 3'd1,
    MA_LD_Y      = 3'd2,
    MA_LD_BASEMD = 3'd3,
    MA_INC       = 3'd4,
    MA_LD_PC     = 3'd5,
    MA_LD_SP     = 3'd6
  } ma_e;

  typedef enum logic [1:0] {
    YB_NONE    = 2'd0,
    YB_Y_INC   = 2'd1,
    YB_Y_LD    = 2'd2,
    YB_BASE_LD = 2'd3
  } yb_e;

  // Accumulator function. Destinations and flags are implied by the code.
  typedef enum logic [4:0] {
    F_NONE    = 5'd0,
    F_ADD     = 5'd1,   // AC <- AC + MD_L ; CF, ZF
    F_AND     = 5'd2,   // AC <- AC & MD_L ; ZF
    F_OR      = 5'd3,   // AC <- AC | MD_L ; ZF
    F_XOR     = 5'd4,   // AC <- AC ^ MD_L ; ZF
    F_CMP     = 5'd5,   // AC - MD_L       ; CF, ZF
    F_LDA     = 5'd6,   // AC <- MD_L
    F_COM     = 5'd7,
    F_SHL     = 5'd8,
    F_SHR     = 5'd9,
    F_ROTL    = 5'd10,
    F_ROTR    = 5'd11,
    F_PIN     = 5'd12,  // AC <- PIN
    F_SIN     = 5'd13,  // AC <- SIN
    F_POUT    = 5'd14,  // POUT <- AC
    F_SOUT    = 5'd15,  // SOUT <- AC
    F_CC      = 5'd16,  // CF <- 0
    F_XOVRML  = 5'd17,
    F_XOVRMLM = 5'd18,
    F_XOVR2   = 5'd19,
    F_INV     = 5'd20,
    F_MUT1    = 5'd21,
    F_MUT2    = 5'd22
  } fn_e;

  typedef struct packed {
    nx_e        nx;     // 3
    cond_e      cond;   // 2
    logic [7:0] addr;   // 8
    mem_e       mem;    // 3   memory cycle, always at address MA
    logic [1:0] rsvd;   // 2   reserved, zero
    pc_e        pc;     // 2
    sp_e        sp;     // 2
    ma_e        ma;     // 3
    yb_e        yb;     // 2
    fn_e        fn;     // 5
  } uword_t;            // 32 bits

  localparam int UADDR_BITS = 8;   // 256 words x 32 bits = 1 Kbyte store

  function automatic logic fn_is_genetic(fn_e f);
    return f inside {F_XOVRML, F_XOVRMLM, F_XOVR2, F_INV, F_MUT1, F_MUT2};
  endfunction

  // ---------------------------------------------------------------- micro-addresses
  localparam logic [7:0] U_FETCH    = 8'd0;   // 0..1
  localparam logic [7:0] U_DECODE   = 8'd2;
  localparam logic [7:0] U_INT      = 8'd3;   // 3..5
  localparam logic [7:0] U_NOP      = 8'd6;
  localparam logic [7:0] U_HALT     = 8'd7;   // 7..8
  localparam logic [7:0] U_R8       = 8'd9;
  localparam logic [7:0] U_R16      = 8'd10;  // 10..11
  localparam logic [7:0] U_W8       = 8'd12;
  localparam logic [7:0] U_D8_IMM   = 8'd13;
  localparam logic [7:0] U_D8_DIR   = 8'd14;  // 14..16
  localparam logic [7:0] U_D8_IND   = 8'd17;
  localparam logic [7:0] U_D8_BAS   = 8'd18;  // 18..19
  localparam logic [7:0] U_D16_IMM  = 8'd20;  // 20..21
  localparam logic [7:0] U_D16_DIR  = 8'd22;  // 22..24
  localparam logic [7:0] U_D16_IND  = 8'd25;
  localparam logic [7:0] U_D16_BAS  = 8'd26;  // 26..27
  localparam logic [7:0] U_ST_IMM   = 8'd28;
  localparam logic [7:0] U_ST_DIR   = 8'd29;  // 29..31
  localparam logic [7:0] U_ST_IND   = 8'd32;
  localparam logic [7:0] U_ST_BAS   = 8'd33;  // 33..34
  localparam logic [7:0] U_BR       = 8'd36;  // 36..38
  localparam logic [7:0] U_BC       = 8'd40;  // 40..42
  localparam logic [7:0] U_BZ       = 8'd44;  // 44..46
  localparam logic [7:0] U_BY       = 8'd48;  // 48..50
  localparam logic [7:0] U_CALL     = 8'd52;  // 52..56
  localparam logic [7:0] U_RET      = 8'd58;  // 58..62
  localparam logic [7:0] U_X_BASE   = 8'd64;  // + memory op-code: execute step
  localparam logic [7:0] U_R_BASE   = 8'd96;  // + register op-code

endpackage
