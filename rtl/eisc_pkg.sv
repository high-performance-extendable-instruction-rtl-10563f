// eisc_pkg: types and constants shared by the EISC core.
//
// The EISC is a 32-bit load/store machine with a fixed 16-bit instruction
// word. Two major formats are fixed by the architecture: bits[15:14]=00 is
// the index-register load/store ("LD" format) and bits[15:14]=01 is
// LERI, which feeds a 14-bit constant into the extension register %ER. The
// remaining encodings (classes 10 and 11) are this implementation's own
// choice, laid out so that every short immediate and offset field named by
// the architecture (7-bit stack offset, 8-bit LDI constant, 9-bit branch
// offset, 7-bit stack adjust) fits in one 16-bit word:
//
//   00 oo rrrr o fff xxxx  LD/ST index: op={b13,b12,b7}, rrrr=src/dst,
//                          fff=scaled offset, xxxx=index register
//   01 cccccccccccccc      LERI constant
//   10 00 s rrrr fffffff   LD/ST word relative to %SP, offset*4 (s=1 store)
//   10 01 rrrr iiiiiiii    LDI  rrrr = sign-extended 8-bit constant
//   10 1 cccc fffffffff    Bcc  pc-relative, 9-bit offset*2
//                          (cccc 0..13 conditions, 14 BRA, 15 JAL -> R15)
//   11 0 ooo iiiiii rrrr   immediate ALU op, 6-bit signed constant
//   11 1 ooooo ssss dddd   register op, dddd = dddd op ssss
//
// Register index 16 is the stack pointer %SP; R0..R15 are general purpose.
package eisc_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned NGPR   = 16;   // general registers R0..R15
  localparam int unsigned RIDX_W = 5;    // register index incl. %SP
  localparam logic [RIDX_W-1:0] REG_SP = 5'd16;
  localparam logic [RIDX_W-1:0] REG_LR = 5'd15;  // link register for JAL/JALR

  // Index-register load/store operation field {b13,b12,b7}
  typedef enum logic [2:0] {
    LS_LDB  = 3'b000,  // sign-extend 8-bit load
    LS_LDS  = 3'b001,  // sign-extend 16-bit load
    LS_LD   = 3'b010,  // 32-bit load
    LS_LDBU = 3'b011,  // zero-extend 8-bit load
    LS_STB  = 3'b100,  // 8-bit store
    LS_STS  = 3'b101,  // 16-bit store
    LS_ST   = 3'b110,  // 32-bit store
    LS_LDSU = 3'b111   // zero-extend 16-bit load
  } ls_op_e;

  typedef enum logic [1:0] {SZ_B = 2'd0, SZ_H = 2'd1, SZ_W = 2'd2} mem_size_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_AND, ALU_OR, ALU_XOR,
    ALU_LSL, ALU_LSR, ALU_ASR, ALU_PASSB, ALU_NOT, ALU_NEG
  } alu_op_e;

  // Immediate ALU ops (class 11 0)
  typedef enum logic [2:0] {
    IOP_ADDI = 3'd0, IOP_CMPI = 3'd1, IOP_ANDI = 3'd2, IOP_ORI = 3'd3,
    IOP_XORI = 3'd4, IOP_TSTI = 3'd5, IOP_LSLI = 3'd6, IOP_LSRI = 3'd7
  } iop_e;

  // Register ops (class 11 1)
  typedef enum logic [4:0] {
    ROP_MOV   = 5'd0,  ROP_ADD   = 5'd1,  ROP_ADC   = 5'd2,  ROP_SUB   = 5'd3,
    ROP_SBC   = 5'd4,  ROP_AND   = 5'd5,  ROP_OR    = 5'd6,  ROP_XOR   = 5'd7,
    ROP_CMP   = 5'd8,  ROP_TST   = 5'd9,  ROP_LSL   = 5'd10, ROP_LSR   = 5'd11,
    ROP_ASR   = 5'd12, ROP_NOT   = 5'd13, ROP_NEG   = 5'd14, ROP_MUL   = 5'd15,
    ROP_MULU  = 5'd16, ROP_MFML  = 5'd17, ROP_MFMH  = 5'd18, ROP_JR    = 5'd19,
    ROP_JALR  = 5'd20, ROP_MFSP  = 5'd21, ROP_MTSP  = 5'd22, ROP_ADDSP = 5'd23,
    ROP_PUSHL = 5'd24, ROP_PUSHH = 5'd25, ROP_POPL  = 5'd26, ROP_POPH  = 5'd27,
    ROP_NOP   = 5'd28, ROP_HALT  = 5'd29
  } rop_e;

  // Branch conditions (class 10 1)
  typedef enum logic [3:0] {
    CC_EQ = 4'd0,  CC_NE = 4'd1,  CC_CS = 4'd2,  CC_CC = 4'd3,
    CC_MI = 4'd4,  CC_PL = 4'd5,  CC_VS = 4'd6,  CC_VC = 4'd7,
    CC_HI = 4'd8,  CC_LS = 4'd9,  CC_GE = 4'd10, CC_LT = 4'd11,
    CC_GT = 4'd12, CC_LE = 4'd13, CC_BRA = 4'd14, CC_JAL = 4'd15
  } cond_e;

  typedef struct packed {
    logic c;  // carry (1 = no borrow after subtract)
    logic s;  // sign
    logic z;  // zero
    logic v;  // overflow
  } flags_t;

  typedef enum logic [1:0] {MF_NONE, MF_ML, MF_MH} mf_sel_e;

  // Decoded control word carried down the pipeline
  typedef struct packed {
    logic                  valid;
    alu_op_e               alu_op;
    logic [RIDX_W-1:0]     ra;        // operand A register
    logic                  use_a;
    logic [RIDX_W-1:0]     rb;        // operand B register (or store data)
    logic                  use_b;
    logic                  b_imm;     // ALU operand B is the immediate
    logic [XLEN-1:0]       imm;       // extended immediate / offset
    logic [RIDX_W-1:0]     rd;
    logic                  we;
    logic                  set_flags;
    logic                  mem_rd;
    logic                  mem_wr;
    mem_size_e             mem_size;
    logic                  mem_sign;
    logic                  branch;    // pc-relative branch (BRA/JAL/Bcc)
    cond_e                 cond;
    logic                  jreg;      // jump to register (JR/JALR)
    logic                  link;      // write return address to rd
    logic                  mul;
    logic                  mul_signed;
    mf_sel_e               mf;
    logic                  halt;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{alu_op: ALU_ADD, mem_size: SZ_W, cond: CC_EQ,
                                 mf: MF_NONE, default: '0};

endpackage
