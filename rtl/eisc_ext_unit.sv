// eisc_ext_unit: the extension register %ER and extension flag E, held in the
// decode stage, and the operand extender that uses them.
//
// LERI (bits[15:14]=01) carries a 14-bit constant. If E is clear it loads %ER
// with the sign-extended constant; if E is set it shifts %ER left by 14 and
// adds the constant, so a chain of LERIs builds a long constant. LERI sets E;
// every other instruction clears it after using it. An instruction that
// follows a LERI uses %ER as the upper part of its short offset or constant:
//   index load/store   E=0: zext(off3) << scale
//                      E=1: (%ER << 3) for bytes, (%ER << 4) for half/word,
//                           plus (off3 << scale)
//   stack load/store   E=0: zext(off7) << 2        E=1: (%ER << 9) + (off7 << 2)
//   LDI                E=0: sext(imm8)             E=1: {%ER, imm8}
//   Bcc/BRA/JAL        E=0: sext(off9) << 1        E=1: {%ER, off9} << 1
//   immediate ALU      E=0: sext(imm6)             E=1: {%ER, imm6}
//   ADDSP              E=0: sext(imm7) << 2        E=1: {%ER, imm7} << 2
// The index load/store rule follows the architecture; the others are this
// implementation's extension of the same idea to its own formats.
//
// Whether an instruction sets or clears E is known from its opcode alone, so
// E and %ER are resolved here, at decode, rather than in a later stage: this
// is the "virtualised" E-flag. An instruction never waits for an older
// instruction to commit before it can know its E value, and back-to-back
// LERI/consumer pairs issue without stalls. State changes only when the
// decoded instruction is accepted by the pipeline (advance); an instruction
// squashed in decode leaves E and %ER untouched. Both reset to zero.
//
// Interface: instr is the instruction in decode, advance is high in the cycle
// it moves on; e_flag/er are the values it sees, ext_imm its extended operand.
module eisc_ext_unit
  import eisc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [15:0]     instr,
  input  logic            advance,
  output logic            e_flag,
  output logic [XLEN-1:0] er,
  output logic            is_leri,
  output logic [XLEN-1:0] ext_imm
);

  logic [XLEN-1:0] er_next;
  logic [2:0]      ls_op;
  logic [1:0]      scale;
  logic [XLEN-1:0] off_scaled;

  assign is_leri = (instr[15:14] == 2'b01);
  assign er_next = e_flag ? ((er << 14) | {18'd0, instr[13:0]})
                          : {{18{instr[13]}}, instr[13:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_flag <= 1'b0;
      er     <= '0;
    end else if (advance) begin
      e_flag <= is_leri;
      if (is_leri) er <= er_next;
    end
  end

  // operand extension
  assign ls_op = {instr[13], instr[12], instr[7]};

  always_comb begin
    unique case (ls_op)
      LS_LDB, LS_LDBU, LS_STB: scale = 2'd0;
      LS_LDS, LS_LDSU, LS_STS: scale = 2'd1;
      default:                 scale = 2'd2;
    endcase
    off_scaled = {29'd0, instr[6:4]} << scale;
    ext_imm    = '0;
    unique casez (instr[15:12])
      4'b00??: begin  // index load/store
        if (!e_flag)             ext_imm = off_scaled;
        else if (scale == 2'd0)  ext_imm = (er << 3) + off_scaled;
        else                     ext_imm = (er << 4) + off_scaled;
      end
      4'b01??: ext_imm = '0;  // LERI has no operand of its own
      4'b1000: begin  // stack load/store
        ext_imm = e_flag ? ((er << 9) + {23'd0, instr[6:0], 2'b00})
                         : {23'd0, instr[6:0], 2'b00};
      end
      4'b1001: begin  // LDI
        ext_imm = e_flag ? {er[23:0], instr[7:0]} : {{24{instr[7]}}, instr[7:0]};
      end
      4'b101?: begin  // branches
        ext_imm = e_flag ? {er[21:0], instr[8:0], 1'b0}
                         : {{22{instr[8]}}, instr[8:0], 1'b0};
      end
      4'b110?: begin  // immediate ALU
        ext_imm = e_flag ? {er[25:0], instr[9:4]} : {{26{instr[9]}}, instr[9:4]};
      end
      default: begin  // register ops; only ADDSP uses a constant
        ext_imm = e_flag ? {er[22:0], instr[6:0], 2'b00}
                         : {{23{instr[6]}}, instr[6:0], 2'b00};
      end
    endcase
  end

endmodule
