// eisc_decoder: turns a 16-bit EISC instruction into the pipeline control word.
//
// Combinational. The extended operand comes from eisc_ext_unit, so the
// decoder itself only selects registers, the ALU operation and the memory,
// branch, multiply and write-back controls. Instruction formats are listed in
// eisc_pkg. The index-register load/store group follows the architecture's
// format (op = {b13,b12,b7}, b11..8 data register, b6..4 scaled offset,
// b3..0 index register); the remaining opcode layout is this implementation's.
// LERI decodes to a bubble: its whole effect happens in eisc_ext_unit.
// Register-list PUSH/POP are flagged on pp_* and expanded by eisc_pushpop.
// Unused register-op codes decode to no-ops.
module eisc_decoder
  import eisc_pkg::*;
(
  input  logic            valid,
  input  logic [15:0]     instr,
  input  logic [XLEN-1:0] ext_imm,
  output ctrl_t           ctrl,
  output logic            pp_valid,   // register-list push/pop
  output logic            pp_pop,
  output logic            pp_high,    // list covers R8..R15 (else R0..R7)
  output logic [7:0]      pp_mask
);

  ls_op_e           ls_op;
  iop_e             iop;
  rop_e             rop;
  logic [RIDX_W-1:0] r_hi, r_lo;    // bits 11..8, 3..0 (index format)
  logic [RIDX_W-1:0] r_src, r_dst;  // register-op fields 7..4, 3..0

  assign ls_op = ls_op_e'({instr[13], instr[12], instr[7]});
  assign iop   = iop_e'(instr[12:10]);
  assign rop   = rop_e'(instr[12:8]);
  assign r_hi  = {1'b0, instr[11:8]};
  assign r_lo  = {1'b0, instr[3:0]};
  assign r_src = {1'b0, instr[7:4]};
  assign r_dst = {1'b0, instr[3:0]};

  always_comb begin
    ctrl     = CTRL_NOP;
    ctrl.imm = ext_imm;
    pp_valid = 1'b0;
    pp_pop   = 1'b0;
    pp_high  = 1'b0;
    pp_mask  = instr[7:0];

    unique casez (instr[15:12])
      // ---------------- index load/store ----------------
      4'b00??: begin
        ctrl.valid  = 1'b1;
        ctrl.alu_op = ALU_ADD;
        ctrl.ra     = r_lo;      // index register
        ctrl.use_a  = 1'b1;
        ctrl.b_imm  = 1'b1;
        unique case (ls_op)
          LS_LDB, LS_LDBU, LS_STB: ctrl.mem_size = SZ_B;
          LS_LDS, LS_LDSU, LS_STS: ctrl.mem_size = SZ_H;
          default:                 ctrl.mem_size = SZ_W;
        endcase
        ctrl.mem_sign = (ls_op == LS_LDB) || (ls_op == LS_LDS);
        if (ls_op inside {LS_STB, LS_STS, LS_ST}) begin
          ctrl.mem_wr = 1'b1;
          ctrl.rb     = r_hi;    // store data
          ctrl.use_b  = 1'b1;
        end else begin
          ctrl.mem_rd = 1'b1;
          ctrl.rd     = r_hi;
          ctrl.we     = 1'b1;
        end
      end
      // ---------------- LERI ----------------
      4'b01??: ;
      // ---------------- stack load/store ----------------
      4'b1000: begin
        ctrl.valid    = 1'b1;
        ctrl.alu_op   = ALU_ADD;
        ctrl.ra       = REG_SP;
        ctrl.use_a    = 1'b1;
        ctrl.b_imm    = 1'b1;
        ctrl.mem_size = SZ_W;
        if (instr[11]) begin
          ctrl.mem_wr = 1'b1;
          ctrl.rb     = {1'b0, instr[10:7]};
          ctrl.use_b  = 1'b1;
        end else begin
          ctrl.mem_rd = 1'b1;
          ctrl.rd     = {1'b0, instr[10:7]};
          ctrl.we     = 1'b1;
        end
      end
      // ---------------- LDI ----------------
      4'b1001: begin
        ctrl.valid  = 1'b1;
        ctrl.alu_op = ALU_PASSB;
        ctrl.b_imm  = 1'b1;
        ctrl.rd     = r_hi;
        ctrl.we     = 1'b1;
      end
      // ---------------- branches ----------------
      4'b101?: begin
        ctrl.valid  = 1'b1;
        ctrl.branch = 1'b1;
        ctrl.cond   = cond_e'(instr[12:9]);
        if (cond_e'(instr[12:9]) == CC_JAL) begin
          ctrl.link = 1'b1;
          ctrl.rd   = REG_LR;
          ctrl.we   = 1'b1;
        end
      end
      // ---------------- immediate ALU ----------------
      4'b110?: begin
        ctrl.valid     = 1'b1;
        ctrl.ra        = r_lo;
        ctrl.use_a     = 1'b1;
        ctrl.b_imm     = 1'b1;
        ctrl.rd        = r_lo;
        ctrl.we        = 1'b1;
        ctrl.set_flags = 1'b1;
        unique case (iop)
          IOP_ADDI: ctrl.alu_op = ALU_ADD;
          IOP_CMPI: begin ctrl.alu_op = ALU_SUB; ctrl.we = 1'b0; end
          IOP_ANDI: ctrl.alu_op = ALU_AND;
          IOP_ORI:  ctrl.alu_op = ALU_OR;
          IOP_XORI: ctrl.alu_op = ALU_XOR;
          IOP_TSTI: begin ctrl.alu_op = ALU_AND; ctrl.we = 1'b0; end
          IOP_LSLI: ctrl.alu_op = ALU_LSL;
          default:  ctrl.alu_op = ALU_LSR;
        endcase
      end
      // ---------------- register ops ----------------
      default: begin
        ctrl.valid     = 1'b1;
        ctrl.ra        = r_dst;
        ctrl.use_a     = 1'b1;
        ctrl.rb        = r_src;
        ctrl.use_b     = 1'b1;
        ctrl.rd        = r_dst;
        ctrl.we        = 1'b1;
        ctrl.set_flags = 1'b1;
        unique case (rop)
          ROP_MOV:  begin ctrl.alu_op = ALU_PASSB; ctrl.set_flags = 1'b0; ctrl.use_a = 1'b0; end
          ROP_ADD:  ctrl.alu_op = ALU_ADD;
          ROP_ADC:  ctrl.alu_op = ALU_ADC;
          ROP_SUB:  ctrl.alu_op = ALU_SUB;
          ROP_SBC:  ctrl.alu_op = ALU_SBC;
          ROP_AND:  ctrl.alu_op = ALU_AND;
          ROP_OR:   ctrl.alu_op = ALU_OR;
          ROP_XOR:  ctrl.alu_op = ALU_XOR;
          ROP_CMP:  begin ctrl.alu_op = ALU_SUB; ctrl.we = 1'b0; end
          ROP_TST:  begin ctrl.alu_op = ALU_AND; ctrl.we = 1'b0; end
          ROP_LSL:  ctrl.alu_op = ALU_LSL;
          ROP_LSR:  ctrl.alu_op = ALU_LSR;
          ROP_ASR:  ctrl.alu_op = ALU_ASR;
          ROP_NOT:  begin ctrl.alu_op = ALU_NOT; ctrl.use_a = 1'b0; end
          ROP_NEG:  begin ctrl.alu_op = ALU_NEG; ctrl.use_a = 1'b0; end
          ROP_MUL, ROP_MULU: begin
            ctrl.mul        = 1'b1;
            ctrl.mul_signed = (rop == ROP_MUL);
            ctrl.we         = 1'b0;
            ctrl.set_flags  = 1'b0;
          end
          ROP_MFML, ROP_MFMH: begin
            ctrl.mf        = (rop == ROP_MFML) ? MF_ML : MF_MH;
            ctrl.use_a     = 1'b0;
            ctrl.use_b     = 1'b0;
            ctrl.set_flags = 1'b0;
          end
          ROP_JR, ROP_JALR: begin
            ctrl.jreg      = 1'b1;
            ctrl.use_a     = 1'b0;
            ctrl.set_flags = 1'b0;
            ctrl.link      = (rop == ROP_JALR);
            ctrl.we        = (rop == ROP_JALR);
            ctrl.rd        = REG_LR;
          end
          ROP_MFSP: begin
            ctrl.alu_op = ALU_PASSB; ctrl.rb = REG_SP; ctrl.use_a = 1'b0;
            ctrl.set_flags = 1'b0;
          end
          ROP_MTSP: begin
            ctrl.alu_op = ALU_PASSB; ctrl.rd = REG_SP; ctrl.use_a = 1'b0;
            ctrl.set_flags = 1'b0;
          end
          ROP_ADDSP: begin
            ctrl.alu_op = ALU_ADD; ctrl.ra = REG_SP; ctrl.rd = REG_SP;
            ctrl.use_b = 1'b0; ctrl.b_imm = 1'b1; ctrl.set_flags = 1'b0;
          end
          ROP_PUSHL, ROP_PUSHH, ROP_POPL, ROP_POPH: begin
            ctrl      = CTRL_NOP;
            pp_valid  = 1'b1;
            pp_pop    = (rop == ROP_POPL) || (rop == ROP_POPH);
            pp_high   = (rop == ROP_PUSHH) || (rop == ROP_POPH);
          end
          ROP_HALT: begin
            ctrl = CTRL_NOP;
            ctrl.valid = 1'b1;
            ctrl.halt  = 1'b1;
          end
          default: ctrl = CTRL_NOP;  // NOP and unused codes
        endcase
      end
    endcase

    if (!valid) begin
      ctrl     = CTRL_NOP;
      pp_valid = 1'b0;
    end
  end

endmodule
