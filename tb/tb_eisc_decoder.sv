// tb_eisc_decoder: every instruction class, decoded from random encodings,
// is checked field by field against the instruction-set definition: which
// registers are read and written, memory direction/size/sign, branch
// condition, flag update, use of the extended operand, list push/pop flags,
// and that LERI, NOP and an invalid slot decode to bubbles.
module tb_eisc_decoder;
  import eisc_pkg::*;

  logic        valid;
  logic [15:0] instr;
  logic [31:0] ext_imm;
  ctrl_t       ctrl;
  logic        pp_valid, pp_pop, pp_high;
  logic [7:0]  pp_mask;
  int checks = 0, failures = 0;

  eisc_decoder dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %h: %s", instr, s); end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      valid   = ($urandom_range(0, 9) != 0);
      instr   = 16'($urandom);
      ext_imm = $urandom;
      #1;
      if (!valid) begin
        chk(!ctrl.valid && !pp_valid, "invalid slot is a bubble");
        continue;
      end
      casez (instr[15:12])
        4'b00??: begin
          logic [2:0] op;
          bit st;
          op = {instr[13], instr[12], instr[7]};
          st = op[2] && (op != 3'b111);
          chk(ctrl.valid && ctrl.ra == 5'(instr[3:0]) && ctrl.use_a && ctrl.b_imm &&
              ctrl.imm == ext_imm && ctrl.alu_op == ALU_ADD, "index base");
          chk(ctrl.mem_wr == st && ctrl.mem_rd == !st, "index direction");
          if (st) chk(ctrl.rb == 5'(instr[11:8]) && ctrl.use_b && !ctrl.we, "store data reg");
          else    chk(ctrl.rd == 5'(instr[11:8]) && ctrl.we, "load dest");
          chk(ctrl.mem_size == ((op inside {3'b000, 3'b011, 3'b100}) ? SZ_B :
                                (op inside {3'b001, 3'b111, 3'b101}) ? SZ_H : SZ_W), "size");
          chk(ctrl.mem_sign == (op == 3'b000 || op == 3'b001), "sign");
          chk(!ctrl.set_flags && !ctrl.branch, "no flags");
        end
        4'b01??: chk(!ctrl.valid && !pp_valid, "LERI is a bubble");
        4'b1000: begin
          chk(ctrl.valid && ctrl.ra == REG_SP && ctrl.b_imm && ctrl.mem_size == SZ_W, "sp base");
          if (instr[11]) chk(ctrl.mem_wr && ctrl.rb == 5'(instr[10:7]) && !ctrl.we, "sp store");
          else chk(ctrl.mem_rd && ctrl.rd == 5'(instr[10:7]) && ctrl.we, "sp load");
        end
        4'b1001: chk(ctrl.valid && ctrl.we && ctrl.rd == 5'(instr[11:8]) && ctrl.b_imm &&
                     ctrl.alu_op == ALU_PASSB && !ctrl.set_flags && !ctrl.mem_rd, "LDI");
        4'b101?: begin
          chk(ctrl.valid && ctrl.branch && ctrl.cond == cond_e'(instr[12:9]) && ctrl.imm == ext_imm, "branch");
          chk((ctrl.link && ctrl.we && ctrl.rd == REG_LR) == (instr[12:9] == 4'd15), "JAL link");
          chk(!ctrl.set_flags && !ctrl.mem_wr, "branch no side effects");
        end
        4'b110?: begin
          bit wr;
          wr = !(instr[12:10] inside {3'd1, 3'd5});
          chk(ctrl.valid && ctrl.set_flags && ctrl.ra == 5'(instr[3:0]) && ctrl.b_imm, "iop");
          chk(ctrl.we == wr && (!wr || ctrl.rd == 5'(instr[3:0])), "iop write");
          chk(ctrl.alu_op == ((instr[12:10] == 0) ? ALU_ADD : (instr[12:10] == 1) ? ALU_SUB :
                              (instr[12:10] == 3) ? ALU_OR : (instr[12:10] == 4) ? ALU_XOR :
                              (instr[12:10] == 6) ? ALU_LSL : (instr[12:10] == 7) ? ALU_LSR : ALU_AND),
              "iop alu op");
        end
        default: begin
          int op;
          op = int'(instr[12:8]);
          if (op inside {[24:27]}) begin
            chk(pp_valid && pp_pop == (op >= 26) && pp_high == (op == 25 || op == 27) &&
                pp_mask == instr[7:0], "push/pop");
          end else if (op >= 28) begin
            chk(!pp_valid && (ctrl.valid == (op == 29)) && (ctrl.halt == (op == 29)), "nop/halt");
          end else begin
            chk(!pp_valid && ctrl.valid, "rop valid");
            if (op <= 14 && op != 0 && op != 13 && op != 14)
              chk(ctrl.ra == 5'(instr[3:0]) && ctrl.rb == 5'(instr[7:4]) && ctrl.use_a && ctrl.use_b &&
                  ctrl.set_flags && !ctrl.b_imm, "two-operand");
            if (op inside {8, 9}) chk(!ctrl.we, "cmp/tst no write");
            if (op inside {[1:7], [10:14]}) chk(ctrl.we && ctrl.rd == 5'(instr[3:0]), "rop write");
            if (op == 0) chk(ctrl.we && !ctrl.set_flags && ctrl.alu_op == ALU_PASSB, "mov");
            if (op inside {15, 16}) chk(ctrl.mul && ctrl.mul_signed == (op == 15) && !ctrl.we, "mul");
            if (op inside {17, 18}) chk(ctrl.we && ctrl.mf == ((op == 17) ? MF_ML : MF_MH), "mf");
            if (op inside {19, 20}) chk(ctrl.jreg && ctrl.rb == 5'(instr[7:4]) && ctrl.use_b &&
                                        ctrl.link == (op == 20), "jr");
            if (op == 21) chk(ctrl.rb == REG_SP && ctrl.we && ctrl.rd == 5'(instr[3:0]), "mfsp");
            if (op == 22) chk(ctrl.rd == REG_SP && ctrl.we && ctrl.rb == 5'(instr[7:4]), "mtsp");
            if (op == 23) chk(ctrl.ra == REG_SP && ctrl.rd == REG_SP && ctrl.b_imm && ctrl.imm == ext_imm, "addsp");
          end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
