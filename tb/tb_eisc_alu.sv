// tb_eisc_alu: random and corner-case test of the ALU against a reference
// computed with 64-bit integer arithmetic (carry = bit 32 of the unsigned sum,
// overflow = signed result outside the 32-bit range).
module tb_eisc_alu;
  import eisc_pkg::*;

  logic [31:0] a, b, y;
  alu_op_e     op;
  logic        cin;
  flags_t      f;
  int checks = 0, failures = 0;

  eisc_alu dut (.a, .b, .op, .cin, .y, .flags(f));

  task automatic ref_model(output logic [31:0] ey, output flags_t ef);
    longint ua, ub, us, sa, sb, ss;
    int sh;
    ua = longint'({32'd0, a}); ub = longint'({32'd0, b});
    sa = longint'($signed(a)); sb = longint'($signed(b));
    sh = int'(b[4:0]);
    ef = '0;
    case (op)
      ALU_ADD, ALU_ADC: begin
        us = ua + ub + ((op == ALU_ADC) ? longint'(cin) : 0);
        ss = sa + sb + ((op == ALU_ADC) ? longint'(cin) : 0);
        ey = us[31:0]; ef.c = us[32]; ef.v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      ALU_SUB, ALU_SBC: begin
        longint bor;
        bor = (op == ALU_SUB) ? 0 : longint'(!cin);
        us = ua - ub - bor;
        ss = sa - sb - bor;
        ey = us[31:0]; ef.c = (us >= 0); ef.v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      ALU_AND: ey = a & b;
      ALU_OR:  ey = a | b;
      ALU_XOR: ey = a ^ b;
      ALU_LSL: begin ey = a << sh; ef.c = (sh > 0) && a[32-sh]; end
      ALU_LSR: begin ey = a >> sh; ef.c = (sh > 0) && a[sh-1]; end
      ALU_ASR: begin ey = $signed(a) >>> sh; ef.c = (sh > 0) && a[sh-1]; end
      ALU_PASSB: ey = b;
      ALU_NOT: ey = ~b;
      ALU_NEG: begin ey = -b; ef.c = (b == 0); ef.v = (b == 32'h8000_0000); end
      default: ey = 0;
    endcase
    ef.s = ey[31];
    ef.z = (ey == 0);
  endtask

  initial begin
    logic [31:0] ey;
    flags_t ef;
    logic [31:0] corner[6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h1f};
    for (int n = 0; n < 20000; n++) begin
      op  = alu_op_e'($urandom_range(0, 12));
      a   = (n % 4 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b   = (n % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      cin = 1'($urandom);
      #1;
      ref_model(ey, ef);
      checks++;
      if (y !== ey || f !== ef) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%s a=%h b=%h cin=%b y=%h/%h f=%b/%b", op.name(), a, b, cin, y, ey, f, ef);
      end
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
