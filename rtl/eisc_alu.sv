// eisc_alu: the 32-bit two-operand arithmetic/logic unit of the EISC core.
//
// EISC arithmetic is two-operand (dst = dst op src); a three-operand form is
// built by a MOV followed by the two-operand instruction. The unit computes
// one result and the four condition flags Carry, Sign, Zero and Overflow that
// the conditional branches combine. Purely combinational; the pipeline
// registers around it set the timing (one EX cycle).
//
// Interface: a, b operands, op selects the operation, cin is the current
// carry flag (used by ADC/SBC). y is the result, flags the new C,S,Z,V.
// Flag rules (this implementation's choice): add/subtract set all four, with
// C=1 meaning "no borrow" after a subtract; logic ops and MOV-like passes set
// S and Z and clear C and V; shifts put the last bit shifted out into C.
module eisc_alu
  import eisc_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         op,
  input  logic            cin,
  output logic [XLEN-1:0] y,
  output flags_t          flags
);

  logic [XLEN:0]   sum;
  logic [XLEN-1:0] bx;
  logic            c_in_eff;
  logic            is_arith;
  logic            c_shift;
  logic [4:0]      sh;

  assign sh = b[4:0];

  always_comb begin
    bx       = b;
    c_in_eff = 1'b0;
    is_arith = 1'b0;
    c_shift  = 1'b0;
    unique case (op)
      ALU_ADD: begin is_arith = 1'b1; end
      ALU_ADC: begin is_arith = 1'b1; c_in_eff = cin; end
      ALU_SUB: begin is_arith = 1'b1; bx = ~b; c_in_eff = 1'b1; end
      ALU_SBC: begin is_arith = 1'b1; bx = ~b; c_in_eff = cin; end
      default: ;
    endcase
    sum = {1'b0, a} + {1'b0, bx} + {{XLEN{1'b0}}, c_in_eff};

    unique case (op)
      ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC: y = sum[XLEN-1:0];
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_LSL: begin
        y = a << sh;
        c_shift = (sh != 5'd0) ? a[XLEN - 32'(sh)] : 1'b0;
      end
      ALU_LSR: begin
        y = a >> sh;
        c_shift = (sh != 5'd0) ? a[32'(sh) - 1] : 1'b0;
      end
      ALU_ASR: begin
        y = XLEN'($signed(a) >>> sh);
        c_shift = (sh != 5'd0) ? a[32'(sh) - 1] : 1'b0;
      end
      ALU_PASSB: y = b;
      ALU_NOT:   y = ~b;
      ALU_NEG:   y = -b;
      default:   y = '0;
    endcase

    flags.s = y[XLEN-1];
    flags.z = (y == '0);
    if (is_arith) begin
      flags.c = sum[XLEN];
      flags.v = (a[XLEN-1] == bx[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
    end else if (op == ALU_NEG) begin
      flags.c = (b == '0);
      flags.v = (b == {1'b1, {(XLEN-1){1'b0}}});
    end else begin
      flags.c = c_shift;
      flags.v = 1'b0;
    end
  end

endmodule
