// eisc_mul: the multiply unit and its result registers %ML and %MH.
//
// The EISC keeps the 64-bit product of a multiply in two dedicated 32-bit
// registers, %ML (low word) and %MH (high word), read back with MFML/MFMH.
// This unit forms the full product of two 32-bit operands, signed (MUL) or
// unsigned (MULU), in one cycle and loads it into ML/MH at the clock edge
// that ends the instruction's EX cycle, so an MFML right behind it already
// sees the new value. Both registers reset to zero. Divide is not part of
// this unit.
//
// Interface: start (one-cycle strobe), is_signed, a, b; ml, mh are the
// registered results.
module eisc_mul
  import eisc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            is_signed,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] ml,
  output logic [XLEN-1:0] mh
);

  logic [2*XLEN-1:0] prod;

  always_comb begin
    if (is_signed)
      prod = 64'($signed({{XLEN{a[XLEN-1]}}, a}) * $signed({{XLEN{b[XLEN-1]}}, b}));
    else
      prod = {{XLEN{1'b0}}, a} * {{XLEN{1'b0}}, b};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ml <= '0;
      mh <= '0;
    end else if (start) begin
      ml <= prod[XLEN-1:0];
      mh <= prod[2*XLEN-1:XLEN];
    end
  end

endmodule
