// eisc_cond: branch condition evaluation.
//
// The EISC combines its Carry, Sign, Zero and Overflow flags into fourteen
// conditional branch tests. Which fourteen is not fixed by the architecture
// description; this unit uses the familiar set (equal, not equal, carry
// set/clear, minus, plus, overflow set/clear, unsigned higher / lower-or-same,
// signed >=, <, >, <=). Codes 14 and 15 are the unconditional BRA and JAL,
// which always report taken. Combinational.
//
// Interface: cond code and current flags in, taken out.
module eisc_cond
  import eisc_pkg::*;
(
  input  cond_e  cond,
  input  flags_t flags,
  output logic   taken
);

  always_comb begin
    unique case (cond)
      CC_EQ:  taken =  flags.z;
      CC_NE:  taken = !flags.z;
      CC_CS:  taken =  flags.c;
      CC_CC:  taken = !flags.c;
      CC_MI:  taken =  flags.s;
      CC_PL:  taken = !flags.s;
      CC_VS:  taken =  flags.v;
      CC_VC:  taken = !flags.v;
      CC_HI:  taken =  flags.c && !flags.z;
      CC_LS:  taken = !flags.c ||  flags.z;
      CC_GE:  taken = (flags.s == flags.v);
      CC_LT:  taken = (flags.s != flags.v);
      CC_GT:  taken = !flags.z && (flags.s == flags.v);
      CC_LE:  taken =  flags.z || (flags.s != flags.v);
      default: taken = 1'b1;  // BRA, JAL
    endcase
  end

endmodule
