// eisc_pushpop: expands an EISC register-list PUSH or POP into single-word
// micro-operations.
//
// A PUSH/POP carries an 8-bit register mask covering R0..R7 or R8..R15 (the
// architecture binds eight registers to one list instruction). While the list
// instruction sits in decode, this sequencer issues one micro-op per cycle
// that the pipeline accepts (step): first one store or load per selected
// register, lowest register first, then one %SP adjustment. With n registers
// selected, PUSH stores the k-th one at %SP - 4n + 4k and then sets
// %SP -= 4n; POP loads the k-th one from %SP + 4k and then sets %SP += 4n.
// Because %SP changes only in the last micro-op, the memory micro-ops need
// no interlock on %SP. last is high while the %SP micro-op is offered; decode
// releases the instruction after it is accepted. The micro-op format is this
// implementation's choice; the architecture specifies only the list
// instruction itself.
module eisc_pushpop
  import eisc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // list instruction valid in decode
  input  logic       is_pop,
  input  logic       high,
  input  logic [7:0] mask,
  input  logic       step,      // offered micro-op accepted this cycle
  output ctrl_t      uop,
  output logic       last
);

  logic       active;
  logic [7:0] rem_q;
  logic [3:0] k_q;
  logic [7:0] cur_rem;
  logic [3:0] cur_k;
  logic [2:0] low_idx;
  logic [3:0] n;

  assign cur_rem = active ? rem_q : mask;
  assign cur_k   = active ? k_q   : 4'd0;
  assign last    = (cur_rem == 8'd0);

  always_comb begin
    n = '0;
    for (int i = 0; i < 8; i++) n = n + {3'd0, mask[i]};
    low_idx = '0;
    for (int i = 7; i >= 0; i--) if (cur_rem[i]) low_idx = 3'(i);
  end

  always_comb begin
    uop          = CTRL_NOP;
    uop.valid    = start;
    uop.alu_op   = ALU_ADD;
    uop.ra       = REG_SP;
    uop.use_a    = 1'b1;
    uop.b_imm    = 1'b1;
    uop.mem_size = SZ_W;
    if (last) begin
      uop.rd  = REG_SP;
      uop.we  = 1'b1;
      uop.imm = is_pop ? {26'd0, n, 2'b00} : -{26'd0, n, 2'b00};
    end else if (is_pop) begin
      uop.mem_rd = 1'b1;
      uop.rd     = {1'b0, high, low_idx};
      uop.we     = 1'b1;
      uop.imm    = {26'd0, cur_k, 2'b00};
    end else begin
      uop.mem_wr = 1'b1;
      uop.rb     = {1'b0, high, low_idx};
      uop.use_b  = 1'b1;
      uop.imm    = {26'd0, cur_k, 2'b00} - {26'd0, n, 2'b00};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      rem_q  <= '0;
      k_q    <= '0;
    end else if (start && step) begin
      if (last) begin
        active <= 1'b0;
      end else begin
        active <= 1'b1;
        rem_q  <= cur_rem & ~(8'd1 << low_idx);
        k_q    <= cur_k + 4'd1;
      end
    end
  end

endmodule
