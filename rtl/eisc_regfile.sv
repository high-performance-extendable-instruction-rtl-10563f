// eisc_regfile: the EISC register set.
//
// Sixteen 32-bit general-purpose registers R0..R15 (the count the EISC
// architecture settles on) plus the stack pointer %SP, addressed as index 16.
// Two asynchronous read ports serve the decode stage and one write port the
// write-back stage; a read of the register being written in the same cycle
// returns the new value (write-through), so the pipeline needs no forwarding
// path from write-back into decode. All general registers reset to zero and
// %SP to SP_RESET.
module eisc_regfile
  import eisc_pkg::*;
#(
  parameter logic [XLEN-1:0] SP_RESET = 32'h0000_1000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RIDX_W-1:0] ra_addr,
  output logic [XLEN-1:0]   ra_data,
  input  logic [RIDX_W-1:0] rb_addr,
  output logic [XLEN-1:0]   rb_data,
  input  logic              we,
  input  logic [RIDX_W-1:0] w_addr,
  input  logic [XLEN-1:0]   w_data
);

  localparam int unsigned NREG = NGPR + 1;

  logic [XLEN-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= (i == int'(REG_SP)) ? SP_RESET : '0;
    end else if (we && (int'(w_addr) < NREG)) begin
      regs[w_addr] <= w_data;
    end
  end

  function automatic logic [XLEN-1:0] rd_port(input logic [RIDX_W-1:0] addr);
    if (we && (w_addr == addr)) return w_data;
    if (int'(addr) < NREG)      return regs[addr];
    return '0;
  endfunction

  assign ra_data = rd_port(ra_addr);
  assign rb_data = rd_port(rb_addr);

endmodule
