// eisc_imem: on-chip program memory of the EISC microcontroller.
//
// Holds DEPTH 16-bit instruction words. The fetch port reads asynchronously
// (a halfword address in, the instruction out in the same cycle), so the
// fetch stage needs one cycle per instruction. A synchronous write port lets
// a host or testbench load the program before releasing the core from reset.
// The memory size is this implementation's choice. Out-of-range fetches
// return 0 (an index load/store of R0, harmless).
module eisc_imem #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic [31:0]              fetch_addr,   // byte address
  output logic [15:0]              fetch_data,
  input  logic                     load_we,
  input  logic [$clog2(DEPTH)-1:0] load_addr,    // halfword index
  input  logic [15:0]              load_data
);

  logic [15:0] mem [DEPTH];
  logic [31:0] hidx;

  assign hidx = fetch_addr >> 1;

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign fetch_data = (hidx < DEPTH) ? mem[hidx[$clog2(DEPTH)-1:0]] : 16'h0000;

endmodule
