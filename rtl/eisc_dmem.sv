// eisc_dmem: on-chip data memory of the EISC microcontroller.
//
// DEPTH 32-bit words with per-byte write enables. The core port is a single
// synchronous port: the address is presented during the MEM stage, a store
// is written at the end of that cycle, and load data appears in the next
// cycle (the WB stage). This one-cycle read latency is what creates the
// load-use interlock of the pipeline. A second, asynchronous read-only port
// lets a host or testbench inspect the contents. Size and timing are this
// implementation's choice. Addresses wrap modulo the memory size.
module eisc_dmem #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,      // byte address
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic [31:0] dbg_addr,  // byte address
  output logic [31:0] dbg_rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0]   mem [DEPTH];
  logic [AW-1:0] widx;

  assign widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) begin
        for (int i = 0; i < 4; i++)
          if (be[i]) mem[widx][8*i +: 8] <= wdata[8*i +: 8];
      end
      rdata <= mem[widx];
    end
  end

  assign dbg_rdata = mem[dbg_addr[AW+1:2]];

endmodule
