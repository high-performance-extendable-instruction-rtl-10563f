// eisc_top: an EISC embedded microcontroller: the five-stage EISC core with
// its on-chip program memory (16-bit words) and data memory (32-bit words).
//
// The program memory has a load port so that a host can place a program in
// it while the core is held in reset; the data memory has a read-only
// inspection port. The core starts fetching at address 0 after reset and runs
// until it retires a HALT. Memory sizes are this implementation's choice
// (4096 halfwords of program, 16 KiB of data); the stack pointer starts at the
// top of data memory. Coprocessors are not part of this design.
module eisc_top
  import eisc_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 4096,
  parameter int unsigned DMEM_DEPTH = 4096
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [15:0]                   prog_data,
  input  logic [31:0]                   dbg_addr,
  output logic [31:0]                   dbg_rdata,
  output logic                          halted,
  output flags_t                        flags,
  output logic [31:0]                   cnt_cycles,
  output logic [31:0]                   cnt_retired,
  output logic [31:0]                   cnt_loaduse,
  output logic [31:0]                   cnt_forward,
  output logic [31:0]                   cnt_redirect,
  output logic [31:0]                   cnt_eext,
  output logic [31:0]                   cnt_leri,
  output logic [31:0]                   cnt_ppuop,
  output logic [31:0]                   cnt_mul
);

  logic [31:0] imem_addr;
  logic [15:0] imem_data;
  logic        dmem_req, dmem_we;
  logic [3:0]  dmem_be;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;

  eisc_core #(
    .RESET_PC (32'h0),
    .SP_RESET (32'(DMEM_DEPTH * 4))
  ) u_core (
    .clk, .rst_n,
    .imem_addr, .imem_data,
    .dmem_req, .dmem_we, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .halted, .flags_o (flags),
    .cnt_cycles, .cnt_retired, .cnt_loaduse, .cnt_forward, .cnt_redirect,
    .cnt_eext, .cnt_leri, .cnt_ppuop, .cnt_mul
  );

  eisc_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk,
    .fetch_addr (imem_addr),
    .fetch_data (imem_data),
    .load_we    (prog_we),
    .load_addr  (prog_addr),
    .load_data  (prog_data)
  );

  eisc_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .req   (dmem_req),
    .we    (dmem_we),
    .be    (dmem_be),
    .addr  (dmem_addr),
    .wdata (dmem_wdata),
    .rdata (dmem_rdata),
    .dbg_addr,
    .dbg_rdata
  );

endmodule
