// eisc_lsu: byte-lane steering for EISC loads and stores.
//
// The EISC load/store group has 8-, 16- and 32-bit accesses, with sign- and
// zero-extending loads of bytes and halfwords. Memory here is 32 bits wide and
// little-endian (this implementation's choice). On the store side the unit
// replicates the store data onto every lane and raises the byte enables of
// the addressed bytes; on the load side it picks the addressed byte or
// halfword out of the returned word and extends it. Halfword and word
// accesses ignore the address bits below their size (no misalignment trap).
// Purely combinational: the store half is used in the MEM stage, the load
// half in the WB stage with the address and size carried along.
module eisc_lsu
  import eisc_pkg::*;
(
  // store side
  input  logic [1:0]      st_addr_lo,
  input  mem_size_e       st_size,
  input  logic [XLEN-1:0] st_data,
  output logic [XLEN-1:0] st_wdata,
  output logic [3:0]      st_be,
  // load side
  input  logic [1:0]      ld_addr_lo,
  input  mem_size_e       ld_size,
  input  logic            ld_sign,
  input  logic [XLEN-1:0] ld_word,
  output logic [XLEN-1:0] ld_data
);

  always_comb begin
    unique case (st_size)
      SZ_B: begin
        st_wdata = {4{st_data[7:0]}};
        st_be    = 4'b0001 << st_addr_lo;
      end
      SZ_H: begin
        st_wdata = {2{st_data[15:0]}};
        st_be    = st_addr_lo[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        st_wdata = st_data;
        st_be    = 4'b1111;
      end
    endcase
  end

  logic [7:0]  byte_sel;
  logic [15:0] half_sel;

  always_comb begin
    byte_sel = ld_word[8*ld_addr_lo +: 8];
    half_sel = ld_addr_lo[1] ? ld_word[31:16] : ld_word[15:0];
    unique case (ld_size)
      SZ_B:    ld_data = ld_sign ? {{24{byte_sel[7]}}, byte_sel} : {24'd0, byte_sel};
      SZ_H:    ld_data = ld_sign ? {{16{half_sel[15]}}, half_sel} : {16'd0, half_sel};
      default: ld_data = ld_word;
    endcase
  end

endmodule
