// tb_eisc_lsu: byte-lane steering. Store side: the bytes a store would change
// in a little-endian word (merging st_wdata under st_be) must equal a
// reference byte-wise store. Load side: every size, sign and offset against
// a byte-array reference.
module tb_eisc_lsu;
  import eisc_pkg::*;

  logic [1:0]  st_addr_lo, ld_addr_lo;
  mem_size_e   st_size, ld_size;
  logic        ld_sign;
  logic [31:0] st_data, st_wdata, ld_word, ld_data;
  logic [3:0]  st_be;
  int checks = 0, failures = 0;

  eisc_lsu dut (.*);

  initial begin
    logic [7:0]  bytes[4];
    logic [31:0] old, merged, expw, expd;
    int nb, off;
    for (int n = 0; n < 5000; n++) begin
      old = $urandom; st_data = $urandom;
      st_size = mem_size_e'($urandom_range(0, 2));
      st_addr_lo = 2'($urandom);
      #1;
      for (int i = 0; i < 4; i++) bytes[i] = old[8*i +: 8];
      nb  = (st_size == SZ_B) ? 1 : (st_size == SZ_H) ? 2 : 4;
      off = int'(st_addr_lo) & ~(nb - 1);
      for (int i = 0; i < nb; i++) bytes[off + i] = st_data[8*i +: 8];
      expw = {bytes[3], bytes[2], bytes[1], bytes[0]};
      for (int i = 0; i < 4; i++) merged[8*i +: 8] = st_be[i] ? st_wdata[8*i +: 8] : old[8*i +: 8];
      checks++;
      if (merged !== expw) begin
        failures++;
        if (failures < 10) $display("FAIL store size=%0d lo=%0d %h/%h", st_size, st_addr_lo, merged, expw);
      end

      ld_word = $urandom;
      ld_size = mem_size_e'($urandom_range(0, 2));
      ld_addr_lo = 2'($urandom);
      ld_sign = 1'($urandom);
      #1;
      for (int i = 0; i < 4; i++) bytes[i] = ld_word[8*i +: 8];
      nb  = (ld_size == SZ_B) ? 1 : (ld_size == SZ_H) ? 2 : 4;
      off = int'(ld_addr_lo) & ~(nb - 1);
      expd = 0;
      for (int i = 0; i < nb; i++) expd[8*i +: 8] = bytes[off + i];
      if (ld_sign && nb < 4 && expd[8*nb-1])
        for (int i = 8*nb; i < 32; i++) expd[i] = 1'b1;
      checks++;
      if (ld_data !== expd) begin
        failures++;
        if (failures < 10) $display("FAIL load size=%0d lo=%0d s=%0b %h/%h", ld_size, ld_addr_lo, ld_sign, ld_data, expd);
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
