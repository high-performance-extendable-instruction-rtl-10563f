// tb_eisc_dmem: data memory. Random byte-enabled writes and reads against a
// shadow array; read data must appear one clock after the request, and the
// inspection port must show the current contents.
module tb_eisc_dmem;
  localparam int DEPTH = 64;
  logic        clk = 0, req = 0, we = 0;
  logic [3:0]  be = 0;
  logic [31:0] addr = 0, wdata = 0, rdata, dbg_addr = 0, dbg_rdata;
  logic [31:0] shadow[DEPTH];
  int checks = 0, failures = 0;

  eisc_dmem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [31:0] expect_rd;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      req = 1; we = 1; be = 4'hf; addr = 32'(i * 4); wdata = $urandom; shadow[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      req = 1'($urandom); we = 1'($urandom); be = 4'($urandom);
      addr = 32'($urandom_range(0, DEPTH - 1) * 4); wdata = $urandom;
      expect_rd = shadow[addr >> 2];
      @(posedge clk);
      if (req && we)
        for (int b = 0; b < 4; b++) if (be[b]) shadow[addr >> 2][8*b +: 8] = wdata[8*b +: 8];
      #1;
      if (req) chk(rdata == expect_rd, $sformatf("read %h: %h/%h", addr, rdata, expect_rd));
      dbg_addr = 32'($urandom_range(0, DEPTH - 1) * 4);
      #1;
      chk(dbg_rdata == shadow[dbg_addr >> 2], "inspection port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
