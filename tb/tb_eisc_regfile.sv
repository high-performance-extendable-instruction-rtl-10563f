// tb_eisc_regfile: random writes and reads of R0..R15 and %SP against a
// shadow array; checks reset values and the write-through read of a register
// written in the same cycle.
module tb_eisc_regfile;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [4:0]  ra_addr = 0, rb_addr = 0, w_addr = 0;
  logic [31:0] ra_data, rb_data, w_data = 0;
  logic [31:0] shadow[17];
  int checks = 0, failures = 0;

  eisc_regfile #(.SP_RESET(32'h0000_2000)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    #1;
    for (int i = 0; i < 17; i++) shadow[i] = (i == 16) ? 32'h2000 : 0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 17; i++) begin
      ra_addr = 5'(i); #1;
      chk(ra_data == shadow[i], $sformatf("reset r%0d=%h", i, ra_data));
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      w_addr = 5'($urandom_range(0, 16));
      w_data = $urandom;
      ra_addr = 5'($urandom_range(0, 16));
      rb_addr = (n % 3 == 0) ? w_addr : 5'($urandom_range(0, 16));
      #1;
      chk(ra_data == ((we && ra_addr == w_addr) ? w_data : shadow[ra_addr]), "port a");
      chk(rb_data == ((we && rb_addr == w_addr) ? w_data : shadow[rb_addr]), "port b / write-through");
      @(posedge clk);
      if (we) shadow[w_addr] = w_data;
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
