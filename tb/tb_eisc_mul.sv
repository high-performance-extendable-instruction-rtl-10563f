// tb_eisc_mul: signed and unsigned products into %ML/%MH. Checks that the
// result appears one clock after the start strobe, that ML/MH hold their
// value while start is low, and that reset clears them. The reference product
// is built by shift-and-add over the bits of one operand.
module tb_eisc_mul;
  logic        clk = 0, rst_n = 0, start = 0, is_signed = 0;
  logic [31:0] a = 0, b = 0, ml, mh;
  int checks = 0, failures = 0;

  eisc_mul dut (.clk, .rst_n, .start, .is_signed, .a, .b, .ml, .mh);

  always #5 clk = ~clk;

  function automatic logic [63:0] ref_mul(logic [31:0] x, logic [31:0] y, bit sgn);
    logic [63:0] acc, xe, ye;
    xe = sgn ? {{32{x[31]}}, x} : {32'd0, x};
    ye = sgn ? {{32{y[31]}}, y} : {32'd0, y};
    acc = 0;
    for (int i = 0; i < 64; i++) if (ye[i]) acc = acc + (xe << i);
    return acc;
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [63:0] p;
    @(posedge clk);
    #1;
    chk(ml == 0 && mh == 0, "reset value");
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a = $urandom; b = $urandom; is_signed = 1'($urandom);
      if (n % 7 == 0) a = 32'h8000_0000;
      if (n % 11 == 0) b = 32'hffff_ffff;
      start = 1;
      p = ref_mul(a, b, is_signed);
      @(negedge clk);
      start = 0;
      chk({mh, ml} == p, $sformatf("%h*%h s=%0b got %h%h exp %h", a, b, is_signed, mh, ml, p));
      a = $urandom;
      @(negedge clk);
      chk({mh, ml} == p, "hold without start");
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
