// tb_eisc_cond: exhaustive test of the fourteen branch conditions and the two
// unconditional codes over all sixteen flag combinations. Expected values come
// from comparing operand pairs that produce the flags: for each pair the
// signed/unsigned relations are known directly.
module tb_eisc_cond;
  import eisc_pkg::*;

  cond_e  cond;
  flags_t flags;
  logic   taken;
  int checks = 0, failures = 0;

  eisc_cond dut (.cond, .flags, .taken);

  // relation table for a subtract x - y, driven from real operand pairs
  task automatic check_pair(input logic [31:0] x, input logic [31:0] y);
    logic [32:0] d;
    logic [31:0] r;
    bit exp_t[16];
    d = {1'b0, x} + {1'b0, ~y} + 33'd1;
    r = d[31:0];
    flags.c = d[32];
    flags.s = r[31];
    flags.z = (r == 0);
    flags.v = (x[31] != y[31]) && (r[31] != x[31]);
    exp_t[0]  = (x == y);            exp_t[1]  = (x != y);
    exp_t[2]  = (x >= y);            exp_t[3]  = (x < y);
    exp_t[4]  = r[31];               exp_t[5]  = !r[31];
    exp_t[6]  = flags.v;             exp_t[7]  = !flags.v;
    exp_t[8]  = (x > y);             exp_t[9]  = (x <= y);
    exp_t[10] = ($signed(x) >= $signed(y));
    exp_t[11] = ($signed(x) <  $signed(y));
    exp_t[12] = ($signed(x) >  $signed(y));
    exp_t[13] = ($signed(x) <= $signed(y));
    exp_t[14] = 1; exp_t[15] = 1;
    for (int c = 0; c < 16; c++) begin
      cond = cond_e'(c);
      #1;
      checks++;
      if (taken !== exp_t[c]) begin
        failures++;
        if (failures < 10) $display("FAIL cond=%0d x=%h y=%h taken=%b", c, x, y, taken);
      end
    end
  endtask

  initial begin
    logic [31:0] v[7] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h8000_0001, 32'h42};
    foreach (v[i]) foreach (v[j]) check_pair(v[i], v[j]);
    for (int n = 0; n < 500; n++) check_pair($urandom, $urandom);
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
