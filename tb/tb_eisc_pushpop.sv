// tb_eisc_pushpop: register-list expansion. For random masks, directions and
// halves, the sequence of micro-ops accepted under random stall gaps must be
// one store (push) or load (pop) per selected register, lowest first, at
// %SP-4n+4k (push) or %SP+4k (pop), then one %SP adjustment of -4n or +4n
// with last high; an empty list gives only the %SP micro-op.
module tb_eisc_pushpop;
  import eisc_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0, is_pop = 0, high = 0, step = 0;
  logic [7:0] mask = 0;
  ctrl_t      uop;
  logic       last;
  int checks = 0, failures = 0;

  eisc_pushpop dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int n, k, cycles;
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      mask = 8'($urandom); if (t % 10 == 0) mask = 0;
      is_pop = 1'($urandom); high = 1'($urandom);
      start = 1;
      n = $countones(mask);
      k = 0;
      cycles = 0;
      for (int b = 0; b <= 8; b++) begin
        if (b < 8 && !mask[b]) continue;
        // wait for an accepted cycle
        step = ($urandom_range(0, 3) != 0);
        #1;
        while (!step) begin
          @(negedge clk); cycles++;
          step = ($urandom_range(0, 3) != 0);
          #1;
        end
        chk(uop.valid && uop.ra == REG_SP && uop.b_imm, "uop base");
        if (b < 8) begin
          chk(!last, "last too early");
          if (is_pop)
            chk(uop.mem_rd && uop.we && uop.rd == 5'(high * 8 + b) && uop.imm == 32'(4 * k),
                $sformatf("pop uop reg %0d", b));
          else
            chk(uop.mem_wr && !uop.we && uop.rb == 5'(high * 8 + b) && uop.use_b &&
                uop.imm == 32'(4 * k - 4 * n), $sformatf("push uop reg %0d imm %h", b, uop.imm));
          k++;
        end else begin
          chk(last && uop.we && uop.rd == REG_SP && !uop.mem_rd && !uop.mem_wr &&
              uop.imm == (is_pop ? 32'(4 * n) : -32'(4 * n)), "sp adjust uop");
        end
        @(negedge clk); cycles++;
        step = 0;
      end
      start = 0;
      chk(k == n, "uop count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
