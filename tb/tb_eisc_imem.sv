// tb_eisc_imem: program memory. Loads random halfwords through the load port
// and reads them back by byte address on the fetch port; checks that fetches
// beyond the memory return 0.
module tb_eisc_imem;
  localparam int DEPTH = 256;
  logic        clk = 0, load_we = 0;
  logic [31:0] fetch_addr = 0;
  logic [15:0] fetch_data, load_data = 0;
  logic [7:0]  load_addr = 0;
  logic [15:0] shadow[DEPTH];
  int checks = 0, failures = 0;

  eisc_imem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 8'(i); load_data = 16'($urandom); shadow[i] = load_data;
    end
    @(negedge clk) load_we = 0;
    for (int n = 0; n < 2000; n++) begin
      fetch_addr = 32'($urandom_range(0, DEPTH - 1)) * 2;
      #1;
      checks++;
      if (fetch_data !== shadow[fetch_addr >> 1]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %h %h/%h", fetch_addr, fetch_data, shadow[fetch_addr >> 1]);
      end
    end
    fetch_addr = DEPTH * 2 + 6;
    #1;
    checks++;
    if (fetch_data !== 16'h0) failures++;
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
