// tb_eisc_ext_unit: the extension register and E-flag.
// Random instruction streams are fed through decode with random accept
// (advance) gaps. A model tracks E and %ER: LERI loads the sign-extended
// constant when E is clear, shifts by 14 and merges when it is set, and sets
// E; every other accepted instruction clears E; nothing changes while advance
// is low. For each instruction the extended operand is checked, including the
// index load/store rule (E set: %ER<<3 for bytes, %ER<<4 for halfwords and
// words, plus the scaled offset).
module tb_eisc_ext_unit;
  logic        clk = 0, rst_n = 0, advance = 0;
  logic [15:0] instr = 0;
  logic        e_flag, is_leri;
  logic [31:0] er, ext_imm;
  int checks = 0, failures = 0;

  eisc_ext_unit dut (.*);

  always #5 clk = ~clk;

  logic        m_e;
  logic [31:0] m_er;

  function automatic logic [31:0] exp_imm(logic [15:0] i, logic e, logic [31:0] x);
    logic [2:0] op;
    int sc;
    logic [31:0] off;
    if (i[15:14] == 2'b00) begin
      op = {i[13], i[12], i[7]};
      sc = (op inside {3'b000, 3'b011, 3'b100}) ? 0 : (op inside {3'b001, 3'b111, 3'b101}) ? 1 : 2;
      off = 32'(i[6:4]) * (1 << sc);
      return e ? (off + x * ((sc == 0) ? 8 : 16)) : off;
    end
    if (i[15:14] == 2'b01) return 0;
    if (i[15:12] == 4'b1000) return 32'(i[6:0]) * 4 + (e ? x * 512 : 0);
    if (i[15:12] == 4'b1001) return e ? x * 256 + 32'(i[7:0]) : 32'($signed(i[7:0]));
    if (i[15:13] == 3'b101) return e ? (x * 512 + 32'(i[8:0])) * 2 : 32'($signed(i[8:0])) * 2;
    if (i[15:13] == 3'b110) return e ? x * 64 + 32'(i[9:4]) : 32'($signed(i[9:4]));
    return e ? (x * 128 + 32'(i[6:0])) * 4 : 32'($signed(i[6:0])) * 4;
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    m_e = 0; m_er = 0;
    @(posedge clk);
    #1;
    chk(e_flag == 0 && er == 0, "reset");
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      instr   = ($urandom_range(0, 2) == 0) ? {2'b01, 14'($urandom)} : 16'($urandom);
      advance = ($urandom_range(0, 4) != 0);
      #1;
      chk(e_flag == m_e, "E flag");
      chk(er == m_er, "ER");
      chk(is_leri == (instr[15:14] == 2'b01), "is_leri");
      chk(ext_imm == exp_imm(instr, m_e, m_er),
          $sformatf("ext_imm instr=%h e=%b er=%h got %h exp %h", instr, m_e, m_er, ext_imm,
                    exp_imm(instr, m_e, m_er)));
      @(posedge clk);
      if (advance) begin
        if (instr[15:14] == 2'b01) begin
          m_er = m_e ? (m_er * 16384 + 32'(instr[13:0])) : 32'($signed(instr[13:0]));
          m_e  = 1;
        end else m_e = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
