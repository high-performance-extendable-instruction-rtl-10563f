// tb_eisc_core: the pipelined core on its own, with program and data memory
// modelled here (asynchronous fetch; data reads returned one clock after the
// request). Random programs are compared with the reference model (all
// registers, %ML/%MH, flags, data memory). Directed timing checks:
//   * N independent instructions + HALT take N+1+4 cycles (one per cycle);
//   * a LERI chain and its consumer add no cycles;
//   * a load followed by a use of its result adds exactly 1 cycle;
//   * a taken branch adds exactly 2 cycles, a not-taken one none;
//   * a PUSH of n registers occupies decode for n+1 cycles.
// A directed case checks that a LERI squashed behind a taken branch leaves E
// clear, and that a LERI-extended branch reaches a distant target.
module tb_eisc_core;
  import eisc_pkg::*;
  import eisc_tb_pkg::*;

  localparam int DW = 1024;
  localparam logic [31:0] SPR = 32'(DW * 4);

  logic        clk = 0, rst_n = 0;
  logic [31:0] imem_addr;
  logic [15:0] imem_data;
  logic        dmem_req, dmem_we;
  logic [3:0]  dmem_be;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic        halted;
  flags_t      flags_o;
  logic [31:0] cnt_cycles, cnt_retired, cnt_loaduse, cnt_forward, cnt_redirect,
               cnt_eext, cnt_leri, cnt_ppuop, cnt_mul;

  eisc_core #(.RESET_PC(0), .SP_RESET(SPR)) dut (.*);

  always #5 clk = ~clk;

  iw_t         prog[$];
  logic [31:0] dm[DW];

  assign imem_data = ((imem_addr >> 1) < prog.size()) ? prog[imem_addr >> 1] : 16'h0;

  always_ff @(posedge clk) begin
    if (dmem_req) begin
      if (dmem_we)
        for (int b = 0; b < 4; b++)
          if (dmem_be[b]) dm[(dmem_addr >> 2) % DW][8*b +: 8] <= dmem_wdata[8*b +: 8];
      dmem_rdata <= dm[(dmem_addr >> 2) % DW];
    end
  end

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask

  task automatic run(string name, output int cycles);
    eisc_iss iss;
    int wd;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < DW; i++) dm[i] = 32'(i) * 32'h0101_0107;
    iss = new(DW, SPR);
    for (int i = 0; i < DW; i++) iss.mem[i] = dm[i];
    void'(iss.run(prog, 100000));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wd = 0;
    while (!halted && wd < 100000) begin @(posedge clk); wd++; end
    @(negedge clk);
    chk(halted, {name, ": halted"});
    cycles = int'(cnt_cycles);
    for (int i = 0; i < 17; i++)
      chk(dut.u_rf.regs[i] === iss.r[i], $sformatf("%s: r%0d %h/%h", name, i, dut.u_rf.regs[i], iss.r[i]));
    chk(dut.u_mul.ml === iss.ml && dut.u_mul.mh === iss.mh, {name, ": ML/MH"});
    chk(flags_o === {iss.fc, iss.fs, iss.fz, iss.fv}, {name, ": flags"});
    for (int i = 0; i < DW; i++)
      if (dm[i] !== iss.mem[i]) begin chk(0, $sformatf("%s: mem[%0d]", name, i)); break; end
    checks++;
  endtask

  int base_cyc, c;

  initial begin
    // baseline: 8 independent LDIs + HALT
    prog.delete();
    for (int i = 0; i < 8; i++) prog.push_back(e_ldi(4'(i), 8'(i * 3)));
    prog.push_back(I_HALT);
    run("base", base_cyc);
    chk(base_cyc == 9 + 4, $sformatf("base: %0d cycles", base_cyc));

    // LERI chain + consumer: 3 more instructions, 3 more cycles
    prog.delete();
    for (int i = 0; i < 8; i++) prog.push_back(e_ldi(4'(i), 8'(i * 3)));
    prog.push_back(e_leri(14'h0abc)); prog.push_back(e_leri(14'h1def));
    prog.push_back(e_iop(3'd0, 6'h11, 4'd2));
    prog.push_back(I_HALT);
    run("leri", c);
    chk(c == base_cyc + 3, $sformatf("leri: %0d cycles", c));

    // load-use: ld r1 then add r2 += r1 -> +1 cycle over 2 instructions
    prog.delete();
    for (int i = 0; i < 8; i++) prog.push_back(e_ldi(4'(i), 8'(i * 3)));
    prog.push_back(e_ldsp(1'b0, 4'd1, 7'd0));
    prog.push_back(e_rop(5'd1, 4'd1, 4'd2));
    prog.push_back(I_HALT);
    run("loaduse", c);
    chk(c == base_cyc + 3 && cnt_loaduse == 1, $sformatf("loaduse: %0d cycles", c));

    // taken branch over one instruction: +2 instructions fetched, +2 penalty, -1 skipped
    prog.delete();
    for (int i = 0; i < 8; i++) prog.push_back(e_ldi(4'(i), 8'(i * 3)));
    prog.push_back(e_br(4'd14, 9'd2));
    prog.push_back(e_ldi(4'd9, 8'd1));
    prog.push_back(I_HALT);
    run("taken", c);
    chk(c == base_cyc + 1 + 2 && cnt_redirect == 1, $sformatf("taken: %0d cycles", c));

    // not-taken branch
    prog.delete();
    for (int i = 0; i < 8; i++) prog.push_back(e_ldi(4'(i), 8'(i * 3)));
    prog.push_back(e_iop(3'd1, 6'd5, 4'd1));        // cmpi r1,5 (r1=3): ne
    prog.push_back(e_br(4'd0, 9'd2));               // beq not taken
    prog.push_back(I_HALT);
    run("nottaken", c);
    chk(c == base_cyc + 2 && cnt_redirect == 0, $sformatf("nottaken: %0d cycles", c));

    // push of 5 registers: 6 micro-ops
    prog.delete();
    for (int i = 0; i < 8; i++) prog.push_back(e_ldi(4'(i), 8'(i * 3)));
    prog.push_back(e_list(5'd24, 8'b1011_0011));
    prog.push_back(I_HALT);
    run("push", c);
    chk(c == base_cyc + 6 && cnt_ppuop == 6, $sformatf("push: %0d cycles", c));

    // a LERI squashed behind a taken branch must not extend the target's LDI
    prog.delete();
    prog.push_back(e_br(4'd14, 9'd2));              // BRA over the LERI
    prog.push_back(e_leri(14'h1555));
    prog.push_back(e_ldi(4'd1, 8'h05));             // r1 must be 5, not {ER,5}
    prog.push_back(e_leri(14'h0001));
    prog.push_back(e_br(4'd14, 9'd2));              // extended BRA: offset {1,2}*2
    prog.push_back(I_HALT);
    // the extended BRA at pc 8 jumps by ((1<<9) | 2) * 2 = 1028 bytes to halfword 518
    for (int i = 6; i < 518; i++) prog.push_back(I_NOP);
    prog.push_back(e_ldi(4'd2, 8'h07));
    prog.push_back(I_HALT);
    run("squash", c);
    chk(dut.u_rf.regs[1] == 32'd5, "squashed LERI left E set");
    chk(dut.u_rf.regs[2] == 32'd7, "extended branch target");

    for (int t = 0; t < 60; t++) begin
      gen_random(prog, 200);
      run($sformatf("random%0d", t), c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
