// tb_eisc_top: end-to-end test of the EISC microcontroller.
//
// Each test loads a program into program memory while the core is in reset,
// fills data memory with a known pattern, runs to HALT and then compares every
// register, %ML/%MH, the flags and the whole data memory with the
// instruction-level reference model eisc_iss run on the same program.
// Programs:
//   1. a straight-line program of LERI chains and their consumers: besides
//      the state, its cycle count must be exactly N+4 (one instruction per
//      cycle plus pipeline fill): the decode-time E-flag adds no stalls;
//   2. a directed program with a counted loop (backward branch), loads used
//      right away (interlock), JAL/JR, multiply, push/pop lists and sub-word
//      loads and stores;
//   3. NRAND random programs mixing every instruction class.
// The design's mechanisms (load-use interlock, forwarding, taken redirect,
// E-extended operands, LERI, push/pop micro-ops, multiply) are counted from
// the core's event counters over all runs; one that never happened fails.
module tb_eisc_top;
  import eisc_pkg::*;
  import eisc_tb_pkg::*;

  localparam int unsigned IMEM_DEPTH = 4096;
  localparam int unsigned DMEM_DEPTH = 4096;
  localparam int NRAND = 40;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        prog_we = 0;
  logic [11:0] prog_addr = 0;
  logic [15:0] prog_data = 0;
  logic [31:0] dbg_addr = 0;
  logic [31:0] dbg_rdata;
  logic        halted;
  flags_t      flags;
  logic [31:0] cnt_cycles, cnt_retired, cnt_loaduse, cnt_forward, cnt_redirect,
               cnt_eext, cnt_leri, cnt_ppuop, cnt_mul;

  eisc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint tot_loaduse = 0, tot_forward = 0, tot_redirect = 0, tot_eext = 0,
          tot_leri = 0, tot_ppuop = 0, tot_mul = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] pattern(int i);
    return 32'h9E37_79B9 * (i + 1) ^ 32'(i);
  endfunction

  // run a program on the design and the model; returns cycles to halt
  task automatic run(input iw_t prog[$], input string name, output int cycles);
    eisc_iss iss;
    int steps, wd, bad;
    rst_n = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < IMEM_DEPTH; i++) begin
      prog_we   <= 1;
      prog_addr <= 12'(i);
      prog_data <= (i < prog.size()) ? prog[i] : 16'h0000;
      @(posedge clk);
    end
    prog_we <= 0;
    for (int i = 0; i < DMEM_DEPTH; i++) dut.u_dmem.mem[i] = pattern(i);
    iss = new(DMEM_DEPTH, 32'(DMEM_DEPTH * 4));
    for (int i = 0; i < DMEM_DEPTH; i++) iss.mem[i] = pattern(i);
    steps = iss.run(prog, 200000);
    check(iss.halted == 1, {name, ": model reached HALT"});
    @(negedge clk);
    rst_n = 1;
    wd = 0;
    while (!halted && wd < 400000) begin @(posedge clk); wd++; end
    check(halted == 1, {name, ": design reached HALT"});
    @(negedge clk);
    cycles = int'(cnt_cycles);
    bad = 0;
    for (int i = 0; i < 17; i++) begin
      if (dut.u_core.u_rf.regs[i] !== iss.r[i]) begin
        bad++;
        if (failures < 20)
          $display("  %s r%0d design=%h model=%h", name, i, dut.u_core.u_rf.regs[i], iss.r[i]);
      end
    end
    check(bad == 0, {name, ": registers"});
    check(dut.u_core.u_mul.ml === iss.ml && dut.u_core.u_mul.mh === iss.mh, {name, ": ML/MH"});
    check(flags === {iss.fc, iss.fs, iss.fz, iss.fv}, {name, ": flags"});
    bad = 0;
    for (int i = 0; i < DMEM_DEPTH; i++) begin
      dbg_addr = 32'(i * 4);
      #1;
      if (dbg_rdata !== iss.mem[i]) begin
        bad++;
        if (bad < 4) $display("  %s mem[%0d] design=%h model=%h", name, i, dbg_rdata, iss.mem[i]);
      end
    end
    check(bad == 0, {name, ": data memory"});
    // every cycle is accounted for: one per instruction, the extra micro-ops
    // of push/pop lists, interlock cycles, two per taken redirect, four to
    // drain the pipeline after HALT
    check(cycles == steps + int'(cnt_ppuop) - iss.n_list + int'(cnt_loaduse) + 2 * int'(cnt_redirect) + 4,
          $sformatf("%s: %0d cycles, %0d steps", name, cycles, steps));
    tot_loaduse  += cnt_loaduse;
    tot_forward  += cnt_forward;
    tot_redirect += cnt_redirect;
    tot_eext     += cnt_eext;
    tot_leri     += cnt_leri;
    tot_ppuop    += cnt_ppuop;
    tot_mul      += cnt_mul;
  endtask

  initial begin
    iw_t p[$];
    int cyc;

    // 0. the code fragment of the E-flag dependency study, in this ISA
    //    (three-operand andi written as mov + andi; jz = beq)
    p.delete();
    p.push_back(e_ldi(4'd3, 8'h07));
    p.push_back(e_rop(5'd0, 4'd3, 4'd1));                    // mov r1 = r3
    p.push_back(e_iop(3'd2, 6'h03, 4'd1));                   // andi r1, 3
    p.push_back(e_iop(3'd1, 6'h01, 4'd1));                   // cmpi r1, 1
    p.push_back(e_ldsp(1'b0, 4'd0, 7'h04));                  // ld (sp,0x10), r0
    p.push_back(e_ldsp(1'b0, 4'd3, 7'h05));                  // ld (sp,0x14), r3
    p.push_back(e_ldi(4'd2, 8'h00));                         // ldi 0, r2
    p.push_back(e_iop(3'd5, 6'h01, 4'd3));                   // tsti r3, 1
    p.push_back(e_br(4'd0, 9'd2));                           // jz .L2
    p.push_back(e_ldi(4'd9, 8'h01));
    p.push_back(I_HALT);                                     // .L2
    run(p, "fragment", cyc);
    check(cnt_loaduse == 0, "fragment: E-flag chain caused no stall");
    check(cyc <= p.size() + 4 + 2, $sformatf("fragment: %0d cycles", cyc));

    // 1. straight-line LERI program: no stalls allowed
    p.delete();
    p.push_back(e_ldi(4'd1, 8'h12));
    p.push_back(e_leri(14'h1234));
    p.push_back(e_ldi(4'd2, 8'h56));                        // r2 = 0x123456
    p.push_back(e_leri(14'h0001));
    p.push_back(e_leri(14'h2345));
    p.push_back(e_leri(14'h3fff));
    p.push_back(e_iop(3'd0, 6'h01, 4'd2));                   // r2 += long const
    p.push_back(e_leri(14'h0002));
    p.push_back(e_ldsp(1'b1, 4'd2, 7'h01));                  // st r2, SP+(2<<9)+4
    p.push_back(e_leri(14'h3ff0));
    p.push_back(e_addsp(7'h05));                              // SP += {ER,5}<<2
    p.push_back(e_rop(5'd1, 4'd1, 4'd2));                    // add r2 += r1
    p.push_back(e_leri(14'h0010));
    p.push_back(e_ldst(3'b110, 4'd2, 3'd1, 4'd1));           // st r2 -> r1 + (16<<4)+4
    p.push_back(e_ldi(4'd3, 8'h80));                         // no E: sign-extend
    p.push_back(e_leri(14'h2000));
    p.push_back(e_iop(3'd3, 6'h3f, 4'd3));                   // ori with extended const
    p.push_back(e_rop(5'd0, 4'd3, 4'd4));                    // mov r4 = r3
    p.push_back(I_HALT);
    run(p, "leri_straight", cyc);
    check(cyc == p.size() + 4, $sformatf("leri_straight: %0d cycles, expected %0d", cyc, p.size() + 4));

    // 2. directed program
    p.delete();
    p.push_back(e_ldi(4'd1, 8'd10));                         // 0 r1 = 10 (loop count)
    p.push_back(e_ldi(4'd2, 8'd0));                          // 1 r2 = 0 (sum)
    p.push_back(e_ldi(4'd5, 8'h40));                         // 2 r5 = 0x40 base
    p.push_back(e_ldst(3'b110, 4'd1, 3'd0, 4'd5));           // 3 loop: st r1,(r5)
    p.push_back(e_ldst(3'b010, 4'd3, 3'd0, 4'd5));           // 4 ld r3,(r5)
    p.push_back(e_rop(5'd1, 4'd3, 4'd2));                    // 5 add r2 += r3 (load-use)
    p.push_back(e_iop(3'd0, 6'h3f, 4'd1));                   // 6 r1 -= 1
    p.push_back(e_iop(3'd1, 6'd0, 4'd1));                    // 7 cmpi r1,0
    p.push_back(e_br(4'd1, 9'h1fb));                          // 8 bne -5 (to 3)
    p.push_back(e_ldi(4'd6, 8'hfe));                         // 9 r6 = -2
    p.push_back(e_rop(5'd15, 4'd2, 4'd6));                   // 10 mul r6*r2
    p.push_back(e_rop(5'd17, 4'd0, 4'd7));                   // 11 mfml r7
    p.push_back(e_rop(5'd18, 4'd0, 4'd8));                   // 12 mfmh r8
    p.push_back(e_rop(5'd16, 4'd2, 4'd6));                   // 13 mulu
    p.push_back(e_rop(5'd18, 4'd0, 4'd9));                   // 14 mfmh r9
    p.push_back(e_list(5'd24, 8'b1111_0110));                // 15 push r1,r2,r4..r7
    p.push_back(e_ldi(4'd1, 8'd0));                          // 16
    p.push_back(e_ldi(4'd2, 8'd0));                          // 17
    p.push_back(e_list(5'd26, 8'b0000_0110));                // 18 pop r1,r2
    p.push_back(e_br(4'd15, 9'd6));                          // 19 jal +6 (to 25)
    p.push_back(e_ldst(3'b100, 4'd6, 3'd5, 4'd5));           // 20 stb r6,(r5+5)
    p.push_back(e_ldst(3'b101, 4'd7, 3'd3, 4'd5));           // 21 sts r7,(r5+6)
    p.push_back(e_ldst(3'b000, 4'd10, 3'd5, 4'd5));          // 22 ldb r10
    p.push_back(e_ldst(3'b111, 4'd11, 3'd3, 4'd5));          // 23 ldsu r11
    p.push_back(I_HALT);                                     // 24
    p.push_back(e_ldst(3'b011, 4'd12, 3'd1, 4'd5));          // 25 ldbu r12
    p.push_back(e_ldst(3'b001, 4'd13, 3'd1, 4'd5));          // 26 lds r13
    p.push_back(e_rop(5'd19, 4'd15, 4'd0));                  // 27 jr r15
    run(p, "directed", cyc);

    // 3. random programs
    for (int t = 0; t < NRAND; t++) begin
      gen_random(p, 300);
      run(p, $sformatf("random%0d", t), cyc);
    end

    $display("events: loaduse=%0d forward=%0d redirect=%0d eext=%0d leri=%0d ppuop=%0d mul=%0d",
             tot_loaduse, tot_forward, tot_redirect, tot_eext, tot_leri, tot_ppuop, tot_mul);
    check(tot_loaduse  > 0, "load-use interlock never happened");
    check(tot_forward  > 0, "forwarding never happened");
    check(tot_redirect > 0, "taken branch never happened");
    check(tot_eext     > 0, "E-extended operand never happened");
    check(tot_leri     > 0, "LERI never happened");
    check(tot_ppuop    > 0, "push/pop micro-op never happened");
    check(tot_mul      > 0, "multiply never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
