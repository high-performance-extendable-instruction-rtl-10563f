// eisc_core: five-stage pipelined EISC processor core.
//
// Stages: IF (fetch one 16-bit instruction), ID (extension unit, decode,
// register read, push/pop expansion, interlock), EX (ALU, multiply, branch
// resolution), MEM (data memory access), WB (load alignment, register write).
//
// What follows the architecture: 16-bit fixed-length instructions; sixteen
// general registers plus %SP; load/store-only memory access; the extension
// register and E-flag that lengthen short operands; register-list push/pop;
// condition flags C,S,Z,V with fourteen branch conditions; %ML/%MH multiply
// registers; hardware interlocks instead of compiler-inserted NOPs; and the
// E-flag resolved at decode time ("virtualised"), so no instruction waits on
// an older one to learn its E value or %ER.
//
// This implementation's own choices: the opcode layout outside the LERI and
// index load/store formats (see eisc_pkg); full forwarding from MEM and WB
// into EX with a one-cycle interlock for a load followed by a use of its
// result; branches and register jumps resolved in EX, predicted not taken,
// with the two younger instructions squashed when taken; flags written at the
// end of EX so a branch right after a compare sees them; HALT stops fetch and
// raises halted once it has left WB.
//
// Memory interfaces: instruction fetch is asynchronous (imem_addr out,
// imem_data back in the same cycle). The data port is synchronous: request,
// address, byte enables and write data during MEM, read data during WB.
// Event counters (cycles, retired operations, load-use stalls, forwards,
// taken redirects, E-extended operands, LERIs, push/pop micro-ops, multiplies)
// are brought out for measurement.
module eisc_core
  import eisc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = 32'h0000_0000,
  parameter logic [XLEN-1:0] SP_RESET = 32'h0000_4000
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction fetch
  output logic [XLEN-1:0] imem_addr,
  input  logic [15:0]     imem_data,
  // data memory
  output logic            dmem_req,
  output logic            dmem_we,
  output logic [3:0]      dmem_be,
  output logic [XLEN-1:0] dmem_addr,
  output logic [XLEN-1:0] dmem_wdata,
  input  logic [XLEN-1:0] dmem_rdata,
  // status
  output logic            halted,
  output flags_t          flags_o,
  output logic [31:0]     cnt_cycles,
  output logic [31:0]     cnt_retired,
  output logic [31:0]     cnt_loaduse,
  output logic [31:0]     cnt_forward,
  output logic [31:0]     cnt_redirect,
  output logic [31:0]     cnt_eext,
  output logic [31:0]     cnt_leri,
  output logic [31:0]     cnt_ppuop,
  output logic [31:0]     cnt_mul
);

  // ------------------------------------------------------------------ IF
  logic [XLEN-1:0] pc_q;
  logic            halting_q;
  logic            if_id_valid;
  logic [15:0]     if_id_instr;
  logic [XLEN-1:0] if_id_pc;

  // stage registers between ID/EX, EX/MEM, MEM/WB
  typedef struct packed {
    ctrl_t           c;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
  } id_ex_t;

  typedef struct packed {
    ctrl_t           c;
    logic [XLEN-1:0] res;
    logic [XLEN-1:0] sdata;
  } ex_mem_t;

  typedef struct packed {
    ctrl_t           c;
    logic [XLEN-1:0] res;
  } mem_wb_t;

  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  logic            redirect;
  logic [XLEN-1:0] redirect_pc;
  logic            stall_id;
  logic            id_advance;
  logic            id_step;

  assign imem_addr = pc_q;

  // ------------------------------------------------------------------ ID
  logic            e_flag;
  logic            is_leri;
  logic [XLEN-1:0] ext_imm;
  ctrl_t           dec_ctrl;
  logic            pp_valid, pp_pop, pp_high, pp_last;
  logic [7:0]      pp_mask;
  ctrl_t           pp_uop;
  ctrl_t           id_ctrl;
  logic [XLEN-1:0] rf_a, rf_b;
  logic            wb_we;
  logic [XLEN-1:0] wb_value;

  eisc_ext_unit u_ext (
    .clk, .rst_n,
    .instr   (if_id_instr),
    .advance (id_advance),
    .e_flag, .er (), .is_leri, .ext_imm
  );

  eisc_decoder u_dec (
    .valid   (if_id_valid),
    .instr   (if_id_instr),
    .ext_imm (ext_imm),
    .ctrl    (dec_ctrl),
    .pp_valid, .pp_pop, .pp_high, .pp_mask
  );

  eisc_pushpop u_pp (
    .clk, .rst_n,
    .start  (pp_valid),
    .is_pop (pp_pop),
    .high   (pp_high),
    .mask   (pp_mask),
    .step   (id_step),
    .uop    (pp_uop),
    .last   (pp_last)
  );

  assign id_ctrl = pp_valid ? pp_uop : dec_ctrl;

  eisc_regfile #(.SP_RESET(SP_RESET)) u_rf (
    .clk, .rst_n,
    .ra_addr (id_ctrl.ra), .ra_data (rf_a),
    .rb_addr (id_ctrl.rb), .rb_data (rf_b),
    .we      (wb_we),
    .w_addr  (mem_wb.c.rd),
    .w_data  (wb_value)
  );

  // load-use interlock: a load in EX whose result ID needs
  assign stall_id = id_ex.c.valid && id_ex.c.mem_rd && id_ex.c.we && id_ctrl.valid &&
                    ((id_ctrl.use_a && (id_ctrl.ra == id_ex.c.rd)) ||
                     (id_ctrl.use_b && (id_ctrl.rb == id_ex.c.rd)));

  assign id_step    = if_id_valid && !stall_id && !redirect;
  assign id_advance = id_step && (!pp_valid || pp_last);

  // ------------------------------------------------------------------ EX
  logic [XLEN-1:0] ex_a, ex_b, alu_b, alu_y;
  flags_t          alu_flags, flags_q;
  logic            cond_taken;
  logic [XLEN-1:0] ml, mh;
  logic [XLEN-1:0] ex_res;
  logic            fwd_a_mem, fwd_a_wb, fwd_b_mem, fwd_b_wb;

  assign fwd_a_mem = ex_mem.c.valid && ex_mem.c.we && !ex_mem.c.mem_rd && (ex_mem.c.rd == id_ex.c.ra);
  assign fwd_b_mem = ex_mem.c.valid && ex_mem.c.we && !ex_mem.c.mem_rd && (ex_mem.c.rd == id_ex.c.rb);
  assign fwd_a_wb  = wb_we && (mem_wb.c.rd == id_ex.c.ra);
  assign fwd_b_wb  = wb_we && (mem_wb.c.rd == id_ex.c.rb);

  assign ex_a = fwd_a_mem ? ex_mem.res : fwd_a_wb ? wb_value : id_ex.a;
  assign ex_b = fwd_b_mem ? ex_mem.res : fwd_b_wb ? wb_value : id_ex.b;
  assign alu_b = id_ex.c.b_imm ? id_ex.c.imm : ex_b;

  eisc_alu u_alu (
    .a (ex_a), .b (alu_b), .op (id_ex.c.alu_op), .cin (flags_q.c),
    .y (alu_y), .flags (alu_flags)
  );

  eisc_cond u_cond (.cond (id_ex.c.cond), .flags (flags_q), .taken (cond_taken));

  eisc_mul u_mul (
    .clk, .rst_n,
    .start     (id_ex.c.valid && id_ex.c.mul),
    .is_signed (id_ex.c.mul_signed),
    .a (ex_a), .b (ex_b), .ml, .mh
  );

  always_comb begin
    if (id_ex.c.link)             ex_res = id_ex.pc + 32'd2;
    else if (id_ex.c.mf == MF_ML) ex_res = ml;
    else if (id_ex.c.mf == MF_MH) ex_res = mh;
    else                          ex_res = alu_y;
  end

  assign redirect    = id_ex.c.valid && ((id_ex.c.branch && cond_taken) || id_ex.c.jreg);
  assign redirect_pc = id_ex.c.jreg ? ex_b : (id_ex.pc + id_ex.c.imm);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags_q <= '0;
    else if (id_ex.c.valid && id_ex.c.set_flags) flags_q <= alu_flags;
  end
  assign flags_o = flags_q;

  // ------------------------------------------------------------------ MEM
  logic [XLEN-1:0] st_wdata;
  logic [3:0]      st_be;
  logic [XLEN-1:0] ld_data;

  eisc_lsu u_lsu (
    .st_addr_lo (ex_mem.res[1:0]),
    .st_size    (ex_mem.c.mem_size),
    .st_data    (ex_mem.sdata),
    .st_wdata, .st_be,
    .ld_addr_lo (mem_wb.res[1:0]),
    .ld_size    (mem_wb.c.mem_size),
    .ld_sign    (mem_wb.c.mem_sign),
    .ld_word    (dmem_rdata),
    .ld_data
  );

  assign dmem_req   = ex_mem.c.valid && (ex_mem.c.mem_rd || ex_mem.c.mem_wr);
  assign dmem_we    = ex_mem.c.valid && ex_mem.c.mem_wr;
  assign dmem_be    = st_be;
  assign dmem_addr  = ex_mem.res;
  assign dmem_wdata = st_wdata;

  // ------------------------------------------------------------------ WB
  assign wb_we    = mem_wb.c.valid && mem_wb.c.we;
  assign wb_value = mem_wb.c.mem_rd ? ld_data : mem_wb.res;

  // ------------------------------------------------------------------ pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= RESET_PC;
      halting_q   <= 1'b0;
      if_id_valid <= 1'b0;
      if_id_instr <= '0;
      if_id_pc    <= '0;
      id_ex       <= '{c: CTRL_NOP, default: '0};
      ex_mem      <= '{c: CTRL_NOP, default: '0};
      mem_wb      <= '{c: CTRL_NOP, default: '0};
      halted      <= 1'b0;
    end else begin
      // fetch / IF-ID
      if (redirect) begin
        pc_q        <= redirect_pc;
        if_id_valid <= 1'b0;
      end else if (halting_q || (id_advance && id_ctrl.halt)) begin
        if (id_advance) if_id_valid <= 1'b0;
      end else if (!if_id_valid || id_advance) begin
        pc_q        <= pc_q + 32'd2;
        if_id_valid <= 1'b1;
        if_id_instr <= imem_data;
        if_id_pc    <= pc_q;
      end
      if (id_advance && id_ctrl.halt) halting_q <= 1'b1;

      // ID-EX
      if (id_step) begin
        id_ex.c  <= id_ctrl;
        id_ex.pc <= if_id_pc;
        id_ex.a  <= rf_a;
        id_ex.b  <= rf_b;
      end else begin
        id_ex.c  <= CTRL_NOP;
      end

      // EX-MEM
      ex_mem.c     <= id_ex.c;
      ex_mem.res   <= ex_res;
      ex_mem.sdata <= ex_b;

      // MEM-WB
      mem_wb.c   <= ex_mem.c;
      mem_wb.res <= ex_mem.res;

      if (mem_wb.c.valid && mem_wb.c.halt) halted <= 1'b1;
    end
  end

  // ------------------------------------------------------------------ event counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_cycles   <= '0;
      cnt_retired  <= '0;
      cnt_loaduse  <= '0;
      cnt_forward  <= '0;
      cnt_redirect <= '0;
      cnt_eext     <= '0;
      cnt_leri     <= '0;
      cnt_ppuop    <= '0;
      cnt_mul      <= '0;
    end else if (!halted) begin
      cnt_cycles <= cnt_cycles + 1;
      if (mem_wb.c.valid) cnt_retired <= cnt_retired + 1;
      if (if_id_valid && stall_id && !redirect) cnt_loaduse <= cnt_loaduse + 1;
      if (id_ex.c.valid && ((id_ex.c.use_a && (fwd_a_mem || fwd_a_wb)) ||
                            (id_ex.c.use_b && (fwd_b_mem || fwd_b_wb))))
        cnt_forward <= cnt_forward + 1;
      if (redirect) cnt_redirect <= cnt_redirect + 1;
      if (id_advance && e_flag && !is_leri) cnt_eext <= cnt_eext + 1;
      if (id_advance && is_leri) cnt_leri <= cnt_leri + 1;
      if (id_step && pp_valid) cnt_ppuop <= cnt_ppuop + 1;
      if (id_ex.c.valid && id_ex.c.mul) cnt_mul <= cnt_mul + 1;
    end
  end

  // ------------------------------------------------------------------ checks
  a_no_stall_on_leri: assert property (@(posedge clk) disable iff (!rst_n)
    (if_id_valid && is_leri) |-> !stall_id);
  a_wb_reg_range: assert property (@(posedge clk) disable iff (!rst_n)
    wb_we |-> (int'(mem_wb.c.rd) <= int'(REG_SP)));

endmodule
