// eisc_tb_pkg: verification helpers for the EISC testbenches.
//
// * Instruction encoders for every format (a tiny assembler).
// * eisc_iss: an instruction-level reference model written from the
//   instruction-set description alone (no pipeline), holding R0..R15, %SP,
//   %ER, E, the C/S/Z/V flags, %ML/%MH and a word-addressed little-endian data
//   memory that wraps modulo its size, the same way the data memory does.
// * A random program generator that mixes every instruction class, LERI
//   chains, forward branches and register-list push/pop, and ends with HALT.
package eisc_tb_pkg;

  typedef logic [15:0] iw_t;

  // --------------------------------------------------------------- encoders
  function automatic iw_t e_ldst(input logic [2:0] op, input logic [3:0] rd,
                                 input logic [2:0] off, input logic [3:0] ix);
    return {2'b00, op[2], op[1], rd, op[0], off, ix};
  endfunction
  function automatic iw_t e_leri(input logic [13:0] c);
    return {2'b01, c};
  endfunction
  function automatic iw_t e_ldsp(input logic st, input logic [3:0] r, input logic [6:0] off);
    return {4'b1000, st, r, off};
  endfunction
  function automatic iw_t e_ldi(input logic [3:0] r, input logic [7:0] imm);
    return {4'b1001, r, imm};
  endfunction
  function automatic iw_t e_br(input logic [3:0] cond, input logic [8:0] off);
    return {3'b101, cond, off};
  endfunction
  function automatic iw_t e_iop(input logic [2:0] op, input logic [5:0] imm, input logic [3:0] r);
    return {3'b110, op, imm, r};
  endfunction
  function automatic iw_t e_rop(input logic [4:0] op, input logic [3:0] s, input logic [3:0] d);
    return {3'b111, op, s, d};
  endfunction
  function automatic iw_t e_addsp(input logic [6:0] imm);
    return {3'b111, 5'd23, 1'b0, imm};
  endfunction
  function automatic iw_t e_list(input logic [4:0] op, input logic [7:0] mask);
    return {3'b111, op, mask};
  endfunction
  localparam iw_t I_HALT = {3'b111, 5'd29, 8'd0};
  localparam iw_t I_NOP  = {3'b111, 5'd28, 8'd0};

  // --------------------------------------------------------------- reference model
  class eisc_iss;
    logic [31:0] r[17];
    logic [31:0] pc, er, ml, mh;
    logic        e, fc, fs, fz, fv;
    logic        halted;
    int          n_list;   // register-list instructions executed
    int unsigned words;
    logic [31:0] mem[];

    function new(int unsigned nwords, logic [31:0] sp_reset);
      words = nwords;
      mem = new[nwords];
      foreach (r[i]) r[i] = '0;
      r[16] = sp_reset;
      pc = 0; er = 0; ml = 0; mh = 0;
      e = 0; fc = 0; fs = 0; fz = 0; fv = 0;
      halted = 0;
      n_list = 0;
    endfunction

    function int unsigned widx(logic [31:0] a);
      return (a >> 2) % words;
    endfunction

    function logic [31:0] load(logic [31:0] a, int size, bit sgn);
      logic [31:0] w;
      logic [7:0]  b8;
      logic [15:0] h;
      w  = mem[widx(a)];
      b8 = w[8*a[1:0] +: 8];
      h  = a[1] ? w[31:16] : w[15:0];
      case (size)
        1:       return sgn ? {{24{b8[7]}}, b8} : {24'd0, b8};
        2:       return sgn ? {{16{h[15]}}, h} : {16'd0, h};
        default: return w;
      endcase
    endfunction

    function void store(logic [31:0] a, int size, logic [31:0] d);
      int unsigned i;
      i = widx(a);
      case (size)
        1:       mem[i][8*a[1:0] +: 8] = d[7:0];
        2:       if (a[1]) mem[i][31:16] = d[15:0]; else mem[i][15:0] = d[15:0];
        default: mem[i] = d;
      endcase
    endfunction

    function void arith(logic [31:0] a, logic [31:0] b, logic cin, output logic [31:0] y);
      logic [32:0] s;
      s  = {1'b0, a} + {1'b0, b} + 33'(cin);
      y  = s[31:0];
      fc = s[32];
      fv = (a[31] == b[31]) && (y[31] != a[31]);
      fs = y[31];
      fz = (y == 0);
    endfunction

    function void logic_flags(logic [31:0] y, logic c);
      fs = y[31]; fz = (y == 0); fc = c; fv = 0;
    endfunction

    function logic [31:0] shift(logic [31:0] a, logic [31:0] b, int kind);
      int sh;
      logic [31:0] y;
      logic c;
      sh = int'(b[4:0]);
      c  = 0;
      case (kind)
        0: begin y = a << sh; if (sh != 0) c = a[32-sh]; end
        1: begin y = a >> sh; if (sh != 0) c = a[sh-1]; end
        default: begin y = $signed(a) >>> sh; if (sh != 0) c = a[sh-1]; end
      endcase
      logic_flags(y, c);
      return y;
    endfunction

    function bit cond(logic [3:0] cc);
      case (cc)
        0: return fz;            1: return !fz;
        2: return fc;            3: return !fc;
        4: return fs;            5: return !fs;
        6: return fv;            7: return !fv;
        8: return fc && !fz;     9: return !fc || fz;
        10: return fs == fv;     11: return fs != fv;
        12: return !fz && (fs == fv);
        13: return fz || (fs != fv);
        default: return 1;
      endcase
    endfunction

    function void step(iw_t i);
      logic [31:0] nextpc, imm, y, a, ea;
      logic [2:0]  op;
      int          sz, scale, n, k;
      logic [63:0] p;
      nextpc = pc + 2;
      if (i[15:14] == 2'b01) begin
        er = e ? ((er << 14) | {18'd0, i[13:0]}) : {{18{i[13]}}, i[13:0]};
        e  = 1;
        pc = nextpc;
        return;
      end
      casez (i[15:12])
        4'b00??: begin
          op = {i[13], i[12], i[7]};
          case (op)
            3'b000, 3'b011, 3'b100: begin sz = 1; scale = 0; end
            3'b001, 3'b111, 3'b101: begin sz = 2; scale = 1; end
            default:                begin sz = 4; scale = 2; end
          endcase
          ea = r[i[3:0]] + ({29'd0, i[6:4]} << scale);
          if (e) ea = ea + ((scale == 0) ? (er << 3) : (er << 4));
          case (op)
            3'b000: r[i[11:8]] = load(ea, 1, 1);
            3'b001: r[i[11:8]] = load(ea, 2, 1);
            3'b010: r[i[11:8]] = load(ea, 4, 0);
            3'b011: r[i[11:8]] = load(ea, 1, 0);
            3'b111: r[i[11:8]] = load(ea, 2, 0);
            default: store(ea, sz, r[i[11:8]]);
          endcase
        end
        4'b1000: begin
          ea = r[16] + {23'd0, i[6:0], 2'b00};
          if (e) ea = ea + (er << 9);
          if (i[11]) store(ea, 4, r[i[10:7]]);
          else       r[i[10:7]] = load(ea, 4, 0);
        end
        4'b1001: r[i[11:8]] = e ? {er[23:0], i[7:0]} : {{24{i[7]}}, i[7:0]};
        4'b101?: begin
          imm = e ? {er[21:0], i[8:0], 1'b0} : {{22{i[8]}}, i[8:0], 1'b0};
          if (i[12:9] == 4'd15) r[15] = pc + 2;
          if (cond(i[12:9])) nextpc = pc + imm;
        end
        4'b110?: begin
          imm = e ? {er[25:0], i[9:4]} : {{26{i[9]}}, i[9:4]};
          a = r[i[3:0]];
          case (i[12:10])
            0: begin arith(a, imm, 0, y); r[i[3:0]] = y; end
            1: arith(a, ~imm, 1, y);
            2: begin y = a & imm; logic_flags(y, 0); r[i[3:0]] = y; end
            3: begin y = a | imm; logic_flags(y, 0); r[i[3:0]] = y; end
            4: begin y = a ^ imm; logic_flags(y, 0); r[i[3:0]] = y; end
            5: begin y = a & imm; logic_flags(y, 0); end
            6: r[i[3:0]] = shift(a, imm, 0);
            default: r[i[3:0]] = shift(a, imm, 1);
          endcase
        end
        default: begin
          logic [31:0] d, s;
          d = r[i[3:0]]; s = r[i[7:4]];
          case (i[12:8])
            0:  r[i[3:0]] = s;
            1:  begin arith(d, s, 0, y); r[i[3:0]] = y; end
            2:  begin arith(d, s, fc, y); r[i[3:0]] = y; end
            3:  begin arith(d, ~s, 1, y); r[i[3:0]] = y; end
            4:  begin arith(d, ~s, fc, y); r[i[3:0]] = y; end
            5:  begin y = d & s; logic_flags(y, 0); r[i[3:0]] = y; end
            6:  begin y = d | s; logic_flags(y, 0); r[i[3:0]] = y; end
            7:  begin y = d ^ s; logic_flags(y, 0); r[i[3:0]] = y; end
            8:  arith(d, ~s, 1, y);
            9:  begin y = d & s; logic_flags(y, 0); end
            10: r[i[3:0]] = shift(d, s, 0);
            11: r[i[3:0]] = shift(d, s, 1);
            12: r[i[3:0]] = shift(d, s, 2);
            13: begin y = ~s; logic_flags(y, 0); r[i[3:0]] = y; end
            14: begin y = -s; fs = y[31]; fz = (y == 0); fc = (s == 0);
                      fv = (s == 32'h8000_0000); r[i[3:0]] = y; end
            15: begin p = $signed({{32{d[31]}}, d}) * $signed({{32{s[31]}}, s});
                      ml = p[31:0]; mh = p[63:32]; end
            16: begin p = {32'd0, d} * {32'd0, s}; ml = p[31:0]; mh = p[63:32]; end
            17: r[i[3:0]] = ml;
            18: r[i[3:0]] = mh;
            19: nextpc = s;
            20: begin nextpc = s; r[15] = pc + 2; end
            21: r[i[3:0]] = r[16];
            22: r[16] = s;
            23: begin
              imm = e ? {er[22:0], i[6:0], 2'b00} : {{23{i[6]}}, i[6:0], 2'b00};
              r[16] = r[16] + imm;
            end
            24, 25, 26, 27: begin
              int base;
              n = $countones(i[7:0]);
              n_list++;
              base = (i[12:8] == 25 || i[12:8] == 27) ? 8 : 0;
              k = 0;
              for (int b = 0; b < 8; b++) if (i[b]) begin
                if (i[12:8] >= 26) r[base+b] = load(r[16] + 32'(4*k), 4, 0);
                else               store(r[16] - 32'(4*n) + 32'(4*k), 4, r[base+b]);
                k++;
              end
              if (i[12:8] >= 26) r[16] = r[16] + 32'(4*n);
              else               r[16] = r[16] - 32'(4*n);
            end
            29: halted = 1;
            default: ;
          endcase
        end
      endcase
      e  = 0;
      pc = nextpc;
    endfunction

    // run a program held as an array of halfwords from address 0
    function int run(iw_t prog[$], int max_steps);
      int steps;
      steps = 0;
      while (!halted && steps < max_steps) begin
        int unsigned hi;
        hi = pc >> 1;
        step((hi < prog.size()) ? prog[hi] : 16'h0000);
        steps++;
      end
      return steps;
    endfunction
  endclass

  // --------------------------------------------------------------- random program
  // n_body random instructions followed by HALT. Branches only go forward and
  // never past the HALT; no LERI directly before a branch or JAL so that
  // offsets stay short.
  function automatic void gen_random(ref iw_t prog[$], input int n_body);
    int kind;
    prog.delete();
    while (prog.size() < n_body) begin
      kind = $urandom_range(0, 99);
      if (kind < 10) begin                         // LERI chain + consumer
        int nl;
        nl = $urandom_range(1, 3);
        for (int j = 0; j < nl; j++) prog.push_back(e_leri(14'($urandom)));
        case ($urandom_range(0, 4))
          0: prog.push_back(e_ldi(4'($urandom), 8'($urandom)));
          1: prog.push_back(e_iop(3'($urandom), 6'($urandom), 4'($urandom)));
          2: prog.push_back(e_ldst(3'($urandom), 4'($urandom), 3'($urandom), 4'($urandom)));
          3: prog.push_back(e_ldsp(1'($urandom), 4'($urandom), 7'($urandom)));
          default: prog.push_back(e_addsp(7'($urandom)));
        endcase
      end else if (kind < 22) prog.push_back(e_ldi(4'($urandom), 8'($urandom)));
      else if (kind < 34) prog.push_back(e_iop(3'($urandom), 6'($urandom), 4'($urandom)));
      else if (kind < 54) begin
        logic [4:0] op;
        op = 5'($urandom_range(0, 18));
        prog.push_back(e_rop(op, 4'($urandom), 4'($urandom)));
      end else if (kind < 70) prog.push_back(e_ldst(3'($urandom), 4'($urandom), 3'($urandom), 4'($urandom)));
      else if (kind < 78) prog.push_back(e_ldsp(1'($urandom), 4'($urandom), 7'($urandom)));
      else if (kind < 84) prog.push_back(e_rop(5'($urandom_range(21, 23)), 4'($urandom), 4'($urandom)));
      else if (kind < 89) prog.push_back(e_list(5'($urandom_range(24, 27)), 8'($urandom)));
      else begin                                   // forward branch / JAL
        int left, skip;
        left = n_body - prog.size() - 1;
        skip = (left > 0) ? $urandom_range(0, (left < 4) ? left : 4) : 0;
        prog.push_back(e_br(4'($urandom), 9'(skip + 1)));
      end
    end
    prog.push_back(I_HALT);
  endfunction

endpackage
