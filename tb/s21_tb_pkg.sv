// s21_tb_pkg: verification helpers for the S21 processor testbenches.
//
// Instruction encoders (one function per assembly form) and s21_iss, an
// instruction-level reference model written directly from the S21
// instruction meanings, independent of the RTL. The model executes one
// whole instruction per step() and keeps registers, PC, RetAds and a sparse
// word memory. It follows the same choices as the RTL where the
// architecture is silent (see s21_alu and s21_core headers): signed div with
// x/0 = -1, signed compares, logical shifts by the full operand, undefined
// opcodes as nop, resr skipping the pointer register.
package s21_tb_pkg;

  // ---- encoders ----------------------------------------------------------
  function automatic logic [31:0] enc_l(int op, int r1, int ads);
    return {5'(op), 5'(r1), 22'(ads)};
  endfunction
  function automatic logic [31:0] enc_d(int op, int r1, int r2, int disp);
    return {5'(op), 5'(r1), 5'(r2), 17'(disp)};
  endfunction
  function automatic logic [31:0] enc_x(int xop, int r1, int r2, int r3);
    return {5'd31, 5'(r1), 5'(r2), 5'(r3), 12'(xop)};
  endfunction

  // mnemonic opcode / xop numbers
  localparam int NOP = 0, LDA = 1, LDD = 2, STA = 3, STD = 4, MVI = 5,
                 JMP = 6, JAL = 7, JT = 8, JF = 9;
  // D-format ALU opcode = 10 + k, X-format xop = k
  localparam int ADD = 0, SUB = 1, MUL = 2, DIV = 3, AND = 4, OR = 5, XOR = 6,
                 EQ = 7, NE = 8, LT = 9, LE = 10, GT = 11, GE = 12, SHL = 13,
                 SHR = 14;
  localparam int X_MV = 15, X_LDX = 16, X_STX = 17, X_RET = 18, X_TRAP = 19,
                 X_PUSH = 20, X_POP = 21, X_NOT = 22, X_INT = 23, X_RETI = 24,
                 X_SAVR = 25, X_RESR = 26, X_SAVT = 27, X_REST = 28;

  function automatic logic [31:0] i_nop();                  return enc_l(NOP, 0, 0); endfunction
  function automatic logic [31:0] i_lda(int r1, int ads);    return enc_l(LDA, r1, ads); endfunction
  function automatic logic [31:0] i_ldd(int r1, int d, int r2); return enc_d(LDD, r1, r2, d); endfunction
  function automatic logic [31:0] i_ldx(int r1, int r2, int r3); return enc_x(X_LDX, r1, r2, r3); endfunction
  function automatic logic [31:0] i_sta(int r1, int ads);    return enc_l(STA, r1, ads); endfunction
  function automatic logic [31:0] i_std(int r1, int d, int r2); return enc_d(STD, r1, r2, d); endfunction
  function automatic logic [31:0] i_stx(int r1, int r2, int r3); return enc_x(X_STX, r1, r2, r3); endfunction
  function automatic logic [31:0] i_mvi(int r1, int n);      return enc_l(MVI, r1, n); endfunction
  function automatic logic [31:0] i_mv(int r1, int r2);      return enc_x(X_MV, r1, r2, 0); endfunction
  function automatic logic [31:0] i_jmp(int ads);            return enc_l(JMP, 0, ads); endfunction
  function automatic logic [31:0] i_jal(int r1, int ads);    return enc_l(JAL, r1, ads); endfunction
  function automatic logic [31:0] i_jt(int r1, int ads);     return enc_l(JT, r1, ads); endfunction
  function automatic logic [31:0] i_jf(int r1, int ads);     return enc_l(JF, r1, ads); endfunction
  function automatic logic [31:0] i_ret(int r1);             return enc_x(X_RET, r1, 0, 0); endfunction
  function automatic logic [31:0] i_opr(int k, int r1, int r2, int r3); return enc_x(k, r1, r2, r3); endfunction
  function automatic logic [31:0] i_opi(int k, int r1, int r2, int n);  return enc_d(10 + k, r1, r2, n); endfunction
  function automatic logic [31:0] i_not(int r1, int r2);     return enc_x(X_NOT, r1, r2, 0); endfunction
  function automatic logic [31:0] i_trap(int n);             return enc_x(X_TRAP, n, 0, 0); endfunction
  function automatic logic [31:0] i_push(int sp, int r2);    return enc_x(X_PUSH, sp, r2, 0); endfunction
  function automatic logic [31:0] i_pop(int sp, int r2);     return enc_x(X_POP, sp, r2, 0); endfunction
  function automatic logic [31:0] i_int();                   return enc_x(X_INT, 0, 0, 0); endfunction
  function automatic logic [31:0] i_reti();                  return enc_x(X_RETI, 0, 0, 0); endfunction
  function automatic logic [31:0] i_savr(int sp);            return enc_x(X_SAVR, sp, 0, 0); endfunction
  function automatic logic [31:0] i_resr(int sp);            return enc_x(X_RESR, sp, 0, 0); endfunction
  function automatic logic [31:0] i_savt(int r1);            return enc_x(X_SAVT, r1, 0, 0); endfunction
  function automatic logic [31:0] i_rest(int r1);            return enc_x(X_REST, r1, 0, 0); endfunction

  // ---- reference ALU -----------------------------------------------------
  function automatic logic [31:0] ref_alu(int k, logic [31:0] a, logic [31:0] b);
    longint sa, sb;
    sa = longint'($signed(a));
    sb = longint'($signed(b));
    case (k)
      ADD: return 32'(sa + sb);
      SUB: return 32'(sa - sb);
      MUL: return 32'(sa * sb);
      DIV: return (sb == 0) ? 32'hFFFF_FFFF : 32'(sa / sb);
      AND: return a & b;
      OR:  return a | b;
      XOR: return a ^ b;
      EQ:  return (a == b) ? 1 : 0;
      NE:  return (a != b) ? 1 : 0;
      LT:  return (sa <  sb) ? 1 : 0;
      LE:  return (sa <= sb) ? 1 : 0;
      GT:  return (sa >  sb) ? 1 : 0;
      GE:  return (sa >= sb) ? 1 : 0;
      SHL: return (b > 31) ? 0 : a << b[4:0];
      SHR: return (b > 31) ? 0 : a >> b[4:0];
      default: return ~a;
    endcase
  endfunction

  // ---- instruction-level model --------------------------------------------
  class s21_iss;
    int unsigned aw;
    logic [31:0] r [32];
    logic [31:0] pc, retads;
    bit          halted;
    logic [31:0] m [int unsigned];
    // trap log: code and R[30] of every trap, in order
    int          trap_code_q [$];
    logic [31:0] trap_val_q  [$];
    int          n_exec [string];

    function new(int unsigned aw_);
      aw = aw_;
      foreach (r[i]) r[i] = 0;
      pc = 0; retads = 0; halted = 0;
    endfunction

    function int unsigned idx(logic [31:0] a);
      return int'(a) & ((1 << aw) - 1);
    endfunction
    function logic [31:0] rd(logic [31:0] a);
      return m.exists(idx(a)) ? m[idx(a)] : 32'd0;
    endfunction
    function void wr(logic [31:0] a, logic [31:0] v);
      m[idx(a)] = v;
    endfunction
    function void setr(int i, logic [31:0] v);
      if (i != 0) r[i] = v;
    endfunction
    function void count(string s);
      if (n_exec.exists(s)) n_exec[s]++; else n_exec[s] = 1;
    endfunction

    // interrupt entry (hardware), used only if a test drives one
    function void hw_interrupt();
      retads = pc;
      pc = rd(1000);
      count("hw_irq");
    endfunction

    function void step();
      logic [31:0] ins, sads, sd, t;
      int op, r1, r2, r3, xop, i;
      if (halted) return;
      ins  = rd(pc);
      pc   = pc + 1;
      op   = int'(ins[31:27]);
      r1   = int'(ins[26:22]);
      r2   = int'(ins[21:17]);
      r3   = int'(ins[16:12]);
      xop  = int'(ins[11:0]);
      sads = {{10{ins[21]}}, ins[21:0]};
      sd   = {{15{ins[16]}}, ins[16:0]};
      case (op)
        LDA: begin setr(r1, rd(sads)); count("ld_abs"); end
        LDD: begin setr(r1, rd(sd + r[r2])); count("ld_ind"); end
        STA: begin wr(sads, r[r1]); count("st_abs"); end
        STD: begin wr(sd + r[r2], r[r1]); count("st_ind"); end
        MVI: begin setr(r1, sads); count("mv_imm"); end
        JMP: begin pc = sads; count("jmp"); end
        JAL: begin setr(r1, pc); pc = sads; count("jal"); end
        JT:  begin if (r[r1] != 0) begin pc = sads; count("jt_taken"); end else count("jt_not"); end
        JF:  begin if (r[r1] == 0) begin pc = sads; count("jf_taken"); end else count("jf_not"); end
        31: begin
          if (xop <= 14) begin setr(r1, ref_alu(xop, r[r2], r[r3])); count("alu_rr"); end
          else case (xop)
            X_MV:   begin setr(r1, r[r2]); count("mv"); end
            X_LDX:  begin setr(r1, rd(r[r2] + r[r3])); count("ld_idx"); end
            X_STX:  begin wr(r[r2] + r[r3], r[r1]); count("st_idx"); end
            X_RET:  begin pc = r[r1]; count("ret"); end
            X_TRAP: begin
              trap_code_q.push_back(r1); trap_val_q.push_back(r[30]);
              if (r1 == 0) halted = 1;
              count("trap");
            end
            X_PUSH: begin setr(r1, r[r1] + 1); wr(r[r1], r[r2]); count("push"); end
            X_POP:  begin t = rd(r[r1]); setr(r2, t); setr(r1, r[r1] - 1); count("pop"); end
            X_NOT:  begin setr(r1, ~r[r2]); count("alu_rr"); end
            X_INT:  begin retads = pc; pc = rd(1000); count("int"); end
            X_RETI: begin pc = retads; count("reti"); end
            X_SAVR: begin
              for (i = 0; i <= 15; i++) begin setr(r1, r[r1] + 1); wr(r[r1], r[i]); end
              count("savr");
            end
            X_RESR: begin
              t = r[r1];
              for (i = 15; i >= 0; i--) begin
                if (i != r1) setr(i, rd(t));
                t = t - 1;
              end
              setr(r1, t);
              count("resr");
            end
            X_SAVT: begin setr(r1, retads); count("savt"); end
            X_REST: begin retads = r[r1]; count("rest"); end
            default: count("undefined");
          endcase
        end
        default: begin
          if (op >= 10 && op <= 24) begin setr(r1, ref_alu(op - 10, r[r2], sd)); count("alu_ri"); end
          else count(op == 0 ? "nop" : "undefined");
        end
      endcase
    endfunction
  endclass

endpackage
