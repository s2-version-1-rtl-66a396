// s21_decoder_tb: self-checking test of s21_decoder.
// Encodes every defined S21 instruction with random register fields and
// immediates (through the s21_tb_pkg encoders) and checks the decoded
// class, ALU operation, addressing mode, register fields and sign-extended
// immediate against values derived from the opcode tables. Also checks that
// undefined opcodes and xops decode as illegal.
module s21_decoder_tb;
  import s21_pkg::*;
  import s21_tb_pkg::*;

  logic [31:0] instr;
  dec_t        dec;
  int checks = 0, failures = 0;

  s21_decoder dut (.instr, .dec);

  task automatic expect_dec(string what, iclass_e cls, int alu, int am, logic bimm,
                            logic [31:0] imm, bit chk_imm, int r1, int r2, int r3);
    #1;
    checks++;
    if (dec.cls !== cls || (cls == IC_ALU && (int'(dec.alu_op) != alu || dec.b_imm !== bimm)) ||
        (cls inside {IC_LD, IC_ST} && int'(dec.amode) != am) ||
        (chk_imm && dec.imm !== imm) || int'(dec.r1) != r1 ||
        (r2 >= 0 && int'(dec.r2) != r2) || (r3 >= 0 && int'(dec.r3) != r3)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s instr=%h cls=%s alu=%0d am=%0d imm=%h r=%0d,%0d,%0d", what, instr,
                 dec.cls.name(), dec.alu_op, dec.amode, dec.imm, dec.r1, dec.r2, dec.r3);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      int r1, r2, r3, a22, d17;
      logic [31:0] s22, s17;
      r1 = $urandom % 32; r2 = $urandom % 32; r3 = $urandom % 32;
      a22 = $urandom % (1 << 22); d17 = $urandom % (1 << 17);
      s22 = (a22 >= (1 << 21)) ? 32'(a22 - (1 << 22)) : 32'(a22);
      s17 = (d17 >= (1 << 16)) ? 32'(d17 - (1 << 17)) : 32'(d17);
      instr = i_lda(r1, a22);     expect_dec("lda", IC_LD, 0, 0, 0, s22, 1, r1, -1, -1);
      instr = i_ldd(r1, d17, r2); expect_dec("ldd", IC_LD, 0, 1, 0, s17, 1, r1, r2, -1);
      instr = i_ldx(r1, r2, r3);  expect_dec("ldx", IC_LD, 0, 2, 0, 0, 0, r1, r2, r3);
      instr = i_sta(r1, a22);     expect_dec("sta", IC_ST, 0, 0, 0, s22, 1, r1, -1, -1);
      instr = i_std(r1, d17, r2); expect_dec("std", IC_ST, 0, 1, 0, s17, 1, r1, r2, -1);
      instr = i_stx(r1, r2, r3);  expect_dec("stx", IC_ST, 0, 2, 0, 0, 0, r1, r2, r3);
      instr = i_mvi(r1, a22);     expect_dec("mvi", IC_MV, 0, 0, 1, s22, 1, r1, -1, -1);
      if (dec.b_imm !== 1'b1) begin failures++; $display("FAIL mvi b_imm"); end
      instr = i_mv(r1, r2);       expect_dec("mv", IC_MV, 0, 0, 0, 0, 0, r1, r2, -1);
      if (dec.b_imm !== 1'b0) begin failures++; $display("FAIL mv b_imm"); end
      instr = i_jmp(a22);         expect_dec("jmp", IC_JMP, 0, 0, 0, s22, 1, 0, -1, -1);
      instr = i_jal(r1, a22);     expect_dec("jal", IC_JAL, 0, 0, 0, s22, 1, r1, -1, -1);
      instr = i_jt(r1, a22);      expect_dec("jt", IC_JT, 0, 0, 0, s22, 1, r1, -1, -1);
      instr = i_jf(r1, a22);      expect_dec("jf", IC_JF, 0, 0, 0, s22, 1, r1, -1, -1);
      for (int k = 0; k <= 14; k++) begin
        instr = i_opi(k, r1, r2, d17); expect_dec("opi", IC_ALU, k, 0, 1, s17, 1, r1, r2, -1);
        instr = i_opr(k, r1, r2, r3);  expect_dec("opr", IC_ALU, k, 0, 0, 0, 0, r1, r2, r3);
      end
      instr = i_not(r1, r2);      expect_dec("not", IC_ALU, 15, 0, 0, 0, 0, r1, r2, -1);
      instr = i_ret(r1);          expect_dec("ret", IC_RET, 0, 0, 0, 0, 0, r1, -1, -1);
      instr = i_trap(r1);         expect_dec("trap", IC_TRAP, 0, 0, 0, 0, 0, r1, -1, -1);
      instr = i_push(r1, r2);     expect_dec("push", IC_PUSH, 0, 0, 0, 0, 0, r1, r2, -1);
      instr = i_pop(r1, r2);      expect_dec("pop", IC_POP, 0, 0, 0, 0, 0, r1, r2, -1);
      instr = i_int();            expect_dec("int", IC_INT, 0, 0, 0, 0, 0, 0, -1, -1);
      instr = i_reti();           expect_dec("reti", IC_RETI, 0, 0, 0, 0, 0, 0, -1, -1);
      instr = i_savr(r1);         expect_dec("savr", IC_SAVR, 0, 0, 0, 0, 0, r1, -1, -1);
      instr = i_resr(r1);         expect_dec("resr", IC_RESR, 0, 0, 0, 0, 0, r1, -1, -1);
      instr = i_savt(r1);         expect_dec("savt", IC_SAVT, 0, 0, 0, 0, 0, r1, -1, -1);
      instr = i_rest(r1);         expect_dec("rest", IC_REST, 0, 0, 0, 0, 0, r1, -1, -1);
      instr = i_nop();            expect_dec("nop", IC_NOP, 0, 0, 0, 0, 0, 0, -1, -1);
      instr = enc_l(25 + ($urandom % 6), r1, a22); expect_dec("undef op", IC_ILLEGAL, 0, 0, 0, 0, 0, r1, -1, -1);
      instr = enc_x(29 + ($urandom % 4067), r1, r2, r3); expect_dec("undef xop", IC_ILLEGAL, 0, 0, 0, 0, 0, r1, -1, -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
