// s21_top_tb: end-to-end test of s21_top at its default size (4M words).
// Programs are loaded through the host port while the core is in reset and
// run against s21_iss, the instruction-level reference model in
// s21_tb_pkg, in lockstep: the model executes an instruction each time the
// core fetches one and enters its interrupt routine when the core
// acknowledges a hardware interrupt. At every halt the registers, the trap
// log and the memory the program used are compared with the model.
//   Program 1: a demonstration program - prints "Hi" with trap 2, computes
//   6! with a recursive subroutine (jal/ret, push/pop), fills and sums an
//   array with index addressing, uses absolute and indirect addressing, a
//   software interrupt, and spins until a hardware interrupt has been
//   served; the shared service routine saves the task state with
//   savr/savt/push and restores it with pop/rest/resr before reti.
//   Programs 2..: random straight-line code of ALU, mv, ld/st in all three
//   modes (including negative absolute addresses, which reach the top words
//   of the 4M-word memory), push/pop, savr/resr pairs, short forward jt/jf
//   and nops.
// Every mechanism (each instruction kind and addressing mode, taken and not
// taken branches, both interrupt kinds, trap output, halt) is counted and a
// failure is counted for any that never occurred.
module s21_top_tb;
  import s21_tb_pkg::*;

  localparam int NRAND = 100;    // random programs
  localparam int RLEN  = 300;    // instructions per random program

  logic clk = 0, rst = 1;
  logic irq = 0;
  logic irq_ack, trap_valid, halted;
  logic [4:0]  trap_code;
  logic [31:0] trap_value;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic        host_we = 0;
  int checks = 0, failures = 0;
  int dut_tcode [$];
  logic [31:0] dut_tval [$];
  int n_halt = 0, n_trap_print = 0;
  int mech [string];

  s21_top dut (.*);

  s21_iss iss;

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lockstep with the reference model
  always @(posedge clk) if (!rst && iss != null) begin
    if (irq_ack) iss.hw_interrupt();
    if (dut.u_core.state == dut.u_core.S_DECODE) iss.step();
    if (trap_valid) begin
      dut_tcode.push_back(int'(trap_code));
      dut_tval.push_back(trap_value);
      if (trap_code == 5'd1) begin $write("%0d", $signed(trap_value)); n_trap_print++; end
      if (trap_code == 5'd2) begin $write("%c", trap_value[7:0]); n_trap_print++; end
    end
  end

  task automatic load(int a, logic [31:0] v);
    @(negedge clk) host_we = 1; host_addr = 32'(a); host_wdata = v;
    iss.wr(32'(a), v);
    @(negedge clk) host_we = 0;
  endtask

  task automatic peek(int a, output logic [31:0] v);
    @(negedge clk) host_we = 0; host_addr = 32'(a);
    @(posedge clk) #1 v = host_rdata;
  endtask

  task automatic ck(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %h exp %h", what, got, exp);
    end
  endtask

  // run until halt, then compare registers, traps and written memory
  task automatic run_and_compare(string name, int maxcyc);
    int c;
    logic [31:0] v;
    dut_tcode.delete(); dut_tval.delete();
    @(negedge clk) rst = 0;
    c = 0;
    while (!halted && c < maxcyc) begin @(posedge clk); c++; end
    #1;
    ck({name, " halted"}, 32'(halted), 1);
    ck({name, " model halted"}, 32'(iss.halted), 1);
    if (halted) n_halt++;
    for (int i = 1; i < 32; i++)
      ck($sformatf("%s r%0d", name, i), dut.u_core.u_rf.regs[i], iss.r[i]);
    ck({name, " trap count"}, 32'(dut_tcode.size()), 32'(iss.trap_code_q.size()));
    foreach (dut_tcode[i]) if (i < iss.trap_code_q.size()) begin
      ck($sformatf("%s trap %0d code", name, i), 32'(dut_tcode[i]), 32'(iss.trap_code_q[i]));
      ck($sformatf("%s trap %0d value", name, i), dut_tval[i], iss.trap_val_q[i]);
    end
    // compare every memory word the loader or the program wrote
    foreach (iss.m[a]) begin
      peek(int'(a), v); ck($sformatf("%s M[%0d]", name, a), v, iss.m[a]);
    end
    rst = 1;
    foreach (iss.n_exec[k]) if (mech.exists(k)) mech[k] += iss.n_exec[k]; else mech[k] = iss.n_exec[k];
  endtask

  // ---------------- program 1 ----------------
  task automatic demo();
    logic [31:0] p [int];
    int fact = 100, isr = 200;
    p[0]  = i_mvi(29, 10000);             // stack pointer
    p[1]  = i_mvi(30, 72);  p[2] = i_trap(2);   // 'H'
    p[3]  = i_mvi(30, 105); p[4] = i_trap(2);   // 'i'
    p[5]  = i_mvi(30, 10);  p[6] = i_trap(2);   // newline
    p[7]  = i_mvi(1, 6);
    p[8]  = i_jal(31, fact);              // r2 = 6!
    p[9]  = i_mv(30, 2);    p[10] = i_trap(1);
    p[11] = i_int();                      // software interrupt
    p[12] = i_mvi(3, 0);
    p[13] = i_mvi(4, 2000);
    p[14] = i_stx(3, 4, 3);               // M[2000+i] = i
    p[15] = i_opi(ADD, 3, 3, 1);
    p[16] = i_opi(LT, 5, 3, 10);
    p[17] = i_jt(5, 14);
    p[18] = i_mvi(3, 0);
    p[19] = i_mvi(6, 0);
    p[20] = i_ldx(7, 4, 3);               // sum M[2000..2009]
    p[21] = i_opr(ADD, 6, 6, 7);
    p[22] = i_opi(ADD, 3, 3, 1);
    p[23] = i_opi(GE, 5, 3, 10);
    p[24] = i_jf(5, 20);
    p[25] = i_mv(30, 6);    p[26] = i_trap(1);   // 45
    p[27] = i_sta(6, 3000);
    p[28] = i_ldd(8, 1000, 4);            // M[1000 + 2000]
    p[29] = i_lda(9, 3000);
    p[30] = i_opr(SUB, 10, 8, 9);
    p[31] = i_opr(EQ, 11, 8, 9);
    p[32] = i_opi(XOR, 12, 11, -1);       // complement
    p[33] = i_not(18, 11);
    p[34] = i_lda(16, 3100);              // wait for the hardware interrupt
    p[35] = i_opi(GE, 17, 16, 2);
    p[36] = i_jf(17, 34);
    p[37] = i_mv(30, 16);   p[38] = i_trap(1);
    p[39] = i_jmp(41);
    p[40] = i_trap(7);
    p[41] = i_trap(0);
    // recursive factorial: r2 = r1!, link r31, stack r29
    p[fact+0]  = i_opi(GT, 5, 1, 1);
    p[fact+1]  = i_jt(5, fact + 4);
    p[fact+2]  = i_mvi(2, 1);
    p[fact+3]  = i_ret(31);
    p[fact+4]  = i_push(29, 31);
    p[fact+5]  = i_push(29, 1);
    p[fact+6]  = i_opi(SUB, 1, 1, 1);
    p[fact+7]  = i_jal(31, fact);
    p[fact+8]  = i_pop(29, 1);
    p[fact+9]  = i_pop(29, 31);
    p[fact+10] = i_opr(MUL, 2, 2, 1);
    p[fact+11] = i_ret(31);
    // interrupt service routine: count in M[3100], print '!'
    p[isr+0]  = i_savr(29);
    p[isr+1]  = i_savt(1);
    p[isr+2]  = i_push(29, 1);
    p[isr+3]  = i_lda(2, 3100);
    p[isr+4]  = i_opi(ADD, 2, 2, 1);
    p[isr+5]  = i_sta(2, 3100);
    p[isr+6]  = i_mvi(30, 33);
    p[isr+7]  = i_trap(2);
    p[isr+8]  = i_pop(29, 1);
    p[isr+9]  = i_rest(1);
    p[isr+10] = i_resr(29);
    p[isr+11] = i_reti();
    p[1000] = isr;
    p[3100] = 0;
    iss = new(22);
    foreach (p[a]) load(a, p[a]);
    fork
      run_and_compare("demo", 20000);
      begin
        // raise the hardware interrupt once the program waits for it
        wait (n_trap_print >= 6);
        repeat (50) @(posedge clk);
        @(negedge clk) irq = 1;
        @(posedge clk iff irq_ack);
        @(negedge clk) irq = 0;
      end
    join
    $display("");
  endtask

  // ---------------- random programs ----------------
  // r25: index (0..63), r27: stack pointer, r28: data base 5000
  task automatic random_prog(int seed_n);
    int a, depth;
    logic [31:0] w;
    iss = new(22);
    a = 0;
    for (int i = 0; i < 300; i++) load(5000 + i, $urandom);
    for (int i = 1; i <= 4; i++) load((1 << 22) - i, $urandom);   // top words, reached by negative ads
    load(a++, i_mvi(28, 5000));
    load(a++, i_mvi(27, 6000));
    depth = 0;
    for (int i = 0; i < RLEN; i++) begin
      int k, rd, rs, rt;
      k  = $urandom % 100;
      rd = ($urandom % 10 == 0) ? 0 : 1 + $urandom % 24;   // sometimes R0
      rs = $urandom % 25;
      rt = $urandom % 25;
      if (k < 25)       w = i_opr($urandom % 15, rd, rs, rt);
      else if (k < 45)  w = i_opi($urandom % 15, rd, rs, ($urandom % 2) ? int'($urandom % 40) : int'($urandom) % 65536);
      else if (k < 48)  w = i_not(rd, rs);
      else if (k < 52)  w = i_mv(rd, rs);
      else if (k < 56)  w = i_mvi(rd, int'($urandom) % 2000000);
      else if (k < 60)  w = i_lda(rd, 5000 + $urandom % 256);
      else if (k < 64)  w = i_ldd(rd, $urandom % 256, 28);
      else if (k < 68)  begin load(a++, i_mvi(25, $urandom % 64)); w = i_ldx(rd, 28, 25); end
      else if (k < 70)  w = i_sta(rs, 5000 + $urandom % 256);
      else if (k < 71)  w = ($urandom % 2) ? i_sta(rs, -1 - int'($urandom % 4)) : i_lda(rd, -1 - int'($urandom % 4));
      else if (k < 74)  w = i_std(rs, $urandom % 256, 28);
      else if (k < 77)  begin load(a++, i_mvi(25, $urandom % 64)); w = i_stx(rs, 28, 25); end
      else if (k < 82)  begin w = i_push(27, rs); depth++; end
      else if (k < 86 && depth > 0) begin w = i_pop(27, rd); depth--; end
      else if (k < 88)  begin w = i_savr(27); depth += 16; end
      else if (k < 90 && depth >= 16) begin w = i_resr(27); depth -= 16; end
      // a forward branch skips one ALU instruction only, so that the
      // stack depth and index register stay known to the generator
      else if (k < 94)  begin load(a, i_jt(rs, a + 2)); a++; w = i_opr($urandom % 15, rd, rs, rt); end
      else if (k < 98)  begin load(a, i_jf(rs, a + 2)); a++; w = i_opi($urandom % 15, rd, rs, $urandom % 40); end
      else              w = i_nop();
      load(a++, w);
    end
    load(a++, i_trap(0));
    run_and_compare($sformatf("rand%0d", seed_n), 20000);
  endtask

  initial begin
    string need [$];
    need = '{"alu_rr", "alu_ri", "mv", "mv_imm", "ld_abs", "ld_ind", "ld_idx", "st_abs",
             "st_ind", "st_idx", "jmp", "jal", "ret", "jt_taken", "jt_not", "jf_taken",
             "jf_not", "push", "pop", "trap", "int", "hw_irq", "reti", "savr", "resr",
             "savt", "rest", "nop"};
    repeat (3) @(negedge clk);
    demo();
    for (int n = 0; n < NRAND; n++) random_prog(n);
    mech["halt"] = n_halt;
    mech["printed"] = n_trap_print;
    need.push_back("halt");
    need.push_back("printed");
    foreach (need[i]) begin
      int c;
      c = mech.exists(need[i]) ? mech[need[i]] : 0;
      $display("mechanism %-9s occurred %0d times", need[i], c);
      checks++;
      if (c == 0) begin failures++; $display("FAIL mechanism %s never occurred", need[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
