// s21_core_tb: self-checking directed test of s21_core.
// The core runs from an s21_memory (AW reduced to 12). Phase 1 runs a
// hand-written program that uses every addressing mode, push/pop, jal/ret,
// jt/jf, a software interrupt whose service routine does savt, savr and
// resr, and the traps; register, memory and trap results were worked out by
// hand, and the cycle count to halt is checked against the core's documented
// per-instruction latencies (3 cycles basic, 4 for ld/pop/int, 19 savr,
// 20 resr). Phase 2 runs a counting loop and raises the hardware interrupt
// several times, holding irq high through the service routine to check that
// a second interrupt waits for reti. Phase 3 covers corner cases: push and
// pop with the pointer as operand, savr/resr whose pointer is one of
// r0..r15, an undefined opcode and a non-halting trap.
module s21_core_tb;
  import s21_tb_pkg::*;
  localparam int AW = 12;

  logic clk = 0, rst = 1;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_we;
  logic        irq, irq_ack, trap_valid, halted;
  logic [4:0]  trap_code;
  logic [31:0] trap_value;
  logic [31:0] h_addr, h_wdata, h_rdata;
  logic        h_we;
  int checks = 0, failures = 0;
  int cyc;
  int tcode_q [$];
  logic [31:0] tval_q [$];

  s21_core dut (.*);
  s21_memory #(.AW(AW)) u_mem (
    .clk, .a_addr(mem_addr), .a_we(mem_we), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .b_addr(h_addr), .b_we(h_we), .b_wdata(h_wdata), .b_rdata(h_rdata));

  always #5 clk = ~clk;

  int nack, last_ack, min_gap;
  always @(posedge clk) if (!rst && irq_ack) begin
    if (nack > 0 && cyc - last_ack < min_gap) min_gap = cyc - last_ack;
    nack++; last_ack = cyc;
  end
  always @(posedge clk) cyc++;

  always @(posedge clk) if (!rst && trap_valid) begin
    tcode_q.push_back(int'(trap_code)); tval_q.push_back(trap_value);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic poke(int a, logic [31:0] v);
    @(negedge clk) h_we = 1; h_addr = 32'(a); h_wdata = v;
    @(negedge clk) h_we = 0;
  endtask
  task automatic peek(int a, output logic [31:0] v);
    @(negedge clk) h_we = 0; h_addr = 32'(a);
    @(posedge clk) #1 v = h_rdata;
  endtask
  task automatic ckw(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  task automatic ckmem(int a, logic [31:0] exp);
    logic [31:0] v;
    peek(a, v);
    ckw($sformatf("M[%0d]", a), v, exp);
  endtask
  function automatic logic [31:0] reg_of(int i);
    return (i == 0) ? 32'd0 : dut.u_rf.regs[i];
  endfunction

  initial begin
    logic [31:0] prog [64];
    logic [31:0] v;
    irq = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    // ---------------- phase 1 ----------------
    prog = '{default: i_nop()};
    prog[0]  = i_mvi(1, 10);
    prog[1]  = i_mvi(2, -3);
    prog[2]  = i_opr(ADD, 3, 1, 2);       // 7
    prog[3]  = i_opr(MUL, 4, 1, 2);       // -30
    prog[4]  = i_opi(DIV, 5, 4, 4);       // -7
    prog[5]  = i_opi(SHL, 6, 1, 2);       // 40
    prog[6]  = i_sta(6, 200);             // M[200] = 40
    prog[7]  = i_mvi(8, 195);
    prog[8]  = i_ldd(7, 5, 8);            // r7 = M[200] = 40
    prog[9]  = i_mvi(9, 5);
    prog[10] = i_ldx(10, 8, 9);           // r10 = 40
    prog[11] = i_stx(1, 8, 9);            // M[200] = 10
    prog[12] = i_mvi(29, 300);
    prog[13] = i_push(29, 3);             // M[301] = 7
    prog[14] = i_pop(29, 11);             // r11 = 7
    prog[15] = i_jal(31, 60);
    prog[16] = i_trap(1);                 // prints 7
    prog[17] = i_int();
    prog[18] = i_opr(LT, 13, 2, 1);       // 1
    prog[19] = i_jt(13, 21);
    prog[20] = i_trap(5);                 // skipped
    prog[21] = i_jf(13, 20);              // not taken
    prog[22] = i_not(14, 2);              // 2
    prog[23] = i_trap(0);
    prog[40] = i_savt(12);                // 18
    prog[41] = i_savr(29);                // M[301..316] = r0..r15
    prog[42] = i_mvi(1, 99);
    prog[43] = i_mvi(15, 55);
    prog[44] = i_resr(29);
    prog[45] = i_reti();
    for (int i = 0; i < 64; i++) poke(i, prog[i]);
    poke(60, i_mv(30, 3));
    poke(61, i_ret(31));
    poke(1000, 32'd40);
    @(negedge clk) rst = 0;
    begin
      int c0;
      c0 = cyc;
      while (!halted && cyc - c0 < 1000) @(posedge clk) #1;
      ckw("cycles to halt", 32'(cyc - c0), 32'd130);
    end
    ckw("r1", reg_of(1), 10);   ckw("r3", reg_of(3), 7);    ckw("r4", reg_of(4), -30);
    ckw("r5", reg_of(5), -7);   ckw("r6", reg_of(6), 40);   ckw("r7", reg_of(7), 40);
    ckw("r10", reg_of(10), 40); ckw("r11", reg_of(11), 7);  ckw("r12", reg_of(12), 18);
    ckw("r13", reg_of(13), 1);  ckw("r14", reg_of(14), 2);  ckw("r15", reg_of(15), 0);
    ckw("r29", reg_of(29), 300); ckw("r30", reg_of(30), 7); ckw("r31", reg_of(31), 16);
    ckmem(200, 10); ckmem(301, 0); ckmem(302, 10); ckmem(303, -3); ckmem(304, 7);
    ckmem(316, 0);
    checks++;
    if (tcode_q.size() != 2 || tcode_q[0] != 1 || tval_q[0] != 7 || tcode_q[1] != 0) begin
      failures++; $display("FAIL trap log %p", tcode_q);
    end
    repeat (5) @(posedge clk);
    #1 ckw("still halted", 32'(halted), 1);

    // ---------------- phase 2: hardware interrupt ----------------
    rst = 1;
    poke(0, i_opi(ADD, 1, 1, 1));         // loop: r1++
    poke(1, i_jmp(0));
    poke(50, i_opi(ADD, 20, 20, 1));      // ISR: r20++, M[500] = r20
    poke(51, i_sta(20, 500));
    poke(52, i_reti());
    poke(1000, 32'd50);
    poke(500, 32'd0);
    @(negedge clk) rst = 0;
    nack = 0; min_gap = 1000;
    repeat (30) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      // hold irq for 40 cycles; while the routine runs (2 entry cycles plus
      // 3 x 3 cycles) no second interrupt may be taken, after reti the
      // still-high request is taken again at once
      @(negedge clk) irq = 1;
      repeat (40) @(posedge clk);
      @(negedge clk) irq = 0;
      repeat (20) @(posedge clk);
    end
    #1 ckw("at least 3 interrupts per window", 32'(nack >= 12), 1);
    ckw("no interrupt inside the routine", 32'(min_gap), 32'd11);
    ckmem(500, nack);
    ckw("loop ran between interrupts", 32'(reg_of(1) >= 5), 1);

    // ---------------- phase 3: corner cases ----------------
    // push/pop with the pointer as operand, savr/resr with the pointer
    // among r0..r15, an undefined opcode, and a trap that does not halt
    rst = 1;
    irq = 0;
    poke(0, i_mvi(5, 400));
    poke(1, i_mvi(7, 77));
    poke(2, i_push(5, 5));                // r5 = 401, M[401] = 401
    poke(3, i_pop(5, 5));                 // r5 = M[401] - 1 = 400
    poke(4, enc_l(27, 3, 5));             // undefined: no effect
    poke(5, i_savr(5));                   // M[401..416] = r0..r15, M[406] = 406
    poke(6, i_mvi(7, 1));
    poke(7, i_resr(5));                   // r7 = 77 again, r5 = 400
    poke(8, i_mvi(30, -9));
    poke(9, i_trap(3));
    poke(10, i_trap(0));
    tcode_q.delete(); tval_q.delete();
    @(negedge clk) rst = 0;
    begin
      int c0;
      c0 = cyc;
      while (!halted && cyc - c0 < 1000) @(posedge clk) #1;
    end
    ckw("p3 r5", reg_of(5), 400); ckw("p3 r7", reg_of(7), 77); ckw("p3 r3", reg_of(3), 0);
    ckmem(406, 406); ckmem(408, 77); ckmem(401, 0);
    checks++;
    if (tcode_q.size() != 2 || tcode_q[0] != 3 || tval_q[0] != -9 || tcode_q[1] != 0) begin
      failures++; $display("FAIL p3 trap log %p", tcode_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
