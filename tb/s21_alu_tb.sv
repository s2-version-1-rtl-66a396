// s21_alu_tb: self-checking test of s21_alu.
// Applies directed corner cases and random operands to every operation and
// compares y with the reference function s21_tb_pkg::ref_alu, which works
// on 64-bit signed integers. Combinational block: one check per vector.
module s21_alu_tb;
  import s21_pkg::*;
  import s21_tb_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  s21_alu dut (.op, .a, .b, .y);

  task automatic check(int k, logic [31:0] av, logic [31:0] bv);
    logic [31:0] exp;
    op = alu_op_e'(k); a = av; b = bv;
    #1;
    exp = ref_alu(k, av, bv);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", k, av, bv, y, exp);
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
    logic [31:0] corner [8];
    corner = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd31, 32'd32, 32'd7};
    for (int k = 0; k < 16; k++)
      foreach (corner[i]) foreach (corner[j]) check(k, corner[i], corner[j]);
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] bb;
      bb = $urandom;
      if (n % 3 == 0) bb = bb % 40;           // small shift amounts / divisors
      if (n % 7 == 0) bb = -(bb % 13);
      check(n % 16, $urandom, bb);
    end
    // a few known results worked out by hand
    check(0, 32'd5, 32'hFFFF_FFFE);            // 5 + -2 = 3
    if (y !== 32'd3) begin failures++; $display("FAIL add"); end
    check(3, 32'hFFFF_FFF9, 32'd2);            // -7 / 2 = -3
    if (y !== 32'hFFFF_FFFD) begin failures++; $display("FAIL div"); end
    check(9, 32'hFFFF_FFFF, 32'd1);            // -1 < 1
    if (y !== 32'd1) begin failures++; $display("FAIL lt"); end
    checks += 3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
