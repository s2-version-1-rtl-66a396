// s21_regfile_tb: self-checking test of s21_regfile.
// Writes random values to random registers (including R[0]) and compares
// all three asynchronous read ports against a shadow array every cycle;
// R[0] must always read zero and reset must clear every register.
module s21_regfile_tb;
  logic clk = 0, rst = 1;
  logic [4:0] ra1, ra2, ra3, wa;
  logic [31:0] rd1, rd2, rd3, wd;
  logic we;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  s21_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(logic [31:0] got, logic [4:0] a);
    checks++;
    if (got !== shadow[a]) begin
      failures++;
      if (failures < 10) $display("FAIL r%0d got %h exp %h", a, got, shadow[a]);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 32; i++) begin   // after reset everything reads zero
      ra1 = 5'(i); #1 cmp(rd1, ra1);
    end
    for (int n = 0; n < 3000; n++) begin
      we = ($urandom % 4) != 0; wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (n % 5 == 0) ? 5'd0 : 5'($urandom); ra3 = 5'($urandom);
      #1;
      cmp(rd1, ra1); cmp(rd2, ra2); cmp(rd3, ra3);
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
    end
    rst = 1; @(posedge clk); #1 rst = 0; we = 0;
    foreach (shadow[i]) shadow[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra2 = 5'(i); #1 cmp(rd2, ra2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
