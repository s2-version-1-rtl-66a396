// s21_memory_tb: self-checking test of s21_memory (AW reduced to 10).
// Writes and reads through both ports at random against a shadow array,
// checks the one-cycle read latency, read-old-data on a same-cycle write,
// that port B wins a same-word write collision and that address bits above
// AW are ignored.
module s21_memory_tb;
  localparam int AW = 10;
  logic clk = 0;
  logic [31:0] a_addr, a_wdata, a_rdata, b_addr, b_wdata, b_rdata;
  logic a_we, b_we;
  logic [31:0] shadow [1 << AW];
  logic [31:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  s21_memory #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port B, with high address bits set that must be ignored
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      b_we = 1; b_addr = 32'(i) | 32'hABC0_0000; b_wdata = $urandom; shadow[i] = b_wdata;
    end
    @(negedge clk) b_we = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      a_addr = $urandom; b_addr = $urandom;
      if (n % 50 == 0) b_addr = a_addr;
      a_we = ($urandom % 3) == 0; b_we = ($urandom % 3) == 0;
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = shadow[a_addr[AW-1:0]];
      exp_b = shadow[b_addr[AW-1:0]];
      @(posedge clk);
      if (a_we) shadow[a_addr[AW-1:0]] = a_wdata;
      if (b_we) shadow[b_addr[AW-1:0]] = b_wdata;
      #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; if (failures < 10) $display("FAIL A %h: %h exp %h", a_addr, a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; if (failures < 10) $display("FAIL B %h: %h exp %h", b_addr, b_rdata, exp_b); end
    end
    @(negedge clk) a_we = 0; b_we = 0;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk) a_addr = 32'(i);
      @(posedge clk) #1;
      checks++;
      if (a_rdata !== shadow[i]) begin failures++; if (failures < 10) $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
