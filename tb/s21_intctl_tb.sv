// s21_intctl_tb: self-checking test of s21_intctl.
// Directed sequence: a hardware request is seen, taken (RetAds captures
// pc_in, ack pulses), blocked while in service, re-enabled by reti; a
// software interrupt captures pc_in and blocks hardware requests; rest
// loads RetAds; reset clears everything.
module s21_intctl_tb;
  logic clk = 0, rst = 1;
  logic irq, irq_req, irq_ack, hw_take, sw_int, reti, rest_we, in_service;
  logic [31:0] rest_data, pc_in, retads;
  int checks = 0, failures = 0;

  s21_intctl dut (.*);

  always #5 clk = ~clk;

  task automatic ck(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b exp %b", what, got, exp); end
  endtask
  task automatic ckw(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    irq = 0; hw_take = 0; sw_int = 0; reti = 0; rest_we = 0; rest_data = 0; pc_in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    #1 ck("idle req", irq_req, 0); ckw("reset retads", retads, 0); ck("reset svc", in_service, 0);
    irq = 1; #1 ck("req", irq_req, 1);
    pc_in = 32'h1234; hw_take = 1; #1 ck("ack", irq_ack, 1);
    @(negedge clk) hw_take = 0;
    #1 ckw("retads hw", retads, 32'h1234); ck("svc", in_service, 1);
    ck("blocked", irq_req, 0); ck("ack low", irq_ack, 0);
    rest_we = 1; rest_data = 32'hCAFE;
    @(negedge clk) rest_we = 0;
    ckw("rest", retads, 32'hCAFE); ck("still blocked", irq_req, 0);
    reti = 1;
    @(negedge clk) reti = 0;
    ck("reti svc", in_service, 0); ck("req again", irq_req, 1); ckw("retads kept", retads, 32'hCAFE);
    irq = 0; #1 ck("no req", irq_req, 0);
    pc_in = 32'h77; sw_int = 1;
    @(negedge clk) sw_int = 0;
    ckw("retads sw", retads, 32'h77); ck("sw svc", in_service, 1);
    irq = 1; #1 ck("blocked by sw", irq_req, 0);
    rst = 1;
    @(negedge clk) rst = 0;
    ckw("rst retads", retads, 0); ck("rst req", irq_req, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
