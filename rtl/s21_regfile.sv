// s21_regfile: the 32 x 32-bit general register file of the S21 processor.
//
// R[0] always reads as zero and writes to it are dropped; R[1]..R[31] are
// ordinary registers. Three asynchronous read ports serve the most demanding
// instructions (st r1 +r2 r3 reads R[r1], R[r2] and R[r3] at once); one write
// port is written at the rising clock edge when we is high. A read of the
// register being written returns the old value. The number of read ports and
// the synchronous reset that clears every register are this design's choices.
module s21_regfile
  import s21_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [4:0]      ra1,
  output logic [XLEN-1:0] rd1,
  input  logic [4:0]      ra2,
  output logic [XLEN-1:0] rd2,
  input  logic [4:0]      ra3,
  output logic [XLEN-1:0] rd3,
  input  logic            we,
  input  logic [4:0]      wa,
  input  logic [XLEN-1:0] wd
);

  logic [XLEN-1:0] regs [1:NREGS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? '0 : regs[ra2];
  assign rd3 = (ra3 == 5'd0) ? '0 : regs[ra3];

endmodule
