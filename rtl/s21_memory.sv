// s21_memory: word-addressed main memory M[] of the S21 processor.
//
// The S21 addressing unit is the 32-bit word, and 22 address bits are
// directly addressable (4M words), which sets the default depth 2**AW with
// AW = 22. Higher address bits are ignored, so the memory repeats across the
// 32-bit address space. The memory is a true dual-port synchronous RAM:
// port A serves the processor, port B lets a host load programs and read
// results. On each port, a write with we high stores wdata at the rising
// edge; rdata shows the word at the address presented in the previous cycle
// (one cycle read latency, old data on a read of a word written in the same
// cycle). If both ports write one word in the same cycle, port B wins. Dual porting and the read timing are this design's choices.
module s21_memory
  import s21_pkg::*;
#(
  parameter int unsigned AW = 22
) (
  input  logic            clk,
  // port A
  input  logic [XLEN-1:0] a_addr,
  input  logic            a_we,
  input  logic [XLEN-1:0] a_wdata,
  output logic [XLEN-1:0] a_rdata,
  // port B
  input  logic [XLEN-1:0] b_addr,
  input  logic            b_we,
  input  logic [XLEN-1:0] b_wdata,
  output logic [XLEN-1:0] b_rdata
);

  logic [XLEN-1:0] mem [0:(1<<AW)-1];

  // Both ports in one process; if both write the same word, port B wins.
  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr[AW-1:0]] <= a_wdata;
    if (b_we) mem[b_addr[AW-1:0]] <= b_wdata;
    a_rdata <= mem[a_addr[AW-1:0]];
    b_rdata <= mem[b_addr[AW-1:0]];
  end

endmodule
