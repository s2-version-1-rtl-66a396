// s21_top: the S21 processor with its main memory.
//
// Joins the S21 core to a word-addressed memory of 2**AW 32-bit words
// (AW = 22: the 4M words the architecture addresses directly). Program,
// data, stack and the interrupt vector at word 1000 share this memory. The
// memory's second port is brought out (host_*) so that a host can load a
// program while the core is held in reset and read results afterwards; it
// has the same one-cycle read latency as the core's port. The core starts
// at address 0 when rst falls. irq/irq_ack are the hardware interrupt
// request (level) and its acknowledge pulse; trap_valid/trap_code/
// trap_value report each trap instruction (trap 1: print trap_value as an
// integer, trap 2: print it as a character, trap 0: stop, halted = 1).
module s21_top
  import s21_pkg::*;
#(
  parameter int unsigned AW = 22
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            irq,
  output logic            irq_ack,
  output logic            trap_valid,
  output logic [4:0]      trap_code,
  output logic [XLEN-1:0] trap_value,
  output logic            halted,
  input  logic [XLEN-1:0] host_addr,
  input  logic            host_we,
  input  logic [XLEN-1:0] host_wdata,
  output logic [XLEN-1:0] host_rdata
);

  logic [XLEN-1:0] mem_addr, mem_wdata, mem_rdata;
  logic            mem_we;

  s21_core u_core (
    .clk, .rst,
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .irq, .irq_ack,
    .trap_valid, .trap_code, .trap_value, .halted
  );

  s21_memory #(.AW(AW)) u_mem (
    .clk,
    .a_addr(mem_addr), .a_we(mem_we), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .b_addr(host_addr), .b_we(host_we), .b_wdata(host_wdata), .b_rdata(host_rdata)
  );

endmodule
