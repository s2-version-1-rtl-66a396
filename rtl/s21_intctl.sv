// s21_intctl: interrupt unit of the S21 processor.
//
// Holds RetAds, the internal register that keeps the PC to return to from an
// interrupt service routine, and accepts the single level of hardware
// interrupt. irq is a level-sensitive request. While no interrupt is in
// service, a high irq raises irq_req; the core answers at its next
// instruction boundary with hw_take, which stores pc_in in RetAds, marks an
// interrupt in service and pulses irq_ack so the device can drop irq. A
// software interrupt (int 0, sw_int) also stores pc_in in RetAds and marks
// an interrupt in service. reti clears the in-service mark, after which a
// still-high irq is taken again. rest (rest_we) loads RetAds from a
// register; savt reads it through retads. Blocking a second hardware
// interrupt while one is in service is how this design reads "one level
// hardware interrupt"; the level-sensitive request and the ack pulse are its
// own choices. All updates happen at the rising clock edge; reset clears
// RetAds and the in-service mark.
module s21_intctl
  import s21_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            irq,
  output logic            irq_req,
  output logic            irq_ack,
  input  logic            hw_take,
  input  logic            sw_int,
  input  logic            reti,
  input  logic            rest_we,
  input  logic [XLEN-1:0] rest_data,
  input  logic [XLEN-1:0] pc_in,
  output logic [XLEN-1:0] retads,
  output logic            in_service
);

  always_ff @(posedge clk) begin
    if (rst) begin
      retads     <= '0;
      in_service <= 1'b0;
    end else begin
      if (hw_take || sw_int) begin
        retads     <= pc_in;
        in_service <= 1'b1;
      end else if (rest_we) begin
        retads <= rest_data;
      end
      if (reti) in_service <= 1'b0;
    end
  end

  assign irq_req = irq && !in_service;
  assign irq_ack = hw_take;

  // The core may only accept a hardware interrupt that is being requested.
  a_take_requested: assert property (@(posedge clk) disable iff (rst) hw_take |-> irq_req);

endmodule
