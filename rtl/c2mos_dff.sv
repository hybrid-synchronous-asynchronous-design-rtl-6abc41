`timescale 1ps / 1ps
// Flip-flop of the validity synchronizer and of the synchronous register.
//
// Function of the C2MOS master-slave flip-flop with a forced reset on its
// second latch: on the rising edge of clk the value of d appears at q; while
// rst is high the second latch is held at zero whatever the clock does. The
// first latch is not reset: it is overwritten through d while the clock is
// low, which this edge-triggered model covers because d is sampled only at the
// next rising edge. The transistor-level choices of the circuit (conditional
// or full combinational feedback in the latches) do not change this function.
// Interface: clk, rst (active high; the complement of the circuit's _reset),
// d, q. q changes on the rising clk edge or as soon as rst rises.
module c2mos_dff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= d;
  end
endmodule
