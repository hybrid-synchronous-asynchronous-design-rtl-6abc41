`timescale 1ps / 1ps
// Generalized C-element: the state-holding gate of the QDI circuits here.
//
// The output is set while `set` is high (the pull-down network of the
// precharged stage conducts) and cleared while `clr` is high (the pull-up
// network conducts); otherwise it keeps its value, as the staticizer of a
// dynamic node does. An active-low reset forces the output to RESET_VAL.
// The two conditions are mutually exclusive in every circuit that uses it;
// if both were high, set wins.
//
// It is written as a level-sensitive latch because that is what the circuit
// is: a stored node with no clock. Lint tools therefore report a latch for
// every instance, and the handshake cycles built from these gates show up as
// combinational loops; both are the intended asynchronous structure.
// There is no delay: a change propagates in the same simulation time step.
module gc_element #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic rst_n,
  input  logic set,
  input  logic clr,
  output logic q
);
  always_latch begin
    if (!rst_n)   q = RESET_VAL;
    else if (set) q = 1'b1;
    else if (clr) q = 1'b0;
  end
endmodule
