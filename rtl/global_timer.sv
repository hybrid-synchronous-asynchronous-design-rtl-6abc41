`timescale 1ps / 1ps
// Global synchronous timer.
//
// A free-running T-bit counter clocked by the same CLK as the validity
// synchronizer, so token arrival and timer value change on the same edges.
// It counts up by one each rising edge and wraps modulo 2**T; reset (active
// low, asynchronous) sets it to zero. The counting step and reset value are
// this implementation's choice; the design only asks for a free-running
// system counter.
// Interface: clk, rst_n, value[T]. value changes just after each rising edge.
module global_timer #(
  parameter int unsigned T = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [T-1:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) value <= '0;
    else        value <= value + 1'b1;
  end
endmodule
