`timescale 1ps / 1ps
// Synchronous comparator of the release time.
//
// T one-bit comparators (XNOR) check each bit of the token's Data Release
// Time Value against the global timer, and an AND of their outputs gives
// `match`. Purely combinational; it may glitch while the timer or the token
// changes, which is harmless because it must have settled before the rising
// edge of CLK_delayed, the only moment it is used.
// Interface: drtv[T], timer_value[T], match.
module sync_comparator #(
  parameter int unsigned T = 5
) (
  input  logic [T-1:0] drtv,
  input  logic [T-1:0] timer_value,
  output logic         match
);
  logic [T-1:0] bit_eq;

  assign bit_eq = ~(drtv ^ timer_value);
  assign match  = &bit_eq;
endmodule
