`timescale 1ps / 1ps
// Behavioural model: clock delay line (not synthesizable as a timed element).
//
// Produces CLK_delayed, a copy of CLK late by the time the synchronized token
// needs to go from the second validity flip-flop through the release-time
// comparison to the synchronous register. The circuit is a chain of
// INV_PAIRS small-inverter / large-inverter pairs (9 pairs for about 400 ps in
// a 45 nm process); here each inverter carries half of PAIR_DELAY_PS as a
// transport delay. The per-pair delay (44 ps) is this model's choice.
// A synthesis tool sees only an even chain of inverters, i.e. a buffer; the
// real delay must come from the cells chosen at layout.
// Interface: clk in, clk_delayed out, delayed by INV_PAIRS * PAIR_DELAY_PS ps.
module clk_delay #(
  parameter int unsigned INV_PAIRS     = 9,
  parameter int unsigned PAIR_DELAY_PS = 44
) (
  input  logic clk,
  output logic clk_delayed
);
  localparam int unsigned SMALL_PS = PAIR_DELAY_PS / 2;
  localparam int unsigned LARGE_PS = PAIR_DELAY_PS - SMALL_PS;

  logic [INV_PAIRS:0] node;
  assign node[0] = clk;

  for (genvar i = 0; i < INV_PAIRS; i++) begin : g_pair
    logic mid;
    assign #(SMALL_PS) mid       = ~node[i];
    assign #(LARGE_PS) node[i+1] = ~mid;
  end

  assign clk_delayed = node[INV_PAIRS];
endmodule
