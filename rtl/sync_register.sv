`timescale 1ps / 1ps
// N-bit synchronous register and single-rail to dual-rail converter.
//
// Each data bit d[i] is stored twice: directly in the true-rail flip-flop and
// through an inverter in the false-rail flip-flop, so the register output is
// a dual-rail channel. All 2N flip-flops are the C2MOS type with a forced
// reset of the second latch. Putting the inverter in front of the flip-flops
// (this implementation's reading) makes the reset state all-zero, which is
// the neutral state of the dual-rail channel.
// Interface: reg_clk (gated clock), reg_rst (reset pulse, active high),
// rst_n (chip reset, active low), d[N] single rail, q_t/q_f[N] dual rail.
// Timing: q is valid just after the rising edge of reg_clk and returns to
// neutral when reg_rst rises.
module sync_register #(
  parameter int unsigned N = 8
) (
  input  logic         reg_clk,
  input  logic         reg_rst,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic [N-1:0] q_t,
  output logic [N-1:0] q_f
);
  logic rst;
  assign rst = reg_rst | ~rst_n;

  for (genvar i = 0; i < N; i++) begin : g_bit
    c2mos_dff u_t (.clk(reg_clk), .rst(rst), .d(d[i]),  .q(q_t[i]));
    c2mos_dff u_f (.clk(reg_clk), .rst(rst), .d(~d[i]), .q(q_f[i]));
  end
endmodule
