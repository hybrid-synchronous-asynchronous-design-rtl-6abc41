`timescale 1ps / 1ps
// Clock and reset generator of the synchronous register.
//
// reg_clk = valid & match & CLK_delayed: the register is clocked only when a
// token is present, its release time equals the timer, and the delayed clock
// rises. The inputs can only arrive in that order (valid, then match, then
// CLK_delayed), so the gated clock cannot glitch.
// reg_rst = NOR(CLK, CLK_delayed): high from the falling edge of CLK_delayed
// until the next rising edge of CLK, i.e. for most of the low clock phase.
// It clears the register to the neutral state before the next token can come,
// and ends before the guard band around the next CLK_delayed edge.
// Interface: clk, clk_delayed, valid, match in; reg_clk, reg_rst out.
// Purely combinational.
module sync_reg_ctrl (
  input  logic clk,
  input  logic clk_delayed,
  input  logic valid,
  input  logic match,
  output logic reg_clk,
  output logic reg_rst
);
  assign reg_clk = valid & match & clk_delayed;
  assign reg_rst = ~(clk | clk_delayed);
endmodule
