`timescale 1ps / 1ps
// Asynchronous-to-synchronous interface with release-time alignment.
//
// A QDI (quasi-delay-insensitive) sender delivers tokens of N data bits plus
// a T-bit Data Release Time Value (DRTV) on a dual-rail channel. The
// interface synchronizes each token to CLK and releases its N data bits
// exactly in the clock cycle in which the global synchronous timer equals the
// DRTV, so a system that computes asynchronously still behaves
// cycle-deterministically at this boundary.
//
// Token path (left to right):
//   input C-tree -> (N+T)-bit PCFB -> [validity only: D-FF 1, D-FF 2]
//   -> modified (N+T)-bit PCEHB (single-rail out) -> comparator + N-bit
//   synchronous register (gated clock) -> C-tree -> N-bit output PCFB.
// Only the channel validity is synchronized; the PCEHB cannot evaluate its
// data rails before the synchronized validity is high. The flip-flops are
// cleared by NOR(sync_enable, CLK) instead of synchronizing the neutral
// phase. The register is clocked by valid & match & CLK_delayed, where
// CLK_delayed is CLK through a delay line long enough for the comparison, and
// cleared by NOR(CLK, CLK_delayed) in the low clock phase. A token whose DRTV
// does not match waits in the PCEHB, blocking the next token.
//
// Token layout: in[N+T-1:N] is the DRTV, in[N-1:0] the data (own choice).
// Ports: clk, rst_n (chip reset, active low); input channel in_t/in_f with
// in_e; output channel out_t/out_f with out_v and out_e; timer_value.
// Timing: with SYNC_STAGES = 2 a token reaches the PCEHB on the second rising
// CLK edge after it is in the input PCFB, and the back-to-back rate is one
// token every two cycles; with SYNC_STAGES = 1 it is one token per cycle.
// The receiver must take each released token within the cycle, before the
// register is reset; an assertion checks this.
//
// The state-holding QDI gates are latches with combinational feedback around
// the handshakes; the lint warnings about latches and loops in the buffers
// are that intended structure.
module async_sync_interface #(
  parameter int unsigned N             = async_sync_pkg::N_DATA,
  parameter int unsigned T             = async_sync_pkg::T_BITS,
  parameter int unsigned SYNC_STAGES   = async_sync_pkg::SYNC_STAGES,
  parameter int unsigned INV_PAIRS     = async_sync_pkg::INV_PAIRS,
  parameter int unsigned PAIR_DELAY_PS = async_sync_pkg::PAIR_DELAY_PS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N+T-1:0] in_t,
  input  logic [N+T-1:0] in_f,
  output logic           in_e,
  output logic [N-1:0]   out_t,
  output logic [N-1:0]   out_f,
  output logic           out_v,
  input  logic           out_e,
  output logic [T-1:0]   timer_value
);
  localparam int unsigned W = N + T;

  // Input stage
  logic         in_v;
  logic [W-1:0] buf_t, buf_f;
  logic         buf_v;
  logic         sync_enable;
  logic         data_v_sync;

  ctree #(.W(W)) u_in_ctree (.rst_n(rst_n), .bit_v(in_t | in_f), .v(in_v));

  pcfb #(.W(W)) u_in_pcfb (
    .rst_n(rst_n), .l_t(in_t), .l_f(in_f), .l_v(in_v), .l_e(in_e),
    .r_t(buf_t), .r_f(buf_f), .r_v(buf_v), .r_e(sync_enable));

  validity_sync #(.SYNC_STAGES(SYNC_STAGES)) u_vsync (
    .clk(clk), .rst_n(rst_n), .data_v(buf_v), .sync_enable(sync_enable),
    .data_v_sync(data_v_sync));

  logic [W-1:0] tok;
  logic         valid;
  logic         reg_enable;

  pcehb_sync #(.W(W)) u_pcehb (
    .rst_n(rst_n), .l_t(buf_t), .l_f(buf_f), .lv(data_v_sync), .l_e(sync_enable),
    .r_e(reg_enable), .data(tok), .valid(valid));

  // Synchronous part
  logic clk_delayed;
  logic match;
  logic reg_clk, reg_rst;

  global_timer #(.T(T)) u_timer (.clk(clk), .rst_n(rst_n), .value(timer_value));

  sync_comparator #(.T(T)) u_cmp (
    .drtv(tok[W-1:N]), .timer_value(timer_value), .match(match));

  clk_delay #(.INV_PAIRS(INV_PAIRS), .PAIR_DELAY_PS(PAIR_DELAY_PS)) u_delay (
    .clk(clk), .clk_delayed(clk_delayed));

  sync_reg_ctrl u_ctrl (
    .clk(clk), .clk_delayed(clk_delayed), .valid(valid), .match(match),
    .reg_clk(reg_clk), .reg_rst(reg_rst));

  logic [N-1:0] sreg_t, sreg_f;
  logic         sreg_v;

  sync_register #(.N(N)) u_sreg (
    .reg_clk(reg_clk), .reg_rst(reg_rst), .rst_n(rst_n), .d(tok[N-1:0]),
    .q_t(sreg_t), .q_f(sreg_f));

  // Output stage
  ctree #(.W(N)) u_out_ctree (.rst_n(rst_n), .bit_v(sreg_t | sreg_f), .v(sreg_v));

  pcfb #(.W(N)) u_out_pcfb (
    .rst_n(rst_n), .l_t(sreg_t), .l_f(sreg_f), .l_v(sreg_v), .l_e(reg_enable),
    .r_t(out_t), .r_f(out_f), .r_v(out_v), .r_e(out_e));

  // A released token must have been taken by the output PCFB before the
  // register is cleared at the start of its reset pulse.
  a_token_taken : assert property (
    @(posedge reg_rst) disable iff (!rst_n) (sreg_v |-> !reg_enable))
    else $error("released token lost: output buffer had not accepted it");
endmodule
