`timescale 1ps / 1ps
// Pre-Charge Full Buffer (PCFB) on a dual-rail, validity-based channel.
//
// Holds one token. The left side is acknowledged (l_e falls) as soon as the
// token is copied to the output, and the left side may return to neutral and
// be re-enabled while the right side is still holding the token: the left and
// right reset phases are decoupled by the internal state variable `en`.
// This decoupling is what the interface relies on at its input (the sender is
// released before the token is synchronized) and at its output (the
// synchronous register is released before the receiver has taken the data).
//
// The design names the template but leaves its internals to the literature;
// the production rules below are the usual full-buffer reshuffling:
//   r[i]  set  en & r_e & l[i]        clear  !en & !r_e
//   l_e   clear l_v & r_v & en        set    !l_v & !en
//   en    clear !l_e & r_v            set    l_e & !r_v
// l_v is the validity of the left channel (from the sender's C-tree); r_v is
// computed here from the output rails with a C-tree.
// Interface: dual-rail l_t/l_f in with l_v and l_e; dual-rail r_t/r_f out with
// r_v and r_e. Four-phase handshakes, enables active high (ready). No clock.
// The handshake cycles (l_e, en, r_v) are feedback through latches; lint
// tools report them as combinational loops, which is the intended circuit.
module pcfb #(
  parameter int unsigned W = 13
) (
  input  logic         rst_n,
  input  logic [W-1:0] l_t,
  input  logic [W-1:0] l_f,
  input  logic         l_v,
  output logic         l_e,
  output logic [W-1:0] r_t,
  output logic [W-1:0] r_f,
  output logic         r_v,
  input  logic         r_e
);
  logic en;

  for (genvar i = 0; i < W; i++) begin : g_bit
    gc_element u_t (.rst_n(rst_n), .set(en & r_e & l_t[i]), .clr(~en & ~r_e), .q(r_t[i]));
    gc_element u_f (.rst_n(rst_n), .set(en & r_e & l_f[i]), .clr(~en & ~r_e), .q(r_f[i]));
  end

  ctree #(.W(W)) u_rv (.rst_n(rst_n), .bit_v(r_t | r_f), .v(r_v));

  gc_element #(.RESET_VAL(1'b1)) u_le (
    .rst_n(rst_n), .set(~l_v & ~en), .clr(l_v & r_v & en), .q(l_e));
  gc_element #(.RESET_VAL(1'b1)) u_en (
    .rst_n(rst_n), .set(l_e & ~r_v), .clr(~l_e & r_v), .q(en));
endmodule
