`timescale 1ps / 1ps
// Modified Pre-Charge Enable Half Buffer with rail converter.
//
// Second buffer of the interface. Its data evaluation stacks carry one extra
// transistor each way checking the synchronized validity lv, so an output
// rail can only rise after the validity has been synchronized to the clock,
// even though the data rails themselves arrived earlier:
//   r1[i] / r0[i]  set  en & lv & l_t[i] / l_f[i]     clear  !en & !lv
// Because both senses of lv are in the data stacks, the output validity
// implies the input validity and the control part simplifies to
//   valid = validity of the output rails (per bit r1 | r0, then a C-tree)
//   l_e   = !valid                       (sync_enable)
//   en    = C(r_e, l_e)                  (r_e is reg_enable)
// As a half buffer it keeps its left handshake open until the right side has
// taken the token, so a token waiting for its release time blocks the next
// one instead of letting it drift out of step with the clock.
// The true rails leave as single-rail data (rail conversion).
// Interface: l_t/l_f (W) from the input PCFB, lv from the synchronizer,
// l_e = sync_enable, data (W, single rail) with valid, r_e = reg_enable.
// The loop en -> output rails -> valid -> l_e -> en is the half-buffer
// handshake itself; lint tools report it as a combinational loop.
module pcehb_sync #(
  parameter int unsigned W = 13
) (
  input  logic         rst_n,
  input  logic [W-1:0] l_t,
  input  logic [W-1:0] l_f,
  input  logic         lv,
  output logic         l_e,
  input  logic         r_e,
  output logic [W-1:0] data,
  output logic         valid
);
  logic         en;
  logic [W-1:0] r1, r0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    gc_element u_r1 (.rst_n(rst_n), .set(en & lv & l_t[i]), .clr(~en & ~lv), .q(r1[i]));
    gc_element u_r0 (.rst_n(rst_n), .set(en & lv & l_f[i]), .clr(~en & ~lv), .q(r0[i]));
  end

  ctree #(.W(W)) u_rv (.rst_n(rst_n), .bit_v(r1 | r0), .v(valid));

  assign l_e  = ~valid;
  assign data = r1;

  gc_element #(.RESET_VAL(1'b1)) u_en (
    .rst_n(rst_n), .set(r_e & l_e), .clr(~r_e & ~l_e), .q(en));
endmodule
