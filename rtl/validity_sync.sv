`timescale 1ps / 1ps
// Validity synchronizer with neutral-phase reset.
//
// Only the validity of the (N+T)-bit channel crosses into the clock domain:
// the data rails are guaranteed stable once validity is high. SYNC_STAGES
// flip-flops (D-FF 1 and the optional D-FF 2) carry the rising validity to
// data_v_sync. The falling (neutral) phase is not synchronized at all: once
// the modified PCEHB has taken the token its enable sync_enable falls, and the
// NOR of sync_enable and CLK gives a reset pulse during the low clock phase
// that clears every flip-flop at once. This saves the cycles a two-flop
// synchronizer would spend on the neutral phase. The chip reset is ORed into
// the pulse (own choice).
// Interface: clk, rst_n, data_v (asynchronous), sync_enable (from the PCEHB),
// data_v_sync (to the PCEHB).
// Timing: data_v_sync rises SYNC_STAGES rising edges after data_v; it falls in
// the first low clock phase in which sync_enable is low.
module validity_sync #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic data_v,
  input  logic sync_enable,
  output logic data_v_sync
);
  logic [SYNC_STAGES:0] stage;
  logic                 ff_reset;  // flip-flop reset pulse

  assign ff_reset = ~(sync_enable | clk) | ~rst_n;
  assign stage[0] = data_v;

  for (genvar i = 0; i < SYNC_STAGES; i++) begin : g_ff
    c2mos_dff u_dff (.clk(clk), .rst(ff_reset), .d(stage[i]), .q(stage[i+1]));
  end

  assign data_v_sync = stage[SYNC_STAGES];

  initial assert (SYNC_STAGES inside {1, 2})
    else $error("SYNC_STAGES must be 1 or 2");
endmodule
