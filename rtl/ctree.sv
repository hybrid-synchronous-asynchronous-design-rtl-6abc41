`timescale 1ps / 1ps
// Completion tree (C-tree) of a validity-based QDI channel.
//
// Each input bit_v[i] tells whether bit i of the channel holds a valid value
// (one of its rails high). The tree of two-input C-elements raises `v` only
// when every bit is valid and lowers it only when every bit is neutral, so the
// channel validity is always the last signal of the channel to change. The
// tree shape (a heap-ordered binary tree of two-input C-elements) is this
// implementation's choice.
// Interface: rst_n (active low, v = 0), bit_v[W], v. No clock, zero delay.
module ctree #(
  parameter int unsigned W = 13
) (
  input  logic         rst_n,
  input  logic [W-1:0] bit_v,
  output logic         v
);
  // Heap-ordered node array: node[W+i] is leaf i, node[k] combines
  // node[2k] and node[2k+1], node[1] is the root.
  logic [2*W-1:1] node;

  assign node[2*W-1:W] = bit_v;

  for (genvar k = 1; k < W; k++) begin : g_node
    gc_element #(.RESET_VAL(1'b0)) u_c (
      .rst_n(rst_n), .set(node[2*k] & node[2*k+1]), .clr(~node[2*k] & ~node[2*k+1]),
      .q(node[k]));
  end

  if (W == 1) begin : g_single
    assign v = bit_v[0];
  end else begin : g_root
    assign v = node[1];
  end
endmodule
