// switch_network: parametrisable triangular switch between event inputs and
// equivalent high-speed links.
//
// N_IN input busses (spike-event channels and a configuration bus) produce
// packages of different weights; N_OUT links all lead to the same receiver,
// so no routing is needed: every package may leave on any link, and the
// switch only has to spread the load so that all links are used.
//
// Structure (see switch_pkg for the grid):
//   * a merge column of N_IN-1 nodes takes the inputs: the top node takes
//     inputs 0 (left) and 1 (top), node k takes input k+1 from the left and
//     the node above;
//   * an output row of N_OUT nodes, node j driving link j through a
//     link_port; a package goes down to its link if the link is free,
//     otherwise one node to the right in the next clock;
//   * N_NODES-(N_IN-1)-N_OUT further nodes filling the triangle between
//     the merge column and the output row diagonal by diagonal from the
//     bottom-left corner. A merge node sends a package into the triangle
//     (its horizontal output) when it can, down the merge column otherwise. They give the inputs extra paths onto the output
//     row, so packages can enter it at several columns instead of only at
//     its left end.
// With N_NODES = N_IN-1+N_OUT there is no triangle and the switch is the
// plain chain, whose single merge-to-output link limits the number of links
// in use to the largest package weight.
// The node counts for the default (5 inputs, 8 links, 22 nodes) and the
// triangle grown from the bottom-left corner follow the switch concept; the
// exact cell placement and fill order of a partly filled diagonal, the
// input-to-node assignment, the horizontal-first merge nodes and the
// package format are choices of this implementation.
//
// Interface: valid/ready per input (in_ready low = the input stalls);
// per link a beat stream (one weight unit per clock) and a busy flag.
// Timing: a package needs one clock per node it passes plus one clock into
// the link port. On an idle switch of the default size a package from
// input 0 goes right into the triangle, down its first column to output
// node 1 and starts on link 1 six clocks after it was accepted.
module switch_network
  import switch_pkg::*;
#(
  parameter int N_IN    = 5,
  parameter int N_OUT   = 8,
  parameter int N_NODES = 22
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid   [N_IN],
  input  pkt_t    in_data    [N_IN],
  output logic    in_ready   [N_IN],
  output logic    link_busy  [N_OUT],
  output logic    link_valid [N_OUT],
  output pkt_t    link_data  [N_OUT],
  output weight_t link_idx   [N_OUT],
  output logic    link_last  [N_OUT]
);

  localparam int ROWS      = N_IN - 1;          // merge rows; output row index
  localparam int MIN_NODES = N_IN - 1 + N_OUT;
  localparam int MAX_NODES = MIN_NODES + max_extra(N_IN, N_OUT);

  if (N_IN < 2 || N_IN > (1 << SRC_W) || N_OUT < 1 ||
      N_NODES < MIN_NODES || N_NODES > MAX_NODES) begin : g_bad_params
    $error("switch_network: need 2 <= N_IN <= 2**SRC_W and N_IN-1+N_OUT <= N_NODES <= %0d",
           MAX_NODES);
  end

  // Per node: input ports A (left) and B (top), output ports V and H.
  logic a_valid [N_NODES], a_ready [N_NODES];
  logic b_valid [N_NODES], b_ready [N_NODES];
  pkt_t a_data  [N_NODES], b_data  [N_NODES];
  logic v_valid [N_NODES], v_ready [N_NODES];
  logic h_valid [N_NODES], h_ready [N_NODES];
  pkt_t v_data  [N_NODES], h_data  [N_NODES];
  logic link_ready [N_OUT];

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    localparam int ROW   = node_row(i, N_IN, N_OUT);
    localparam int COL   = node_col(i, N_IN, N_OUT);
    localparam int UP    = node_at(ROW - 1, COL, N_IN, N_OUT, N_NODES);
    localparam int LEFT  = node_at(ROW, COL - 1, N_IN, N_OUT, N_NODES);
    localparam int DOWN  = node_at(ROW + 1, COL, N_IN, N_OUT, N_NODES);
    localparam int RIGHT = node_at(ROW, COL + 1, N_IN, N_OUT, N_NODES);

    // input A: an external input on the merge column, else the left node
    if (COL == 0 && ROW < ROWS) begin : g_a_ext
      localparam int SRC = (ROW == 0) ? 0 : ROW + 1;
      assign a_valid[i]    = in_valid[SRC];
      assign a_data[i]     = in_data[SRC];
      assign in_ready[SRC] = a_ready[i];
    end else if (LEFT >= 0) begin : g_a_node
      assign a_valid[i] = h_valid[LEFT];
      assign a_data[i]  = h_data[LEFT];
    end else begin : g_a_none
      assign a_valid[i] = 1'b0;
      assign a_data[i]  = '0;
    end

    // input B: input 1 on the top merge node, else the node above
    if (ROW == 0 && COL == 0) begin : g_b_ext
      assign b_valid[i]  = in_valid[1];
      assign b_data[i]   = in_data[1];
      assign in_ready[1] = b_ready[i];
    end else if (UP >= 0) begin : g_b_node
      assign b_valid[i] = v_valid[UP];
      assign b_data[i]  = v_data[UP];
    end else begin : g_b_none
      assign b_valid[i] = 1'b0;
      assign b_data[i]  = '0;
    end

    // output V: the link below an output-row node, else the node below
    if (ROW == ROWS) begin : g_v_link
      assign v_ready[i] = link_ready[COL];
    end else begin : g_v_node
      assign v_ready[i] = b_ready[DOWN];
    end

    // output H: the node to the right, if any
    if (RIGHT >= 0) begin : g_h_node
      assign h_ready[i] = a_ready[RIGHT];
    end else begin : g_h_none
      assign h_ready[i] = 1'b0;
    end

    // merge nodes feed the triangle first, all other nodes go down first
    switch_node #(.PREFER_V(!(COL == 0 && ROW < ROWS))) u_node (
      .clk, .rst_n,
      .a_valid(a_valid[i]), .a_data(a_data[i]), .a_ready(a_ready[i]),
      .b_valid(b_valid[i]), .b_data(b_data[i]), .b_ready(b_ready[i]),
      .v_valid(v_valid[i]), .v_data(v_data[i]), .v_ready(v_ready[i]),
      .h_valid(h_valid[i]), .h_data(h_data[i]), .h_ready(h_ready[i])
    );
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_link
    localparam int NODE = ROWS + j;
    link_port u_link (
      .clk, .rst_n,
      .in_valid  (v_valid[NODE]),
      .in_data   (v_data[NODE]),
      .in_ready  (link_ready[j]),
      .busy      (link_busy[j]),
      .beat_valid(link_valid[j]),
      .beat_data (link_data[j]),
      .beat_idx  (link_idx[j]),
      .beat_last (link_last[j])
    );
  end

endmodule
