// switch_node: one buffer node of the event switch.
//
// The node stores a single package. It has two incoming links, A (from the
// left, horizontal) and B (from above, vertical), and two outgoing links,
// V (down, vertical) and H (right, horizontal). A node may use only some of
// them; an unused input is tied invalid and an unused output tied not-ready.
//
// Input side: when both inputs hold a package, the node takes them in
// alternating order (a turn bit flips to the other input after every
// accepted package); a lone valid input is always served.
// Output side: the stored package is offered on the preferred output
// first (V when PREFER_V = 1, the default). Only when that output is not
// ready (on an output-row node: the link is busy) is it offered on the
// other one, so it moves on in the next clock instead of waiting.
// Serving inputs alternately and, on the nodes that feed the links,
// preferring the vertical link is the switch's defined node behaviour.
// The PREFER_V = 0 option (used by the merge nodes, which thereby push
// packages into the triangle first), the depth of one package and the
// valid/ready handshake are choices of this implementation.
//
// Timing: a package accepted at a clock edge is offered at the next
// cycle; one hop per clock. The node accepts a new package in the same
// cycle as the stored one leaves, so a chain of nodes carries one package
// per clock. Ready depends combinationally on the downstream ready.
// The valid of the second-choice output may drop when the preferred one
// becomes ready (the package then leaves there instead); the valid of the
// preferred output is held until the package leaves.
module switch_node
  import switch_pkg::*;
#(
  parameter bit PREFER_V = 1'b1   // 1: offer V first, H only if V is not ready; 0: the reverse
) (
  input  logic clk,
  input  logic rst_n,
  // input A (horizontal, from the left)
  input  logic a_valid,
  input  pkt_t a_data,
  output logic a_ready,
  // input B (vertical, from above)
  input  logic b_valid,
  input  pkt_t b_data,
  output logic b_ready,
  // output V (vertical, down)
  output logic v_valid,
  output pkt_t v_data,
  input  logic v_ready,
  // output H (horizontal, right)
  output logic h_valid,
  output pkt_t h_data,
  input  logic h_ready
);

  typedef enum logic {TURN_A = 1'b0, TURN_B = 1'b1} turn_e;

  logic  full_q;
  pkt_t  data_q;
  turn_e turn_q;

  logic send_v, send_h, can_accept, take_a, take_b;

  always_comb begin
    v_valid    = PREFER_V ? full_q : full_q && !h_ready;
    h_valid    = PREFER_V ? full_q && !v_ready : full_q;
    v_data     = data_q;
    h_data     = data_q;
    send_v     = v_valid && v_ready;
    send_h     = h_valid && h_ready;
    can_accept = !full_q || send_v || send_h;
    a_ready    = can_accept && (turn_q == TURN_A || !b_valid);
    b_ready    = can_accept && (turn_q == TURN_B || !a_valid);
    take_a     = a_valid && a_ready;
    take_b     = b_valid && b_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full_q <= 1'b0;
      data_q <= '0;
      turn_q <= TURN_A;
    end else begin
      if (take_a) begin
        full_q <= 1'b1;
        data_q <= a_data;
        turn_q <= TURN_B;
      end else if (take_b) begin
        full_q <= 1'b1;
        data_q <= b_data;
        turn_q <= TURN_A;
      end else if (send_v || send_h) begin
        full_q <= 1'b0;
      end
    end
  end

  // Never take two packages or send one twice in the same cycle.
  a_one_in:  assert property (@(posedge clk) disable iff (!rst_n) !(take_a && take_b));
  a_one_out: assert property (@(posedge clk) disable iff (!rst_n) !(send_v && send_h));
  // A stored package stays offered, unchanged, until it leaves.
  a_hold:    assert property (@(posedge clk) disable iff (!rst_n)
                              (full_q && !send_v && !send_h) |=> (full_q && $stable(data_q)));
  a_offer:   assert property (@(posedge clk) disable iff (!rst_n)
                              full_q |-> (PREFER_V ? v_valid : h_valid));

endmodule
