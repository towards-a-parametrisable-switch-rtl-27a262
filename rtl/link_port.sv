// link_port: the switch side of one high-speed link.
//
// Each link carries one weight unit per clock. A package of weight w
// therefore occupies the link for w clocks, during which the link is busy
// and takes no other package. The port registers the accepted package and
// emits it as w beats, one per clock, numbered 0 .. w-1, the last one
// flagged. It is ready again during the last beat, so back-to-back
// packages keep the link fully used (w beats in w clocks). A weight of 0
// is treated as 1.
// The busy-for-w-clocks rule is the switch's link model; the beat stream
// and the early ready are choices of this implementation (the serialiser
// behind the beat stream is not part of the switch).
//
// Timing: accepted at edge t, beats in the cycles after t, t+1 .. t+w.
module link_port
  import switch_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  pkt_t    in_data,
  output logic    in_ready,
  output logic    busy,        // a package is on the link this cycle
  output logic    beat_valid,
  output pkt_t    beat_data,
  output weight_t beat_idx,
  output logic    beat_last
);

  pkt_t    pkt_q;
  weight_t left_q;   // beats still to send, including the current one
  weight_t idx_q;

  always_comb begin
    busy       = (left_q != '0);
    beat_valid = busy;
    beat_data  = pkt_q;
    beat_idx   = idx_q;
    beat_last  = (left_q == weight_t'(1));
    in_ready   = !busy || beat_last;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkt_q  <= '0;
      left_q <= '0;
      idx_q  <= '0;
    end else if (in_valid && in_ready) begin
      pkt_q  <= in_data;
      left_q <= (in_data.weight == '0) ? weight_t'(1) : in_data.weight;
      idx_q  <= '0;
    end else if (busy) begin
      left_q <= left_q - weight_t'(1);
      idx_q  <= idx_q + weight_t'(1);
    end
  end

  a_not_busy_over: assert property (@(posedge clk) disable iff (!rst_n)
                                    (in_valid && in_ready) |=> busy);

endmodule
