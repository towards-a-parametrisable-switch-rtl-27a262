// tb_switch_node: self-checking test of one switch node.
//
// Directed phases: a lone input reaches V one clock after it is accepted;
// two busy inputs are served strictly alternately; with V blocked the
// package leaves on H; with both outputs blocked the node holds its
// package and refuses new ones; a stream through V runs at one package per
// clock. A second node built with the horizontal output preferred must
// use H when both outputs are free and V only when H is blocked. A random phase then checks that every accepted package leaves
// exactly once, in acceptance order, and never on H while V is ready.
module tb_switch_node;
  import switch_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic a_valid, b_valid, v_ready, h_ready;
  pkt_t a_data, b_data;
  logic a_ready, b_ready, v_valid, h_valid;
  pkt_t v_data, h_data;
  int checks = 0, failures = 0;

  switch_node dut (.*);

  // second node with the horizontal output preferred
  logic h2_v_ready, h2_h_ready, h2_v_valid, h2_h_valid, h2_a_ready, h2_b_ready;
  pkt_t h2_v_data, h2_h_data;
  switch_node #(.PREFER_V(1'b0)) dut_h (
    .clk, .rst_n,
    .a_valid, .a_data, .a_ready(h2_a_ready),
    .b_valid(1'b0), .b_data('0), .b_ready(h2_b_ready),
    .v_valid(h2_v_valid), .v_data(h2_v_data), .v_ready(h2_v_ready),
    .h_valid(h2_h_valid), .h_data(h2_h_data), .h_ready(h2_h_ready)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic pkt_t mk(int src, int tag);
    pkt_t p;
    p.src = SRC_W'(src);
    p.weight = weight_t'(1);
    p.tag = TAG_W'(tag);
    return p;
  endfunction

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard for the random phase
  pkt_t q[$];
  bit   rand_phase = 0;
  always @(posedge clk) if (rand_phase) begin
    if (v_valid && v_ready) begin
      check(q.size() > 0 && v_data == q[0], "random: V order");
      if (q.size() > 0) void'(q.pop_front());
    end else if (h_valid && h_ready) begin
      check(!v_ready, "random: H used while V ready");
      check(q.size() > 0 && h_data == q[0], "random: H order");
      if (q.size() > 0) void'(q.pop_front());
    end
    if (a_valid && a_ready) q.push_back(a_data);
    else if (b_valid && b_ready) q.push_back(b_data);
    check(!(a_valid && a_ready && b_valid && b_ready), "random: two inputs in one clock");
  end

  int  got_src[$];
  int  n;
  initial begin
    a_valid = 0; b_valid = 0; v_ready = 0; h_ready = 0;
    a_data = '0; b_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 0: horizontal-first node
    h2_v_ready = 1; h2_h_ready = 1;
    a_valid = 1; a_data = mk(7, 1);
    @(posedge clk); #1;
    a_valid = 0;
    check(h2_h_valid && !h2_v_valid && h2_h_data == mk(7, 1), "H-first node offers H only");
    h2_h_ready = 0;
    #0 check(h2_v_valid && h2_v_data == mk(7, 1), "H-first node falls back to V");
    @(posedge clk); #1;
    check(!h2_v_valid && !h2_h_valid, "H-first node sent on V");
    h2_h_ready = 1;
    v_ready = 1;
    @(posedge clk); #1;

    // 1: lone A input, latency of one clock to V
    a_valid = 1; a_data = mk(1, 100); v_ready = 1;
    @(posedge clk); #1;
    a_valid = 0;
    check(v_valid && v_data == mk(1, 100), "lone A appears on V next clock");
    check(!h_valid, "no H while V ready");
    @(posedge clk); #1;
    check(!v_valid, "node empty after sending");

    // 2: both inputs always valid, strict alternation A,B,A,B...
    a_valid = 1; b_valid = 1; v_ready = 1;
    got_src.delete();
    for (int k = 0; k < 8; k++) begin
      a_data = mk(2, k); b_data = mk(3, k);
      @(posedge clk); #1;
      if (v_valid) got_src.push_back(int'(v_data.src));
    end
    a_valid = 0; b_valid = 0;
    n = 0;
    for (int k = 1; k < got_src.size(); k++) if (got_src[k] == got_src[k-1]) n++;
    check(got_src.size() == 8, "one package per clock with two inputs");
    check(n == 0, "inputs served alternately");
    check(got_src[0] == 3, "B served first after A was taken");
    @(posedge clk); #1;

    // 3: V blocked, package goes horizontally
    v_ready = 0; h_ready = 1;
    b_valid = 1; b_data = mk(4, 7);
    @(posedge clk); #1;
    b_valid = 0;
    check(h_valid && h_data == mk(4, 7), "package offered on H when V is blocked");
    check(v_valid, "package still offered on V");
    @(posedge clk); #1;
    check(!v_valid && !h_valid, "package left on H");

    // 4: both outputs blocked, node holds and refuses
    v_ready = 0; h_ready = 0;
    a_valid = 1; a_data = mk(5, 1);
    @(posedge clk); #1;
    a_data = mk(5, 2);
    for (int k = 0; k < 4; k++) begin
      check(!a_ready, "full node refuses input");
      check(v_valid && v_data == mk(5, 1), "full node holds package");
      @(posedge clk); #1;
    end
    // V frees up: the held package leaves and the next one enters in the same clock
    v_ready = 1;
    #0 check(a_ready, "node takes a package while the stored one leaves");
    @(posedge clk); #1;
    a_valid = 0;
    check(v_valid && v_data == mk(5, 2), "next package after the blocked one");
    @(posedge clk); #1;

    // 5: throughput, a stream of 20 packages on B through V in 20 clocks
    n = 0;
    b_valid = 1;
    for (int k = 0; k < 20; k++) begin
      b_data = mk(6, k);
      @(posedge clk); #1;
      if (v_valid && v_data == mk(6, k)) n++;
    end
    b_valid = 0;
    check(n == 20, "one package per clock");
    @(posedge clk); #1;
    v_ready = 0; h_ready = 1;
    @(posedge clk); #1;

    // 6: random traffic against the scoreboard
    rand_phase = 1;
    for (int k = 0; k < 3000; k++) begin
      a_valid = $urandom_range(0, 1) == 1;
      b_valid = $urandom_range(0, 1) == 1;
      a_data  = mk(1, $urandom_range(0, 65535));
      b_data  = mk(2, $urandom_range(0, 65535));
      v_ready = $urandom_range(0, 2) != 0;
      h_ready = $urandom_range(0, 1) == 1;
      @(posedge clk); #1;
    end
    a_valid = 0; b_valid = 0; v_ready = 1;
    repeat (3) @(posedge clk);
    #1 check(q.size() == 0, "random: all packages left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
