// tb_switch_network: end-to-end test of the switch at its default size
// (5 inputs, 8 links, 22 nodes), with no parameter overridden.
//
// Inputs produce packages with a random weight and a per-input sequence
// tag; a stalled input holds its package until the switch takes it.
// A scoreboard checks that every package leaves exactly once, on some
// link, as a run of `weight` beats, and that nothing else leaves.
// Phases: latency of a lone package on an idle switch (one clock per node
// on its path, one into the link port: merge node 0, the four triangle
// nodes of column 1, output node 1, link 1: six clocks); light load; saturating
// load, where all eight links must be busy together and stay busy for
// most of the time; then a drain.
// The bench counts how often each mechanism happened and fails if one
// never did: input stalls, horizontal moves along the output row because a
// link was busy, nodes with both inputs contending (served alternately),
// packages passing through the triangle, and use of every link.
module tb_switch_network;
  import switch_pkg::*;

  localparam int NI = 5, NO = 8, NN = 22;   // the switch defaults
  localparam int ROWS = NI - 1;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    in_valid [NI], in_ready [NI];
  pkt_t    in_data  [NI];
  logic    link_busy [NO], link_valid [NO], link_last [NO];
  pkt_t    link_data [NO];
  weight_t link_idx  [NO];
  int checks = 0, failures = 0;

  switch_network dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism monitors ----------------
  logic [NN-1:0] h_fire, contend, pass;
  for (genvar i = 0; i < NN; i++) begin : g_mon
    assign h_fire[i]  = dut.g_node[i].u_node.send_h;
    assign contend[i] = dut.g_node[i].u_node.a_valid && dut.g_node[i].u_node.b_valid;
    assign pass[i]    = dut.g_node[i].u_node.take_a || dut.g_node[i].u_node.take_b;
  end
  longint n_stall = 0, n_row_hmove = 0, n_contend = 0, n_triangle = 0, n_all_busy = 0;
  longint link_pkts [NO];
  initial foreach (link_pkts[j]) link_pkts[j] = 0;

  always @(posedge clk) if (rst_n) begin
    int nb;
    for (int k = 0; k < NI; k++) if (in_valid[k] && !in_ready[k]) n_stall++;
    for (int i = ROWS; i < ROWS + NO; i++) if (h_fire[i]) n_row_hmove++;
    n_contend  += $countones(contend);
    for (int i = ROWS + NO; i < NN; i++) if (pass[i]) n_triangle++;
    nb = 0;
    for (int j = 0; j < NO; j++) if (link_busy[j]) nb++;
    if (nb == NO) n_all_busy++;
  end

  // ---------------- scoreboard ----------------
  int pending [bit [SRC_W+TAG_W-1:0]];   // key {src, tag} -> weight
  int seq [NI];
  bit taken [NI];   // the input's package was accepted at the last edge
  longint busy_sum = 0, cycles = 0;
  bit measure = 0;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NI; k++) taken[k] = in_valid[k] && in_ready[k];
    for (int k = 0; k < NI; k++)
      if (in_valid[k] && in_ready[k]) begin
        bit [SRC_W+TAG_W-1:0] key;
        key = {in_data[k].src, in_data[k].tag};
        check(!pending.exists(key), "tag unique");
        pending[key] = (in_data[k].weight == 0) ? 1 : int'(in_data[k].weight);
      end
    for (int j = 0; j < NO; j++)
      if (link_valid[j] && link_idx[j] == 0) begin
        bit [SRC_W+TAG_W-1:0] key;
        key = {link_data[j].src, link_data[j].tag};
        check(pending.exists(key), "delivered package was sent");
        if (pending.exists(key)) begin
          check(pending[key] == int'(link_data[j].weight), "weight kept");
          pending.delete(key);
        end
        link_pkts[j]++;
      end
    if (measure) begin
      cycles++;
      for (int j = 0; j < NO; j++) if (link_busy[j]) busy_sum++;
    end
  end

  // ---------------- stimulus ----------------
  // prob: chance in percent that an idle input produces a package in a clock
  task automatic traffic(int n_clk, int prob, int wmax);
    for (int c = 0; c < n_clk; c++) begin
      for (int k = 0; k < NI; k++) begin
        if (in_valid[k] && !taken[k]) continue;   // stalled: hold
        if ($urandom_range(0, 99) < prob) begin
          in_valid[k] = 1'b1;
          in_data[k]  = '{src: SRC_W'(k), weight: weight_t'($urandom_range(1, wmax)),
                          tag: TAG_W'(seq[k])};
          seq[k]++;
        end else begin
          in_valid[k] = 1'b0;
        end
      end
      @(posedge clk); #1;
    end
  endtask

  task automatic idle_inputs();
    // let stalled packages in, then stop
    bit any;
    do begin
      any = 0;
      for (int k = 0; k < NI; k++)
        if (in_valid[k] && !taken[k]) any = 1; else in_valid[k] = 1'b0;
      @(posedge clk); #1;
    end while (any);
    for (int k = 0; k < NI; k++) in_valid[k] = 1'b0;
  endtask

  int lat;
  initial begin
    foreach (in_valid[k]) begin in_valid[k] = 0; in_data[k] = '0; seq[k] = 0; taken[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // latency: one package on input 0, through the triangle to link 1
    in_valid[0] = 1;
    in_data[0]  = '{src: SRC_W'(0), weight: weight_t'(2), tag: TAG_W'(seq[0])};
    seq[0]++;
    check(in_ready[0], "idle switch takes a package");
    @(posedge clk); #1;
    in_valid[0] = 0;
    lat = 0;   // clock edges since the package was accepted
    while (!link_valid[1] && lat < 50) begin @(posedge clk); #1; lat++; end
    check(lat == 6, $sformatf("latency %0d clocks, expected 6", lat));
    repeat (5) @(posedge clk); #1;

    // light load
    traffic(400, 15, 3);
    idle_inputs();
    repeat (40) @(posedge clk); #1;
    check(pending.size() == 0, "light load drained");

    // saturating load: every input always valid, weights up to 8
    measure = 1;
    traffic(2000, 100, 8);
    measure = 0;
    idle_inputs();
    repeat (100) @(posedge clk); #1;
    check(pending.size() == 0, "all packages delivered");

    $display("saturation: mean busy links %0d%%", int'(100 * busy_sum / (cycles * NO)));
    check(busy_sum * 100 >= 85 * cycles * NO, "links busy at least 85% under saturation");
    $display("mechanisms: stalls=%0d row_hmoves=%0d contentions=%0d triangle_hops=%0d all_links_busy=%0d",
             n_stall, n_row_hmove, n_contend, n_triangle, n_all_busy);
    check(n_stall > 0, "input stall happened");
    check(n_row_hmove > 0, "horizontal move on output row happened");
    check(n_contend > 0, "input contention at a node happened");
    check(n_triangle > 0, "packages crossed the triangle");
    check(n_all_busy > 0, "all links busy at once");
    for (int j = 0; j < NO; j++) check(link_pkts[j] > 0, $sformatf("link %0d used", j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
