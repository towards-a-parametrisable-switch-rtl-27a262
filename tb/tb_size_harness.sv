// tb_size_harness: drives one switch of a given size with random traffic
// and checks delivery with a scoreboard; used by tb_switch_sizes.
//
// Every package gets a per-input sequence tag; each one accepted must
// leave exactly once, with its weight, on some link. After `start` the
// harness runs a random phase of N_CLK clocks, then a saturating phase,
// then drains and raises `done`; `checks` and `failures` are its counts.
// It also checks that every link carried a package, or, for the plain
// chain, that exactly as many links were used as the largest weight.
module tb_size_harness
  import switch_pkg::*;
#(
  parameter int N_IN    = 3,
  parameter int N_OUT   = 4,
  parameter int N_NODES = 6,
  parameter int N_CLK   = 1500,
  parameter int WMAX    = 6,     // largest package weight generated
  parameter bit CHAIN   = 1'b0   // no triangle: at most WMAX links are reachable
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  logic    in_valid [N_IN], in_ready [N_IN];
  pkt_t    in_data  [N_IN];
  logic    link_busy [N_OUT], link_valid [N_OUT], link_last [N_OUT];
  pkt_t    link_data [N_OUT];
  weight_t link_idx  [N_OUT];

  switch_network #(.N_IN(N_IN), .N_OUT(N_OUT), .N_NODES(N_NODES)) dut (.*);

  int pending [bit [SRC_W+TAG_W-1:0]];
  int seq [N_IN];
  int used [N_OUT];
  int phase = 0;   // 0 idle, 1 random, 2 saturating, 3 drain
  int clk_cnt = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d/%0d/%0d] %s at %0t", N_IN, N_OUT, N_NODES, what, $time);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    foreach (seq[k]) begin seq[k] = 0; in_valid[k] = 0; in_data[k] = '0; end
    foreach (used[j]) used[j] = 0;
  end

  always @(posedge clk) if (rst_n && !done) begin
    // scoreboard
    for (int j = 0; j < N_OUT; j++)
      if (link_valid[j] && link_idx[j] == 0) begin
        bit [SRC_W+TAG_W-1:0] key;
        key = {link_data[j].src, link_data[j].tag};
        check(pending.exists(key), "delivered package was sent");
        if (pending.exists(key)) begin
          check(pending[key] == int'(link_data[j].weight), "weight kept");
          pending.delete(key);
        end
        used[j]++;
      end
    // inputs
    for (int k = 0; k < N_IN; k++) begin
      bit held;
      held = in_valid[k] && !in_ready[k];
      if (in_valid[k] && in_ready[k])
        pending[{in_data[k].src, in_data[k].tag}] = int'(in_data[k].weight);
      if (!held) begin
        if ((phase == 1 && $urandom_range(0, 99) < 40) || phase == 2) begin
          in_valid[k] <= 1'b1;
          in_data[k]  <= '{src: SRC_W'(k), weight: weight_t'($urandom_range(1, WMAX)),
                           tag: TAG_W'(seq[k])};
          seq[k]++;
        end else begin
          in_valid[k] <= 1'b0;
        end
      end
    end
    clk_cnt++;
    if (phase == 0) begin phase <= 1; clk_cnt = 0; end
    else if (phase == 1 && clk_cnt == N_CLK) begin phase <= 2; clk_cnt = 0; end
    else if (phase == 2 && clk_cnt == N_CLK) begin phase <= 3; clk_cnt = 0; end
    else if (phase == 3 && clk_cnt == 300) begin
      check(pending.size() == 0, "all packages delivered");
      if (CHAIN) begin
        // one package per clock enters the output row at its left end, so
        // no more links can be busy at once than the largest weight
        int n_used;
        n_used = 0;
        for (int j = 0; j < N_OUT; j++) if (used[j] > 0) n_used++;
        check(n_used == WMAX, $sformatf("chain uses %0d links, expected %0d", n_used, WMAX));
      end else begin
        for (int j = 0; j < N_OUT; j++) check(used[j] > 0, $sformatf("link %0d used", j));
      end
      done <= 1'b1;
    end
  end
endmodule
