// tb_workloads: the three load cases of the switch evaluation, run on the
// triangular switch (5 inputs, 8 links, 22 nodes) and, for comparison, on
// the plain chain (same inputs and links, 12 nodes, no triangle).
//
// Every clock an input that holds no package produces one with probability
// p_i and weight w_i; an input whose package is refused holds it and counts
// as stalling. The mean input bandwidth is N_in = sum(w_i * p_i) against
// the output bandwidth of 8 (one weight unit per link and clock). Weights
// {4,4,4,4,2} (four event channels, one configuration bus) and the
// probabilities below give N_in = 4.02, 7.98 and 15.18. Each case runs for
// 5 x 200 clocks. Per clock the bench records the share of busy links and
// of stalling inputs and prints their means.
// Checks, all on the triangular switch: every package is delivered once;
// at low load almost no clock has a stalling input; at high load the links
// are busy nearly all the time; and in every case it stalls its inputs no
// more and keeps its links at least as busy as the chain.
module tb_workloads;
  import switch_pkg::*;

  localparam int NI = 5, NO = 8;
  localparam int NCASE = 3, RUN = 1000;
  localparam int W [NI] = '{4, 4, 4, 4, 2};
  // probabilities in per mille, per case
  localparam int P [NCASE][NI] = '{'{200, 200, 200, 200, 410},
                                   '{450, 450, 450, 450, 390},
                                   '{900, 900, 900, 900, 390}};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // net 0: triangle (default size), net 1: plain chain
  logic    in_valid  [2][NI], in_ready [2][NI];
  pkt_t    in_data   [2][NI];
  logic    link_busy [2][NO], link_valid [2][NO], link_last [2][NO];
  pkt_t    link_data [2][NO];
  weight_t link_idx  [2][NO];

  switch_network u_tri (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_data(in_data[0]), .in_ready(in_ready[0]),
    .link_busy(link_busy[0]), .link_valid(link_valid[0]), .link_data(link_data[0]),
    .link_idx(link_idx[0]), .link_last(link_last[0]));

  switch_network #(.N_NODES(NI - 1 + NO)) u_chain (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_data(in_data[1]), .in_ready(in_ready[1]),
    .link_busy(link_busy[1]), .link_valid(link_valid[1]), .link_data(link_data[1]),
    .link_idx(link_idx[1]), .link_last(link_last[1]));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     cur_case = 0;
  bit     gen = 0, measure = 0;
  int     seq [2][NI];
  longint sent [2], got [2];
  longint busy_sum [2], stall_sum [2], stall_clk [2], n_clk;
  longint nb, ns;

  always @(posedge clk) begin
    if (rst_n) begin
      if (measure) n_clk++;
      for (int n = 0; n < 2; n++) begin
        nb = 0; ns = 0;
        for (int j = 0; j < NO; j++) begin
          if (link_busy[n][j]) nb++;
          if (link_valid[n][j] && link_idx[n][j] == 0) got[n]++;
        end
        for (int k = 0; k < NI; k++) if (in_valid[n][k] && !in_ready[n][k]) ns++;
        if (measure) begin
          busy_sum[n]  += nb;
          stall_sum[n] += ns;
          if (ns > 0) stall_clk[n]++;
        end
        // inputs: keep a refused package, else maybe produce a new one
        for (int k = 0; k < NI; k++) begin
          if (in_valid[n][k] && in_ready[n][k]) sent[n]++;
          if (!(in_valid[n][k] && !in_ready[n][k])) begin
            if (gen && $urandom_range(0, 999) < P[cur_case][k]) begin
              in_valid[n][k] <= 1'b1;
              in_data[n][k]  <= '{src: SRC_W'(k), weight: weight_t'(W[k]),
                                  tag: TAG_W'(seq[n][k])};
              seq[n][k]++;
            end else begin
              in_valid[n][k] <= 1'b0;
            end
          end
        end
      end
    end
  end

  int bw;
  int mb [2], ms [2], mc [2];
  initial begin
    for (int n = 0; n < 2; n++) begin
      sent[n] = 0; got[n] = 0;
      for (int k = 0; k < NI; k++) begin in_valid[n][k] = 0; in_data[n][k] = '0; seq[n][k] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < NCASE; c++) begin
      cur_case = c;
      bw = 0;
      for (int k = 0; k < NI; k++) bw += W[k] * P[c][k];   // N_in in thousandths
      for (int n = 0; n < 2; n++) begin busy_sum[n] = 0; stall_sum[n] = 0; stall_clk[n] = 0; end
      n_clk = 0;
      gen = 1; measure = 1;
      repeat (RUN) @(posedge clk);
      #1 gen = 0; measure = 0;
      // drain: refused packages still get in, then everything leaves
      repeat (200) @(posedge clk);
      #1;
      for (int n = 0; n < 2; n++) begin
        mb[n] = int'(1000 * busy_sum[n] / (n_clk * NO));
        ms[n] = int'(1000 * stall_sum[n] / (n_clk * NI));
        mc[n] = int'(1000 * stall_clk[n] / n_clk);
        check(sent[n] == got[n], $sformatf("case %0d net %0d: all packages delivered", c, n));
      end
      $display("N_in=%0d.%02d  triangle: busy links %0d.%0d%%, stalling inputs %0d.%0d%%, clocks with a stall %0d.%0d%%",
               bw / 1000, (bw % 1000) / 10, mb[0] / 10, mb[0] % 10, ms[0] / 10, ms[0] % 10, mc[0] / 10, mc[0] % 10);
      $display("             chain:    busy links %0d.%0d%%, stalling inputs %0d.%0d%%, clocks with a stall %0d.%0d%%",
               mb[1] / 10, mb[1] % 10, ms[1] / 10, ms[1] % 10, mc[1] / 10, mc[1] % 10);
      check(ms[0] <= ms[1], $sformatf("case %0d: triangle stalls no more than chain", c));
      check(mb[0] >= mb[1], $sformatf("case %0d: triangle links at least as busy as chain", c));
      if (c == 0) check(mc[0] <= 100, "low load: at most 10% of clocks with a stalling input");
      if (c == 2) check(mb[0] >= 900, "high load: links busy at least 90% of the time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
