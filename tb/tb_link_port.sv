// tb_link_port: self-checking test of the link port.
//
// Sends packages of random weight (including 0, which counts as 1) with
// random gaps. For every accepted package of weight w the bench expects
// exactly w beats in the w clocks after acceptance, numbered 0 .. w-1,
// carrying that package, the last one flagged, and the port busy and
// refusing input in all of them but the last. Back-to-back packages must
// keep the link busy without a gap.
module tb_link_port;
  import switch_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, busy, beat_valid, beat_last;
  pkt_t in_data, beat_data;
  weight_t beat_idx;
  int checks = 0, failures = 0;

  link_port dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected beat stream, built from accepted packages
  pkt_t exp_pkt[$];
  int   exp_idx[$];
  int   exp_w[$];
  longint busy_cycles = 0, weight_sum = 0;

  always @(posedge clk) if (rst_n) begin
    if (exp_pkt.size() > 0) begin
      check(beat_valid && busy, "beat expected");
      check(beat_data == exp_pkt[0], "beat data");
      check(int'(beat_idx) == exp_idx[0], "beat index");
      check(beat_last == (exp_idx[0] == exp_w[0] - 1), "last flag");
      check(in_ready == beat_last, "ready only during the last beat");
      void'(exp_pkt.pop_front()); void'(exp_idx.pop_front()); void'(exp_w.pop_front());
    end else begin
      check(!beat_valid && !busy && in_ready, "idle link");
    end
    if (busy) busy_cycles++;
    if (in_valid && in_ready) begin
      int w;
      w = (in_data.weight == 0) ? 1 : int'(in_data.weight);
      weight_sum += w;
      for (int k = 0; k < w; k++) begin
        exp_pkt.push_back(in_data); exp_idx.push_back(k); exp_w.push_back(w);
      end
    end
  end

  int acc = 0;
  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // back-to-back packages of weight 3: 12 busy clocks without a gap
    for (int k = 0; k < 4; k++) begin
      in_valid = 1;
      in_data = '{src: SRC_W'(1), weight: weight_t'(3), tag: TAG_W'(k)};
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    #1 check(busy_cycles == 12, "four weight-3 packages take 12 clocks");
    // random traffic
    for (int k = 0; k < 4000; k++) begin
      in_valid = $urandom_range(0, 3) != 0;
      in_data = '{src: SRC_W'($urandom), weight: weight_t'($urandom_range(0, 15)),
                  tag: TAG_W'($urandom)};
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    #1 check(busy_cycles == weight_sum, "busy clocks equal the weight sum");
    check(exp_pkt.size() == 0, "all beats sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
