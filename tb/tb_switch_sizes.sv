// tb_switch_sizes: the switch at sizes other than the default.
//
// Runs several harnesses side by side: the plain chain (no triangle
// nodes), which must reach exactly as many links as the largest package
// weight (6 of 8), a small triangle with a partly filled diagonal, the default
// 5x8 arrangement with every triangle cell filled, and a wider switch
// with more inputs than links. Each must deliver every package once; the
// triangular ones must use all of their links.
module tb_switch_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  localparam int NH = 5;
  logic done [NH];
  int   chk  [NH], fl [NH];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_size_harness #(.N_IN(5), .N_OUT(8), .N_NODES(12), .CHAIN(1'b1)) h0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tb_size_harness #(.N_IN(3), .N_OUT(4), .N_NODES(8))  h1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  tb_size_harness #(.N_IN(5), .N_OUT(8), .N_NODES(34)) h2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  tb_size_harness #(.N_IN(2), .N_OUT(3), .N_NODES(6))  h3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  tb_size_harness #(.N_IN(9), .N_OUT(4), .N_NODES(18)) h4 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    do begin
      @(posedge clk); #1;
      all = 1;
      for (int i = 0; i < NH; i++) if (!done[i]) all = 0;
    end while (!all);
    for (int i = 0; i < NH; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
