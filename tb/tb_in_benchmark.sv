// tb_in_benchmark: end-to-end runs of the interaction network at the sizes
// the evaluated design was explored with, besides its main 49-node /
// 98-edge configuration, which tb_interaction_network covers:
//   benchmark   28 nodes, 56 edges, 6 hidden neurons, reuse factor 8
//   neurons16   the benchmark with 16 hidden neurons (top of the neuron scan)
//   nodes50     50 nodes, 100 edges, 6 hidden neurons, reuse factor 16 (top
//               of the graph-size scan)
// Each run is an in_bench_run instance with its own clock, checking every
// edge weight against a bit-exact reference, the latency and the accept
// interval, and that each handshake mechanism happened. The word length
// stays 16 bits: it is fixed in in_pkg.
module tb_in_benchmark;

  logic fin [3];
  int   chk [3];
  int   fail [3];

  in_bench_run #(.NAME("benchmark"), .NN(28), .NE(56),  .H(6),  .RF(8))
    u_bench (.finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  in_bench_run #(.NAME("neurons16"), .NN(28), .NE(56),  .H(16), .RF(8))
    u_h16   (.finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  in_bench_run #(.NAME("nodes50"),   .NN(50), .NE(100), .H(6),  .RF(16))
    u_n50   (.finished(fin[2]), .checks(chk[2]), .failures(fail[2]));

  int checks = 0, failures = 0;

  initial begin
    wait (fin[0] && fin[1] && fin[2]);
    for (int i = 0; i < 3; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog clock, same period as the runs' clocks; each run needs well
  // under 5000 cycles.
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    checks++;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
