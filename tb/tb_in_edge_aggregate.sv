// tb_in_edge_aggregate: self-checking test of the edge aggregation.
//
// Three random graphs of 49 nodes and 98 edges: ordinary messages; many
// large messages into node 0 so its sum saturates, plus receivers past the
// last node that must be skipped; and all edges into one node of each half
// so that both engines hit the same node. Every node sum is compared with a
// sum worked out here; the start-to-done latency must be B + 2 cycles
// counted at falling edges (B = 49 edges per engine).
module tb_in_edge_aggregate;
  import in_pkg::*;

  localparam int NN = 49, NE = 98, D = 2, PF = 2;
  localparam int B = (NE + PF - 1) / PF;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  fix_t msg [NE][D];
  idx_t ir  [NE];
  logic busy, done;
  fix_t agg [NN][D];

  in_edge_aggregate #(.N_NODES(NN), .N_EDGES(NE), .D(D), .PF(PF)) dut (
    .clk, .rst_n, .start, .msg, .idx_r(ir), .busy, .done, .agg);

  int checks = 0, failures = 0, sat_hits = 0;

  function automatic int rnd(int range);
    return $signed($urandom_range(2*range, 0)) - range;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run(int mode);
    longint s [NN][D];
    int t = 0;
    for (int k = 0; k < NE; k++) begin
      ir[k] = idx_t'($urandom_range(NN-1, 0));
      for (int d = 0; d < D; d++) msg[k][d] = fix_t'(rnd(3000));
      if (mode == 1 && k % 3 == 0) begin
        ir[k] = '0;
        msg[k][0] = 16'sd20000;
        msg[k][1] = -16'sd20000;
      end
      if (mode == 1 && k % 7 == 1) ir[k] = idx_t'(NN + k);
      if (mode == 2) ir[k] = (k % 2 == 0) ? idx_t'(5) : idx_t'(40);
    end
    for (int n = 0; n < NN; n++) for (int d = 0; d < D; d++) s[n][d] = 0;
    for (int k = 0; k < NE; k++)
      if (ir[k] < NN) for (int d = 0; d < D; d++) s[ir[k]][d] += longint'(msg[k][d]);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do begin
      @(negedge clk);
      t++;
    end while (!done);
    check("latency", t, B + 2);
    for (int n = 0; n < NN; n++)
      for (int d = 0; d < D; d++) begin
        longint ex;
        ex = s[n][d];
        if (ex > 32767) begin ex = 32767; sat_hits++; end
        if (ex < -32768) begin ex = -32768; sat_hits++; end
        check($sformatf("mode %0d node %0d f%0d", mode, n, d), int'(agg[n][d]), int'(ex));
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(0);
    run(1);
    run(2);
    checks++;
    if (sat_hits == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
