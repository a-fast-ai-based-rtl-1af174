// tb_in_edge_block: self-checking test of the relational block in both of
// its uses, side by side on the same random graph of 49 nodes and 98 edges:
// R1 (2 linear outputs per edge) and R2 (1 output per edge through the
// sigmoid table). Edge indices are random, with self loops (the padding
// edges) and a few indices past the last node, which must read zeros.
// Every output is compared with the reference model; the start-to-done
// latency must be G + 4 (+1 with the sigmoid), G = ceil(98/7) = 14; a
// start while busy must be ignored. Two graphs are run back to back.
module tb_in_edge_block;
  import in_pkg::*;
  import in_ref_pkg::*;

  localparam int NN = 49, NE = 98, DN = 2, DE = 2, H = 6, LANES = 7;
  localparam int G = (NE + LANES - 1) / LANES;
  localparam int NP1 = (2*DN + DE + H + DE) * H + 2*H + DE;
  localparam int NP2 = (2*DN + DE + H + 1) * H + 2*H + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  fix_t p1 [NP1];
  fix_t p2 [NP2];
  fix_t x  [NN][DN];
  fix_t e  [NE][DE];
  idx_t ir [NE];
  idx_t is [NE];
  logic busy1, done1, busy2, done2;
  fix_t out1 [NE][DE];
  fix_t out2 [NE][1];

  in_edge_block #(.N_NODES(NN), .N_EDGES(NE), .D_NODE(DN), .D_EDGE(DE), .H(H),
                  .D_OUT(DE), .LANES(LANES), .SIGMOID(1'b0)) dut1 (
    .clk, .rst_n, .start, .params(p1), .x, .e, .idx_r(ir), .idx_s(is),
    .busy(busy1), .done(done1), .out(out1));
  in_edge_block #(.N_NODES(NN), .N_EDGES(NE), .D_NODE(DN), .D_EDGE(DE), .H(H),
                  .D_OUT(1), .LANES(LANES), .SIGMOID(1'b1)) dut2 (
    .clk, .rst_n, .start, .params(p2), .x, .e, .idx_r(ir), .idx_s(is),
    .busy(busy2), .done(done2), .out(out2));

  int checks = 0, failures = 0;

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

  int ip1[], ip2[];

  task automatic run_graph(int seed_mode);
    int t0, t1 = -1, t2 = -1;
    for (int i = 0; i < NN; i++) for (int d = 0; d < DN; d++) x[i][d] = fix_t'(rnd(2560));
    for (int k = 0; k < NE; k++) begin
      for (int d = 0; d < DE; d++) e[k][d] = fix_t'(rnd(1800));
      ir[k] = idx_t'($urandom_range(NN-1, 0));
      is[k] = idx_t'($urandom_range(NN-1, 0));
    end
    for (int k = NE-6; k < NE; k++) begin ir[k] = idx_t'(NN-1); is[k] = idx_t'(NN-1); end  // padding loops
    ir[3] = idx_t'(100 + seed_mode);   // past the last node
    is[5] = idx_t'(16'hFFFF);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);          // this edge samples start
    start <= 1'b0;
    t0 = 0;
    while (t1 < 0 || t2 < 0) begin
      @(negedge clk);
      t0++;
      if (t0 == 3) start <= 1'b1;  // must be ignored while busy
      if (t0 == 4) start <= 1'b0;
      if (done1 && t1 < 0) t1 = t0;
      if (done2 && t2 < 0) t2 = t0;
    end
    check("R1 latency", t1, G + 4);
    check("R2 latency", t2, G + 5);
    for (int k = 0; k < NE; k++) begin
      vec_t xin, y1, y2;
      xin = new[2*DN + DE];
      for (int d = 0; d < DN; d++) begin
        xin[d]      = (ir[k] < NN) ? int'(x[ir[k]][d]) : 0;
        xin[DN + d] = (is[k] < NN) ? int'(x[is[k]][d]) : 0;
      end
      for (int d = 0; d < DE; d++) xin[2*DN + d] = int'(e[k][d]);
      y1 = mlp(ip1, xin, H, DE);
      y2 = mlp(ip2, xin, H, 1);
      for (int d = 0; d < DE; d++) check($sformatf("R1 edge %0d f%0d", k, d), int'(out1[k][d]), y1[d]);
      check($sformatf("R2 edge %0d", k), int'(out2[k][0]), sigmoid(y2[0]));
    end
    repeat (2) @(posedge clk);
    check("busy cleared", int'(busy1 | busy2), 0);
  endtask

  initial begin
    ip1 = new[NP1];
    ip2 = new[NP2];
    for (int i = 0; i < NP1; i++) begin ip1[i] = rnd(200); p1[i] = fix_t'(ip1[i]); end
    for (int i = 0; i < NP2; i++) begin ip2[i] = rnd(200); p2[i] = fix_t'(ip2[i]); end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_graph(0);
    run_graph(1);
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
