// tb_in_node_block: self-checking test of the object (node) block with 49
// nodes, 4 lanes and 6 hidden neurons. Random node features and aggregated
// messages go in; every updated node feature is compared with the
// reference model, and the start-to-done latency must be G + 4 cycles
// counted at falling edges (G = ceil(49/4) = 13). A start while busy must be
// ignored. Two graphs are run back to back.
module tb_in_node_block;
  import in_pkg::*;
  import in_ref_pkg::*;

  localparam int NN = 49, DN = 2, DE = 2, H = 6, LANES = 4;
  localparam int G = (NN + LANES - 1) / LANES;
  localparam int NP = (DN + DE + H + DN) * H + 2*H + DN;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  fix_t p   [NP];
  fix_t x   [NN][DN];
  fix_t agg [NN][DE];
  logic busy, done;
  fix_t xn  [NN][DN];

  in_node_block #(.N_NODES(NN), .D_NODE(DN), .D_EDGE(DE), .H(H), .LANES(LANES)) dut (
    .clk, .rst_n, .start, .params(p), .x, .agg, .busy, .done, .xn);

  int checks = 0, failures = 0;
  int ip[];

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

  task automatic run();
    int t = 0;
    for (int n = 0; n < NN; n++) begin
      for (int d = 0; d < DN; d++) x[n][d] = fix_t'(rnd(2560));
      for (int d = 0; d < DE; d++) agg[n][d] = fix_t'(rnd(4000));
    end
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do begin
      @(negedge clk);
      t++;
      if (t == 2) start <= 1'b1;  // ignored while busy
      if (t == 3) start <= 1'b0;
    end while (!done);
    check("latency", t, G + 4);
    for (int n = 0; n < NN; n++) begin
      vec_t xin, y;
      xin = new[DN + DE];
      for (int d = 0; d < DN; d++) xin[d] = int'(x[n][d]);
      for (int d = 0; d < DE; d++) xin[DN + d] = int'(agg[n][d]);
      y = mlp(ip, xin, H, DN);
      for (int d = 0; d < DN; d++) check($sformatf("node %0d f%0d", n, d), int'(xn[n][d]), y[d]);
    end
    repeat (2) @(posedge clk);
    check("busy cleared", int'(busy), 0);
  endtask

  initial begin
    ip = new[NP];
    for (int i = 0; i < NP; i++) begin ip[i] = rnd(250); p[i] = fix_t'(ip[i]); end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run();
    run();
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
