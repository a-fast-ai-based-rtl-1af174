// tb_interaction_network: end-to-end test of the interaction network at its
// default sizes (49 nodes, 98 edges, 2+2 features, 6 hidden neurons, reuse
// factor 16, aggregation split in 2), with no parameter overrides.
//
// The testbench builds hit graphs like those of one detector segment: a few
// straight particle tracks crossing 8 layers, hits in normalised units
// (x / 20 in [-10, 10], z / 100 in [2.7, 4.1]), edges only between hits of
// adjacent layers with |dx/dz| below 2, receiver on the outer layer, edge
// features (dx, dz) = sender - receiver. Graphs are cut to 49 nodes and 98
// edges or padded with zero nodes and self loops on the last node. Random
// weights go in through the weight port; each graph is driven on the
// parallel graph inputs with start, and after it has been accepted the
// inputs are overwritten with noise, which must not matter. A monitor
// compares all 98 edge weights at every done with a bit-exact reference of
// the whole forward pass (R1, aggregation, O, R2, sigmoid), in start order.
//
// Timing checked, counted in falling edges: done comes LAT = 2*GE + GN + B
// + 18 = 108 after the falling edge at which start && ready was seen, and
// with start held, graphs are accepted every II = GE + B + 8 = 71.
//
// Sequence: one graph alone; three graphs streamed (the first crowded, so
// edges are cut) with start held while not ready, so two graphs are in
// flight at once, and a weight write attempted while busy, which must be
// ignored; then two graphs with the output bias forced high and low, so
// both ends of the sigmoid table are reached. Each mechanism is counted and
// a failure is recorded for any that never happened.
module tb_interaction_network;
  import in_pkg::*;
  import in_ref_pkg::*;

  localparam int NN = 49, NE = 98, DN = 2, DE = 2, H = 6, RF = 16, PF = 2;
  localparam int LE = (NE + RF - 1) / RF, LN = (NN + RF - 1) / RF;
  localparam int GE = (NE + LE - 1) / LE, GN = (NN + LN - 1) / LN, B = (NE + PF - 1) / PF;
  localparam int LAT = 2*GE + GN + B + 18;
  localparam int II  = GE + B + 8;
  localparam int NP1 = (2*DN + DE + H + DE) * H + 2*H + DE;
  localparam int NPO = (DN + DE + H + DN) * H + 2*H + DN;
  localparam int NP2 = (2*DN + DE + H + 1) * H + 2*H + 1;
  localparam int NLAYERS = 8;
  localparam int MAXG = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fix_t        in_node_feat [NN][DN];
  fix_t        in_edge_feat [NE][DE];
  idx_t        in_edge_recv [NE];
  idx_t        in_edge_send [NE];
  logic        start = 1'b0, wt_we = 1'b0;
  logic [1:0]  wt_block = '0;
  logic [15:0] wt_addr = '0;
  fix_t        wt_data = '0;
  logic        ready, busy, done;
  fix_t        edge_weight [NE];

  interaction_network dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pad_edges = 0, n_pad_nodes = 0, n_cut_edges = 0, n_both_engines = 0;
  int n_sig_high = 0, n_sig_low = 0, n_wr_busy = 0, n_start_wait = 0;
  int n_overlap = 0, n_stream = 0, n_noise = 0;

  int gx [NN][DN];
  int ge [NE][DE];
  int gr [NE], gs [NE];
  int p1[], po[], p2[];

  // Expected results per accepted graph, in start order.
  int staged_w [NE];
  int exp_w [MAXG][NE];
  int acc_nc [MAXG];
  int n_acc = 0, n_dn = 0;
  int nc = 0;                       // falling-edge counter

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

  // ------------------------------------------------------------ graph model
  task automatic make_graph(int ntracks, int spread);
    int layer_of [NN];
    int nh = 0, ne = 0;
    for (int i = 0; i < NN; i++) begin gx[i] = '{0, 0}; layer_of[i] = -1; end
    for (int t = 0; t < ntracks; t++) begin
      int x0, sl;
      x0 = rnd(spread);               // x at the first layer, Q8.8
      sl = rnd(spread / 8);           // dx per layer
      for (int l = 0; l < NLAYERS; l++) begin
        if ($urandom_range(9, 0) == 0) continue;  // missing hit
        if (nh < NN) begin
          gx[nh][0] = x0 + sl * l + rnd(20);
          gx[nh][1] = 691 + 45 * l;   // z / 100 for layers 2.70 .. 4.05
          layer_of[nh] = l;
          nh++;
        end
      end
    end
    n_pad_nodes += NN - nh;
    for (int r = 0; r < nh; r++)
      for (int s = 0; s < nh; s++)
        if (layer_of[r] == layer_of[s] + 1) begin
          int dx, dz;
          dx = gx[s][0] - gx[r][0];
          dz = gx[s][1] - gx[r][1];
          if ((dx < 0 ? -dx : dx) < 2 * (dz < 0 ? -dz : dz)) begin
            if (ne < NE) begin
              gr[ne] = r; gs[ne] = s;
              ge[ne][0] = dx; ge[ne][1] = dz;
              ne++;
            end else n_cut_edges++;
          end
        end
    for (int k = ne; k < NE; k++) begin
      gr[k] = NN - 1; gs[k] = NN - 1; ge[k] = '{0, 0};
      n_pad_edges++;
    end
  endtask

  // -------------------------------------------------------- reference model
  task automatic reference(output int w [NE]);
    int eu [NE][DE];
    longint ag [NN][DE];
    int xu [NN][DN];
    for (int k = 0; k < NE; k++) begin
      vec_t v, y;
      v = new[2*DN + DE];
      for (int d = 0; d < DN; d++) begin v[d] = gx[gr[k]][d]; v[DN + d] = gx[gs[k]][d]; end
      for (int d = 0; d < DE; d++) v[2*DN + d] = ge[k][d];
      y = mlp(p1, v, H, DE);
      for (int d = 0; d < DE; d++) eu[k][d] = y[d];
    end
    for (int n = 0; n < NN; n++) for (int d = 0; d < DE; d++) ag[n][d] = 0;
    for (int k = 0; k < NE; k++) for (int d = 0; d < DE; d++) ag[gr[k]][d] += longint'(eu[k][d]);
    for (int n = 0; n < NN; n++) begin
      vec_t v, y;
      v = new[DN + DE];
      for (int d = 0; d < DN; d++) v[d] = gx[n][d];
      for (int d = 0; d < DE; d++) v[DN + d] = sat16(ag[n][d]);
      y = mlp(po, v, H, DN);
      for (int d = 0; d < DN; d++) xu[n][d] = y[d];
    end
    for (int k = 0; k < NE; k++) begin
      vec_t v, y;
      v = new[2*DN + DE];
      for (int d = 0; d < DN; d++) begin v[d] = xu[gr[k]][d]; v[DN + d] = xu[gs[k]][d]; end
      for (int d = 0; d < DE; d++) v[2*DN + d] = eu[k][d];
      y = mlp(p2, v, H, 1);
      w[k] = sigmoid(y[0]);
    end
  endtask

  // ---------------------------------------------------------- port drivers
  task automatic load_weights();
    while (busy) @(negedge clk);
    for (int i = 0; i < NP1 + NPO + NP2; i++) begin
      wt_we    <= 1'b1;
      wt_block <= (i < NP1) ? 2'd0 : (i < NP1 + NPO) ? 2'd1 : 2'd2;
      wt_addr  <= 16'((i < NP1) ? i : (i < NP1 + NPO) ? i - NP1 : i - NP1 - NPO);
      wt_data  <= fix_t'((i < NP1) ? p1[i] : (i < NP1 + NPO) ? po[i - NP1] : p2[i - NP1 - NPO]);
      @(posedge clk);
    end
    wt_we <= 1'b0;
  endtask

  task automatic drive_noise();
    for (int i = 0; i < NN; i++)
      for (int d = 0; d < DN; d++) in_node_feat[i][d] <= fix_t'($urandom);
    for (int k = 0; k < NE; k++) begin
      for (int d = 0; d < DE; d++) in_edge_feat[k][d] <= fix_t'($urandom);
      in_edge_recv[k] <= idx_t'($urandom_range(NN - 1, 0));
      in_edge_send[k] <= idx_t'($urandom_range(NN - 1, 0));
    end
  endtask

  // Drives the graph in gx/ge/gr/gs with start, waits until it is accepted,
  // then drops start and drives noise. Call right after a rising edge.
  task automatic issue();
    int w [NE];
    bit seen_low = 0, seen_high = 0;
    reference(w);
    for (int k = 0; k < NE; k++) begin
      staged_w[k] = w[k];
      if (k < B && gr[k] < NN) seen_low = 1;
      if (k >= B && gr[k] < NN) seen_high = 1;
    end
    if (seen_low && seen_high) n_both_engines++;
    for (int i = 0; i < NN; i++)
      for (int d = 0; d < DN; d++) in_node_feat[i][d] <= fix_t'(gx[i][d]);
    for (int k = 0; k < NE; k++) begin
      for (int d = 0; d < DE; d++) in_edge_feat[k][d] <= fix_t'(ge[k][d]);
      in_edge_recv[k] <= idx_t'(gr[k]);
      in_edge_send[k] <= idx_t'(gs[k]);
    end
    start <= 1'b1;
    do @(negedge clk); while (!ready);
    @(posedge clk);                 // this edge accepts the graph
    start <= 1'b0;
    drive_noise();
    n_noise++;
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (busy || n_dn != n_acc);
    @(posedge clk);
  endtask

  // Monitor: accepts, dones, overlap and the check of every result.
  always @(negedge clk) begin
    nc++;
    if (start && !ready) n_start_wait++;
    if (busy && n_acc - n_dn > 1) n_overlap++;
    if (start && ready) begin
      if (n_acc < MAXG) begin
        for (int k = 0; k < NE; k++) exp_w[n_acc][k] = staged_w[k];
        acc_nc[n_acc] = nc;
      end
      n_acc++;
    end
    if (done) begin
      if (n_dn >= n_acc || n_dn >= MAXG) begin
        check("done without a graph", 1, 0);
      end else begin
        check($sformatf("graph %0d latency", n_dn), nc - acc_nc[n_dn], LAT);
        for (int k = 0; k < NE; k++) begin
          check($sformatf("graph %0d edge %0d", n_dn, k), int'(edge_weight[k]), exp_w[n_dn][k]);
          if (edge_weight[k] == 16'sd255) n_sig_high++;
          if (edge_weight[k] == 16'sd0) n_sig_low++;
        end
      end
      n_dn++;
    end
  end

  initial begin
    int g0;
    p1 = new[NP1]; po = new[NPO]; p2 = new[NP2];
    for (int i = 0; i < NP1; i++) p1[i] = rnd(256);
    for (int i = 0; i < NPO; i++) po[i] = rnd(256);
    for (int i = 0; i < NP2; i++) p2[i] = rnd(256);
    for (int k = 0; k < NE; k++) staged_w[k] = 0;
    for (int i = 0; i < NN; i++) for (int d = 0; d < DN; d++) in_node_feat[i][d] = '0;
    for (int k = 0; k < NE; k++) begin
      for (int d = 0; d < DE; d++) in_edge_feat[k][d] = '0;
      in_edge_recv[k] = '0;
      in_edge_send[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    load_weights();

    // graph 0 alone
    make_graph(6, 1500);
    issue();
    wait_idle();

    // graphs 1..3 streamed; the first is crowded so edges are cut
    g0 = n_acc;
    make_graph(12, 60);
    issue();
    // a weight write while a graph is in flight must be ignored
    wt_we <= 1'b1; wt_block <= 2'd2; wt_addr <= 16'(NP2 - 1); wt_data <= 16'sd3000;
    @(posedge clk);
    wt_we <= 1'b0;
    if (busy) n_wr_busy++;
    make_graph(6, 1500);
    issue();
    make_graph(4, 1500);
    issue();
    check("accept interval 1-2", acc_nc[g0 + 1] - acc_nc[g0], II);
    check("accept interval 2-3", acc_nc[g0 + 2] - acc_nc[g0 + 1], II);
    n_stream++;
    wait_idle();

    // output bias forced high, then low
    p2[NP2 - 1] = 15000;
    load_weights();
    issue();
    wait_idle();
    p2[NP2 - 1] = -15000;
    load_weights();
    issue();
    wait_idle();
    repeat (5) @(posedge clk);
    check("every graph done", n_dn, n_acc);

    $display("mechanisms: graphs=%0d pad_nodes=%0d pad_edges=%0d cut_edges=%0d both_agg_engines=%0d sig_high=%0d sig_low=%0d overlap_cycles=%0d start_wait_cycles=%0d weight_write_while_busy=%0d input_noise_after_accept=%0d streams=%0d",
             n_acc, n_pad_nodes, n_pad_edges, n_cut_edges, n_both_engines, n_sig_high, n_sig_low,
             n_overlap, n_start_wait, n_wr_busy, n_noise, n_stream);
    checks++; if (n_pad_nodes == 0)    begin failures++; $display("no padded nodes"); end
    checks++; if (n_pad_edges == 0)    begin failures++; $display("no padded edges"); end
    checks++; if (n_cut_edges == 0)    begin failures++; $display("no cut edges"); end
    checks++; if (n_both_engines == 0) begin failures++; $display("aggregation engines not both used"); end
    checks++; if (n_sig_high == 0)     begin failures++; $display("sigmoid top never reached"); end
    checks++; if (n_sig_low == 0)      begin failures++; $display("sigmoid bottom never reached"); end
    checks++; if (n_overlap == 0)      begin failures++; $display("never two graphs in flight"); end
    checks++; if (n_start_wait == 0)   begin failures++; $display("start never held while not ready"); end
    checks++; if (n_wr_busy == 0)      begin failures++; $display("no weight write while busy"); end
    checks++; if (n_noise == 0)        begin failures++; $display("inputs never changed after accept"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
