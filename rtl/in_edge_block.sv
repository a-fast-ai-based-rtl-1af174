// in_edge_block: relational (edge) block of the interaction network, used
// both as the first edge block R1 and as the output block R2.
//
// For every edge k with receiver r = idx_r[k] and sender s = idx_s[k] it
// forms the vector [x_r, x_s, e_k] (the receiver's node features, the
// sender's node features, the edge's own features, in that order) and runs
// it through a three-layer perceptron. R1 returns D_OUT = D_EDGE updated
// edge features (the messages); R2 returns one logit per edge, which the
// SIGMOID option turns into an edge weight in [0, 1].
//
// Reuse: LANES perceptron copies work side by side. After start, group g
// (edges g*LANES .. g*LANES+LANES-1) is issued in the g-th cycle, one group
// per cycle, so the G = ceil(N_EDGES/LANES) groups take G cycles; with
// LANES = ceil(N_EDGES/RF) this is the reuse factor RF of the evaluated
// design (each multiplier used about RF times per graph). Node features
// are read from fully partitioned arrays, so all 2*LANES gathers of a cycle
// happen at once. An index at or above N_NODES reads zero features.
//
// Timing: start is sampled on a clock edge while idle (ignored while busy).
// The perceptron takes 3 cycles and the sigmoid table 1 more, so done is set
// by the clock edge G + 3 + SIGMOID edges after the one that sampled start
// and stays high for one cycle; out[] holds every result from then on, and
// is overwritten group by group by the next run. Inputs must be stable
// while busy. The lane structure and this handshake are this design's own.
module in_edge_block
  import in_pkg::*;
#(
  parameter int unsigned N_NODES = 49,
  parameter int unsigned N_EDGES = 98,
  parameter int unsigned D_NODE  = 2,
  parameter int unsigned D_EDGE  = 2,
  parameter int unsigned H       = 6,
  parameter int unsigned D_OUT   = 2,
  parameter int unsigned LANES   = 7,
  parameter bit          SIGMOID = 1'b0,
  localparam int unsigned D_IN     = 2 * D_NODE + D_EDGE,
  localparam int unsigned N_PARAMS = (D_IN + H + D_OUT) * H + 2 * H + D_OUT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t params [N_PARAMS],
  input  fix_t x      [N_NODES][D_NODE],
  input  fix_t e      [N_EDGES][D_EDGE],
  input  idx_t idx_r  [N_EDGES],
  input  idx_t idx_s  [N_EDGES],
  output logic busy,
  output logic done,
  output fix_t out    [N_EDGES][D_OUT]
);

  localparam int unsigned G     = (N_EDGES + LANES - 1) / LANES;
  localparam int unsigned TAG_W = $clog2(G + 1);
  localparam int unsigned NI_W  = $clog2(N_NODES);

  logic             issuing;
  logic [TAG_W-1:0] grp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      busy    <= 1'b0;
      grp     <= '0;
    end else begin
      if (start && !busy) begin
        issuing <= 1'b1;
        busy    <= 1'b1;
        grp     <= '0;
      end else if (issuing) begin
        if (grp == TAG_W'(G - 1)) issuing <= 1'b0;
        else                      grp <= grp + 1'b1;
      end
      if (done) busy <= 1'b0;
    end
  end

  logic             res_valid [LANES];
  logic [TAG_W-1:0] res_tag   [LANES];
  fix_t             res       [LANES][D_OUT];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    int unsigned k;
    logic        lane_valid;
    fix_t        mlp_x [D_IN];
    logic        mlp_vo;
    logic [TAG_W-1:0] mlp_to;
    fix_t        mlp_y [D_OUT];

    always_comb begin
      k          = int'(grp) * LANES + l;
      lane_valid = issuing && (k < N_EDGES);
      for (int i = 0; i < D_IN; i++) mlp_x[i] = '0;
      if (k < N_EDGES) begin
        for (int d = 0; d < D_NODE; d++) begin
          if (int'(idx_r[k]) < N_NODES) mlp_x[d]          = x[NI_W'(idx_r[k])][d];
          if (int'(idx_s[k]) < N_NODES) mlp_x[D_NODE + d] = x[NI_W'(idx_s[k])][d];
        end
        for (int d = 0; d < D_EDGE; d++) mlp_x[2*D_NODE + d] = e[k][d];
      end
    end

    in_mlp #(.D_IN(D_IN), .H(H), .D_OUT(D_OUT), .TAG_W(TAG_W)) u_mlp (
      .clk      (clk),
      .rst_n    (rst_n),
      .params   (params),
      .in_valid (lane_valid),
      .in_tag   (grp),
      .x        (mlp_x),
      .out_valid(mlp_vo),
      .out_tag  (mlp_to),
      .y        (mlp_y)
    );

    if (SIGMOID) begin : g_sig
      // Output activation: every output passes through its own table read.
      logic             vo_q;
      logic [TAG_W-1:0] to_q;
      for (genvar o = 0; o < D_OUT; o++) begin : g_o
        in_sigmoid u_sig (.clk(clk), .x(mlp_y[o]), .y(res[l][o]));
      end
      always_ff @(posedge clk) begin
        if (!rst_n) vo_q <= 1'b0;
        else        vo_q <= mlp_vo;
        to_q <= mlp_to;
      end
      assign res_valid[l] = vo_q;
      assign res_tag[l]   = to_q;
    end else begin : g_lin
      assign res_valid[l] = mlp_vo;
      assign res_tag[l]   = mlp_to;
      assign res[l]       = mlp_y;
    end
  end

  // Result write-back: lane l of group g holds edge g*LANES + l.
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      int unsigned kk;
      kk = int'(res_tag[l]) * LANES + l;
      if (res_valid[l] && kk < N_EDGES)
        for (int o = 0; o < D_OUT; o++) out[kk][o] <= res[l][o];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= res_valid[0] && (res_tag[0] == TAG_W'(G - 1));
  end

endmodule
