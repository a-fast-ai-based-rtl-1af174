// in_node_block: object (node) block of the interaction network. For every
// node r it forms [x_r, agg_r] (the node's own features followed by the sum
// of its incoming messages) and runs it through a three-layer perceptron
// D_NODE + D_EDGE -> H -> H -> D_NODE, giving the updated node features.
//
// Reuse: LANES perceptron copies work side by side; after start, group g
// (nodes g*LANES .. g*LANES+LANES-1) is issued in the g-th cycle, so the
// G = ceil(N_NODES/LANES) groups take G cycles. With LANES =
// ceil(N_NODES/RF) this matches reuse factor RF.
//
// Timing: start is sampled on a clock edge while idle (ignored while busy);
// done is set by the clock edge G + 3 edges after that one, stays high one
// cycle, and xn[] then holds every result. Inputs must be stable while
// busy. The lane structure and the handshake are this design's own.
module in_node_block
  import in_pkg::*;
#(
  parameter int unsigned N_NODES = 49,
  parameter int unsigned D_NODE  = 2,
  parameter int unsigned D_EDGE  = 2,
  parameter int unsigned H       = 6,
  parameter int unsigned LANES   = 4,
  localparam int unsigned D_IN     = D_NODE + D_EDGE,
  localparam int unsigned N_PARAMS = (D_IN + H + D_NODE) * H + 2 * H + D_NODE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t params [N_PARAMS],
  input  fix_t x      [N_NODES][D_NODE],
  input  fix_t agg    [N_NODES][D_EDGE],
  output logic busy,
  output logic done,
  output fix_t xn     [N_NODES][D_NODE]
);

  localparam int unsigned G     = (N_NODES + LANES - 1) / LANES;
  localparam int unsigned TAG_W = $clog2(G + 1);

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
  fix_t             res       [LANES][D_NODE];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    int unsigned n;
    logic        lane_valid;
    fix_t        mlp_x [D_IN];

    always_comb begin
      n          = int'(grp) * LANES + l;
      lane_valid = issuing && (n < N_NODES);
      for (int i = 0; i < D_IN; i++) mlp_x[i] = '0;
      if (n < N_NODES) begin
        for (int d = 0; d < D_NODE; d++) mlp_x[d]          = x[n][d];
        for (int d = 0; d < D_EDGE; d++) mlp_x[D_NODE + d] = agg[n][d];
      end
    end

    in_mlp #(.D_IN(D_IN), .H(H), .D_OUT(D_NODE), .TAG_W(TAG_W)) u_mlp (
      .clk      (clk),
      .rst_n    (rst_n),
      .params   (params),
      .in_valid (lane_valid),
      .in_tag   (grp),
      .x        (mlp_x),
      .out_valid(res_valid[l]),
      .out_tag  (res_tag[l]),
      .y        (res[l])
    );
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      int unsigned nn;
      nn = int'(res_tag[l]) * LANES + l;
      if (res_valid[l] && nn < N_NODES)
        for (int d = 0; d < D_NODE; d++) xn[nn][d] <= res[l][d];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= res_valid[0] && (res_tag[0] == TAG_W'(G - 1));
  end

endmodule
