// interaction_network: track-segment classifier for hit graphs of a forward
// tracking detector, built as an interaction network (IN) graph neural
// network. Each graph node is a detector hit (normalised x, z), each edge a
// candidate track segment between hits of adjacent layers (dx, dz). The
// network returns for every edge a weight in [0, 1]: the probability that
// the two hits belong to the same particle track.
//
// Forward pass, four phases:
//   R1  edge block    e~_k  = phi_R1(x_r, x_s, e_k)        (in_edge_block)
//   AGG aggregation   a_r   = sum of e~_k over edges into r (in_edge_aggregate)
//   O   node block    x~_r  = phi_O(x_r, a_r)              (in_node_block)
//   R2  output block  w_k   = sigmoid(phi_R2(x~_r, x~_s, e~_k))
// Each phi is a three-layer perceptron with H hidden neurons per hidden
// layer and ReLU; all arithmetic is 16-bit fixed point with 8 fraction bits.
//
// Graph-level pipelining: the phases form two stages. Stage A (R1, AGG)
// works on a copy of the input graph captured when start is accepted. When
// it has finished and stage B is free, the graph, the messages and the node
// sums are copied in one cycle into a parallel-in/parallel-out buffer that
// stage B (O, R2) reads, and stage A can take the next graph at once. Two
// graphs can thus be in flight, and the interval between graphs is set by
// stage A, not by the whole pass. All arrays are registers (fully
// partitioned), so every lane gathers its operands in one cycle.
//
// Sizes: graphs are padded (zero nodes, self loops on the last node) or cut
// to N_NODES = 49 nodes and N_EDGES = 98 edges, D_NODE = D_EDGE = 2,
// H = 6, which gives 275 weights and biases. Reuse factor RF = 16 sets the
// number of perceptron copies: ceil(98/16) = 7 for the edge blocks and
// ceil(49/16) = 4 for the node block; the aggregation splits the edge list
// in AGG_PF = 2 blocks. These, pipelining over graphs and the parallel
// graph input follow the chosen configuration of the evaluated design; the
// two-stage split, the stage controller, the weight port and all timing
// below are this design's own.
//
// Interface (all synchronous to clk, active-low synchronous reset rst_n):
//   in_node_feat, in_edge_feat,
//   in_edge_recv, in_edge_send     one whole graph, sampled when start is
//                                  accepted (start && ready)
//   start, ready                   ready: stage A is free to take a graph
//   wt_we/wt_block/wt_addr/wt_data write one weight or bias; block 0 = R1,
//                                  1 = O, 2 = R2; within a block the order is
//                                  W1, b1, W2, b2, W3, b3 (row-major); taken
//                                  only while no graph is in flight
//   busy                           a graph is in flight
//   done                           pulses once per graph, in start order
//   edge_weight[k]                 result of edge k, Q8.8, valid from done
//                                  until the next graph's R2 overwrites it
//                                  (at least GE + 3 cycles later)
// Edge indices of N_NODES or more read zero features and are not summed.
// Storage and weights are not reset; only the controllers are.
//
// Timing, with GE = ceil(N_EDGES/LANES_E), GN = ceil(N_NODES/LANES_N) and
// B = ceil(N_EDGES/AGG_PF), counted in clock edges after the edge that
// accepts start: R1 takes GE + 3, AGG B + 1, O GN + 3, R2 GE + 4, and each
// of the three hand-overs 2, so done is set by edge 2*GE + GN + B + 17
// (107 for the defaults, 535 ns at the 5 ns clock). Stage A is ready again
// GE + B + 7 edges after accepting start, so the next start can be taken
// GE + B + 8 edges after the previous one (71 for the defaults), provided
// stage B has finished the graph before by then, which holds whenever
// B + 15 >= GN + 17 (always for the defaults). Graphs can thus enter every
// 71 cycles while each takes 107 to finish.
module interaction_network
  import in_pkg::*;
#(
  parameter int unsigned N_NODES = 49,
  parameter int unsigned N_EDGES = 98,
  parameter int unsigned D_NODE  = 2,
  parameter int unsigned D_EDGE  = 2,
  parameter int unsigned H       = 6,
  parameter int unsigned RF      = 16,
  parameter int unsigned AGG_PF  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // graph input
  input  fix_t        in_node_feat [N_NODES][D_NODE],
  input  fix_t        in_edge_feat [N_EDGES][D_EDGE],
  input  idx_t        in_edge_recv [N_EDGES],
  input  idx_t        in_edge_send [N_EDGES],
  input  logic        start,
  output logic        ready,
  // weight load
  input  logic        wt_we,
  input  logic [1:0]  wt_block,
  input  logic [15:0] wt_addr,
  input  fix_t        wt_data,
  // status and result
  output logic        busy,
  output logic        done,
  output fix_t        edge_weight [N_EDGES]
);

  localparam int unsigned LANES_E = (N_EDGES + RF - 1) / RF;
  localparam int unsigned LANES_N = (N_NODES + RF - 1) / RF;
  localparam int unsigned NP_R1 = (2*D_NODE + D_EDGE + H + D_EDGE) * H + 2*H + D_EDGE;
  localparam int unsigned NP_O  = (D_NODE + D_EDGE + H + D_NODE) * H + 2*H + D_NODE;
  localparam int unsigned NP_R2 = (2*D_NODE + D_EDGE + H + 1) * H + 2*H + 1;
  localparam int unsigned R1_W  = $clog2(NP_R1);
  localparam int unsigned O_W   = $clog2(NP_O);
  localparam int unsigned R2_W  = $clog2(NP_R2);

  typedef enum logic [1:0] {
    A_IDLE = 2'd0,
    A_R1   = 2'd1,
    A_AGG  = 2'd2,
    A_HOLD = 2'd3   // results ready, waiting for stage B
  } stage_a_t;

  typedef enum logic [1:0] {
    B_IDLE = 2'd0,
    B_O    = 2'd1,
    B_R2   = 2'd2
  } stage_b_t;

  stage_a_t st_a;
  stage_b_t st_b;

  // ---------------------------------------------------------------- storage
  // Stage A copy of the input graph.
  fix_t x_a  [N_NODES][D_NODE];
  fix_t e_a  [N_EDGES][D_EDGE];
  idx_t ir_a [N_EDGES];
  idx_t is_a [N_EDGES];
  // Stage B buffer: graph, messages and node sums handed over from stage A.
  fix_t x_b  [N_NODES][D_NODE];
  fix_t m_b  [N_EDGES][D_EDGE];
  fix_t a_b  [N_NODES][D_EDGE];
  idx_t ir_b [N_EDGES];
  idx_t is_b [N_EDGES];
  // Parameters.
  fix_t p_r1 [NP_R1];
  fix_t p_o  [NP_O];
  fix_t p_r2 [NP_R2];

  logic accept;     // start taken into stage A
  logic handover;   // stage A results move into the stage B buffer
  logic ag_done;

  assign ready    = (st_a == A_IDLE);
  assign accept   = start && ready;
  assign busy     = (st_a != A_IDLE) || (st_b != B_IDLE);

  // Stage B is free, or frees up in this very cycle.
  logic b_free;
  logic r2_done;
  assign b_free   = (st_b == B_IDLE) || (st_b == B_R2 && r2_done);
  assign handover = b_free && ((st_a == A_HOLD) || (st_a == A_AGG && ag_done));

  always_ff @(posedge clk) begin
    if (accept) begin
      x_a  <= in_node_feat;
      e_a  <= in_edge_feat;
      ir_a <= in_edge_recv;
      is_a <= in_edge_send;
    end
  end

  always_ff @(posedge clk) begin
    if (wt_we && !busy) begin
      case (wt_block)
        2'd0: if (int'(wt_addr) < NP_R1) p_r1[R1_W'(wt_addr)] <= wt_data;
        2'd1: if (int'(wt_addr) < NP_O)  p_o[O_W'(wt_addr)]   <= wt_data;
        2'd2: if (int'(wt_addr) < NP_R2) p_r2[R2_W'(wt_addr)] <= wt_data;
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------------ blocks
  logic r1_start, r1_busy, r1_done;
  logic ag_start, ag_busy;
  logic nb_start, nb_busy, nb_done;
  logic r2_start, r2_busy;

  fix_t e_upd [N_EDGES][D_EDGE];   // messages from R1
  fix_t a     [N_NODES][D_EDGE];   // aggregated messages
  fix_t x_upd [N_NODES][D_NODE];   // updated node features
  fix_t w_out [N_EDGES][1];        // edge weights from R2

  always_ff @(posedge clk) begin
    if (handover) begin
      x_b  <= x_a;
      m_b  <= e_upd;
      a_b  <= a;
      ir_b <= ir_a;
      is_b <= is_a;
    end
  end

  in_edge_block #(
    .N_NODES(N_NODES), .N_EDGES(N_EDGES), .D_NODE(D_NODE), .D_EDGE(D_EDGE),
    .H(H), .D_OUT(D_EDGE), .LANES(LANES_E), .SIGMOID(1'b0)
  ) u_r1 (
    .clk, .rst_n, .start(r1_start), .params(p_r1), .x(x_a), .e(e_a),
    .idx_r(ir_a), .idx_s(is_a), .busy(r1_busy), .done(r1_done), .out(e_upd)
  );

  in_edge_aggregate #(
    .N_NODES(N_NODES), .N_EDGES(N_EDGES), .D(D_EDGE), .PF(AGG_PF)
  ) u_agg (
    .clk, .rst_n, .start(ag_start), .msg(e_upd), .idx_r(ir_a),
    .busy(ag_busy), .done(ag_done), .agg(a)
  );

  in_node_block #(
    .N_NODES(N_NODES), .D_NODE(D_NODE), .D_EDGE(D_EDGE), .H(H), .LANES(LANES_N)
  ) u_o (
    .clk, .rst_n, .start(nb_start), .params(p_o), .x(x_b), .agg(a_b),
    .busy(nb_busy), .done(nb_done), .xn(x_upd)
  );

  in_edge_block #(
    .N_NODES(N_NODES), .N_EDGES(N_EDGES), .D_NODE(D_NODE), .D_EDGE(D_EDGE),
    .H(H), .D_OUT(1), .LANES(LANES_E), .SIGMOID(1'b1)
  ) u_r2 (
    .clk, .rst_n, .start(r2_start), .params(p_r2), .x(x_upd), .e(m_b),
    .idx_r(ir_b), .idx_s(is_b), .busy(r2_busy), .done(r2_done), .out(w_out)
  );

  for (genvar k = 0; k < N_EDGES; k++) begin : g_out
    assign edge_weight[k] = w_out[k][0];
  end

  // ------------------------------------------------------------ controllers
  // R1 samples start on the same edge that captures the graph into x_a/e_a;
  // its first gather is in the following cycle. Every later phase starts
  // with a one-cycle pulse in the cycle after the previous one reports done.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_a     <= A_IDLE;
      ag_start <= 1'b0;
    end else begin
      ag_start <= 1'b0;
      unique case (st_a)
        A_IDLE: if (accept)  st_a <= A_R1;
        A_R1:   if (r1_done) begin st_a <= A_AGG; ag_start <= 1'b1; end
        A_AGG:  if (ag_done) st_a <= handover ? A_IDLE : A_HOLD;
        A_HOLD: if (handover) st_a <= A_IDLE;
        default: st_a <= A_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_b     <= B_IDLE;
      nb_start <= 1'b0;
      r2_start <= 1'b0;
    end else begin
      nb_start <= 1'b0;
      r2_start <= 1'b0;
      if (handover) begin
        st_b     <= B_O;
        nb_start <= 1'b1;
      end else begin
        unique case (st_b)
          B_IDLE: ;
          B_O:    if (nb_done) begin st_b <= B_R2; r2_start <= 1'b1; end
          B_R2:   if (r2_done) st_b <= B_IDLE;
          default: st_b <= B_IDLE;
        endcase
      end
    end
  end

  assign r1_start = accept;
  assign done     = r2_done;

  // Within a stage, at most one block works at a time.
  property p_stage_a_one;
    @(posedge clk) disable iff (!rst_n) !(r1_busy && ag_busy);
  endproperty
  property p_stage_b_one;
    @(posedge clk) disable iff (!rst_n) !(nb_busy && r2_busy);
  endproperty
  // A hand-over never overwrites a graph stage B is still working on.
  property p_handover_safe;
    @(posedge clk) disable iff (!rst_n) handover |-> !nb_busy && !(r2_busy && !r2_done);
  endproperty
  assert property (p_stage_a_one);
  assert property (p_stage_b_one);
  assert property (p_handover_safe);

endmodule
