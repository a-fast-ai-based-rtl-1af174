// in_edge_aggregate: edge aggregation of the interaction network. Sums the
// messages (updated edge features) of all edges into their receiver node,
// agg[r] = sum of msg[k] over all k with idx_r[k] = r.
//
// The sum is permutation invariant, so the edge list can be split. The
// edges are cut into PF consecutive blocks of B = ceil(N_EDGES/PF) edges
// (block partitioning by a factor PF, 2 in the chosen design); each block
// has its own engine and its own partial-sum array over all nodes, so the
// PF engines never compete for a node. Engine p adds edge p*B + j in the
// j-th cycle after start. A final cycle adds the PF partial sums of each
// node and saturates them to the 16-bit Q8.8 format; the partial sums are
// kept wide so that no intermediate result overflows. Edges whose receiver
// index is N_NODES or more are skipped.
//
// Timing: start is sampled on a clock edge while idle; done is set by the
// edge B + 1 edges later, stays high one cycle, and agg[] then holds the
// sums until the next run completes. Inputs must be stable while busy.
// Summation as the aggregation and the block partitioning factor follow the
// chosen design; the per-engine partial arrays, the wide partial sums and
// the saturation are this design's choice.
module in_edge_aggregate
  import in_pkg::*;
#(
  parameter int unsigned N_NODES = 49,
  parameter int unsigned N_EDGES = 98,
  parameter int unsigned D       = 2,
  parameter int unsigned PF      = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t msg   [N_EDGES][D],
  input  idx_t idx_r [N_EDGES],
  output logic busy,
  output logic done,
  output fix_t agg   [N_NODES][D]
);

  localparam int unsigned B     = (N_EDGES + PF - 1) / PF;
  localparam int unsigned CNT_W = $clog2(B + 1);
  localparam int unsigned NI_W  = $clog2(N_NODES);
  localparam int unsigned PS_W  = FX_W + $clog2(N_EDGES + 1) + 1;

  typedef logic signed [PS_W-1:0] psum_t;

  psum_t            part [PF][N_NODES][D];
  logic             running;
  logic [CNT_W-1:0] step;
  logic             finish;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      busy    <= 1'b0;
      finish  <= 1'b0;
      step    <= '0;
    end else begin
      finish <= 1'b0;
      if (start && !busy) begin
        running <= 1'b1;
        busy    <= 1'b1;
        step    <= '0;
      end else if (running) begin
        if (step == CNT_W'(B - 1)) begin
          running <= 1'b0;
          finish  <= 1'b1;
        end
        step <= step + 1'b1;
      end
      if (done) busy <= 1'b0;
    end
  end

  // Partial sums: cleared by start, then one edge per engine per cycle.
  always_ff @(posedge clk) begin
    if (start && !busy) begin
      for (int p = 0; p < PF; p++)
        for (int n = 0; n < N_NODES; n++)
          for (int d = 0; d < D; d++) part[p][n][d] <= '0;
    end else if (running) begin
      for (int p = 0; p < PF; p++) begin
        int unsigned k;
        k = p * B + int'(step);
        if (k < N_EDGES && int'(idx_r[k]) < N_NODES)
          for (int d = 0; d < D; d++)
            part[p][NI_W'(idx_r[k])][d] <= part[p][NI_W'(idx_r[k])][d] + psum_t'(msg[k][d]);
      end
    end
  end

  // Final reduction of the PF partial sums.
  always_ff @(posedge clk) begin
    if (finish) begin
      for (int n = 0; n < N_NODES; n++)
        for (int d = 0; d < D; d++) begin
          acc_t s;
          s = '0;
          for (int p = 0; p < PF; p++) s += acc_t'(part[p][n][d]);
          agg[n][d] <= fx_sat(s);
        end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= finish;
  end

endmodule
