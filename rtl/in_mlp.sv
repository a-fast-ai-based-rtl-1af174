// in_mlp: three-layer perceptron D_IN -> H -> H -> D_OUT, the building block
// of the IN edge, node and output blocks.
//
// Layers 1 and 2 use ReLU, layer 3 is linear (the output block adds its
// sigmoid after this module). Each layer is fully parallel and followed by a
// register, so a new input vector is accepted every cycle and its result
// appears with out_valid exactly 3 cycles after in_valid. A tag travels
// with each vector so callers can tell which edge or node a result belongs to.
//
// params holds the layer parameters in PyTorch order: W1 (H x D_IN,
// row-major), b1, W2 (H x H), b2, W3 (D_OUT x H), b3; N_PARAMS =
// (D_IN + H + D_OUT) * H + 2H + D_OUT. The two hidden layers of equal width H
// follow the parameter count formula of the evaluated design; the register
// after each layer is this design's choice.
module in_mlp
  import in_pkg::*;
#(
  parameter int unsigned D_IN  = 6,
  parameter int unsigned H     = 6,
  parameter int unsigned D_OUT = 2,
  parameter int unsigned TAG_W = 8,
  localparam int unsigned N_PARAMS = (D_IN + H + D_OUT) * H + 2 * H + D_OUT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fix_t             params [N_PARAMS],
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  fix_t             x [D_IN],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fix_t             y [D_OUT]
);

  localparam int unsigned OW1 = 0;
  localparam int unsigned OB1 = OW1 + H * D_IN;
  localparam int unsigned OW2 = OB1 + H;
  localparam int unsigned OB2 = OW2 + H * H;
  localparam int unsigned OW3 = OB2 + H;
  localparam int unsigned OB3 = OW3 + D_OUT * H;

  fix_t w1 [H*D_IN];
  fix_t b1 [H];
  fix_t w2 [H*H];
  fix_t b2 [H];
  fix_t w3 [D_OUT*H];
  fix_t b3 [D_OUT];

  always_comb begin
    for (int i = 0; i < H*D_IN; i++)  w1[i] = params[OW1 + i];
    for (int i = 0; i < H; i++)       b1[i] = params[OB1 + i];
    for (int i = 0; i < H*H; i++)     w2[i] = params[OW2 + i];
    for (int i = 0; i < H; i++)       b2[i] = params[OB2 + i];
    for (int i = 0; i < D_OUT*H; i++) w3[i] = params[OW3 + i];
    for (int i = 0; i < D_OUT; i++)   b3[i] = params[OB3 + i];
  end

  fix_t h1_d [H];
  fix_t h2_d [H];
  fix_t y_d  [D_OUT];
  fix_t h1_q [H];
  fix_t h2_q [H];

  logic [2:0]       vld;
  logic [TAG_W-1:0] tag [3];

  in_dense #(.N_IN(D_IN), .N_OUT(H),     .RELU(1'b1)) u_l1 (.x(x),    .w(w1), .b(b1), .y(h1_d));
  in_dense #(.N_IN(H),    .N_OUT(H),     .RELU(1'b1)) u_l2 (.x(h1_q), .w(w2), .b(b2), .y(h2_d));
  in_dense #(.N_IN(H),    .N_OUT(D_OUT), .RELU(1'b0)) u_l3 (.x(h2_q), .w(w3), .b(b3), .y(y_d));

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end

  always_ff @(posedge clk) begin
    h1_q   <= h1_d;
    h2_q   <= h2_d;
    y      <= y_d;
    tag[0] <= in_tag;
    tag[1] <= tag[0];
    tag[2] <= tag[1];
  end

  assign out_valid = vld[2];
  assign out_tag   = tag[2];

endmodule
