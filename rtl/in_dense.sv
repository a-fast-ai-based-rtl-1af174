// in_dense: one fully connected layer, y = act(W x + b), combinational.
//
// Every output neuron multiplies all N_IN inputs by its row of W in
// parallel (one multiplier per weight, the fully unrolled form), adds the
// products and the bias at full Q16.16 precision, then truncates to Q8.8
// and saturates. With RELU set, negative results are clamped to zero.
// W is row-major, W[o][i] = w[o*N_IN + i], as stored by PyTorch.
// Callers register the output; this module holds no state.
module in_dense
  import in_pkg::*;
#(
  parameter int unsigned N_IN  = 6,
  parameter int unsigned N_OUT = 6,
  parameter bit          RELU  = 1'b1
) (
  input  fix_t x [N_IN],
  input  fix_t w [N_OUT*N_IN],
  input  fix_t b [N_OUT],
  output fix_t y [N_OUT]
);

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      acc_t acc;
      fix_t v;
      acc = acc_t'(b[o]) <<< FX_FRAC;
      for (int i = 0; i < N_IN; i++)
        acc += acc_t'(w[o*N_IN + i]) * acc_t'(x[i]);
      v = fx_from_acc(acc);
      y[o] = (RELU && v < 0) ? '0 : v;
    end
  end

endmodule
