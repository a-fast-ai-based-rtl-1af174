// in_pkg: types, sizes and fixed-point helpers shared by the interaction
// network (IN) edge classifier.
//
// Number format: every feature, weight, bias and activation is a signed
// 16-bit fixed-point word with 8 integer bits (sign included) and 8 fraction
// bits, i.e. ap_fixed<16,8> / Q8.8, as chosen for the evaluated design.
// Node indices of the edge list are unsigned 16-bit words (ap_uint<16>).
//
// Rounding and overflow are this design's choice: a dense-layer sum is
// accumulated at full precision, then truncated towards minus infinity to 8
// fraction bits and saturated to the 16-bit range.
//
// The network sizes (49 nodes, 98 edges, 2 + 2 features, 6 hidden neurons,
// reuse factor 16) are parameters of the modules, not of this package.
package in_pkg;

  localparam int unsigned FX_W    = 16;  // total word length W
  localparam int unsigned FX_FRAC = 8;   // fraction bits W - I
  localparam int unsigned IDX_W   = 16;  // edge-index word length

  typedef logic signed [FX_W-1:0] fix_t;
  typedef logic [IDX_W-1:0]       idx_t;

  // Product of two Q8.8 words is Q16.16 in 32 bits; a sum of up to 64 of
  // them fits in 40 bits.
  localparam int unsigned ACC_W = 40;
  typedef logic signed [ACC_W-1:0] acc_t;


  // Number of weights plus biases of a three-layer perceptron
  // D_IN -> H -> H -> D_OUT.
  function automatic int unsigned mlp_n_params(int unsigned d_in, int unsigned h,
                                               int unsigned d_out);
    return (d_in + h + d_out) * h + 2 * h + d_out;
  endfunction

  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Saturate a wide value that already has FX_FRAC fraction bits.
  function automatic fix_t fx_sat(acc_t v);
    acc_t maxv = acc_t'(2 ** (FX_W - 1) - 1);
    acc_t minv = -acc_t'(2 ** (FX_W - 1));
    if (v > maxv) return fix_t'(maxv);
    if (v < minv) return fix_t'(minv);
    return fix_t'(v);
  endfunction

  // Convert a Q16.16 accumulator to Q8.8: floor to 8 fraction bits, saturate.
  function automatic fix_t fx_from_acc(acc_t a);
    return fx_sat(a >>> FX_FRAC);
  endfunction

endpackage
