// in_ref_pkg: bit-exact reference model of the interaction network, for the
// testbenches only.
//
// Written in plain integer arithmetic on dynamic arrays, apart from the RTL:
// every dense layer sums w*x at Q16.16, adds the bias shifted by 8, floors
// to Q8.8 and saturates to 16 bits; hidden layers apply ReLU. The sigmoid is
// evaluated with $exp on the 1/64 grid of the hardware table.
package in_ref_pkg;

  typedef int vec_t[];

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // One dense layer; w row-major n_out x n_in starting at offset ow, bias at ob.
  function automatic vec_t dense(const ref int p[], input int ow, input int ob,
                                 input vec_t xin, input int n_out, input bit relu);
    vec_t y = new[n_out];
    for (int o = 0; o < n_out; o++) begin
      longint s;
      s = longint'(p[ob + o]) * 256;
      for (int i = 0; i < xin.size(); i++) s += longint'(p[ow + o*xin.size() + i]) * longint'(xin[i]);
      y[o] = sat16(s >>> 8);
      if (relu && y[o] < 0) y[o] = 0;
    end
    return y;
  endfunction

  // Three-layer perceptron D_IN -> h -> h -> d_out, parameters in PyTorch order.
  function automatic vec_t mlp(const ref int p[], input vec_t xin, input int h, input int d_out);
    int d_in = xin.size();
    int o1 = 0, o2, o3;
    vec_t a, b;
    o2 = o1 + h*d_in + h;
    o3 = o2 + h*h + h;
    a = dense(p, o1, o1 + h*d_in, xin, h, 1'b1);
    b = dense(p, o2, o2 + h*h, a, h, 1'b1);
    return dense(p, o3, o3 + d_out*h, b, d_out, 1'b0);
  endfunction

  function automatic int sigmoid(int xi);
    real v, s;
    int g;
    g = xi >>> 2;
    if (g < -512) g = -512;
    if (g > 511) g = 511;
    v = real'(g) / 64.0;
    s = 1.0 / (1.0 + $exp(-v));
    return int'($floor(s * 256.0));
  endfunction

  function automatic int n_params(int d_in, int h, int d_out);
    return (d_in + h + d_out) * h + 2*h + d_out;
  endfunction

endpackage
