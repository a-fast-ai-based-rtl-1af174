// tb_in_mlp: self-checking test of the three-layer perceptron.
//
// Loads random weights, streams random input vectors back to back (one per
// cycle, with gaps), and compares every output with a reference computed
// here in 64-bit integer arithmetic: floor-shift by 8 and saturation to
// 16 bits after each layer, ReLU on the two hidden layers. Also checks that
// each result leaves exactly 3 cycles after it entered and that the tag
// travels with it. Part of the weights is made large to drive saturation.
module tb_in_mlp;
  import in_pkg::*;

  localparam int unsigned D_IN = 6, H = 6, D_OUT = 2;
  localparam int unsigned NP = (D_IN + H + D_OUT) * H + 2 * H + D_OUT;
  localparam int unsigned NVEC = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fix_t       params [NP];
  logic       in_valid = 1'b0;
  logic [7:0] in_tag = '0;
  fix_t       x [D_IN];
  logic       out_valid;
  logic [7:0] out_tag;
  fix_t       y [D_OUT];

  in_mlp #(.D_IN(D_IN), .H(H), .D_OUT(D_OUT), .TAG_W(8)) dut (.*);

  int checks = 0, failures = 0, sat_seen = 0;
  longint exp_y [NVEC][D_OUT];
  int     sent_cyc [NVEC];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // Floor division by 256 of a possibly negative value.
  function automatic longint fl8(longint v);
    return v >>> 8;
  endfunction

  task automatic ref_mlp(input fix_t xin [D_IN], output longint yo [D_OUT]);
    longint h1 [H], h2 [H], s;
    int p;
    for (int o = 0; o < H; o++) begin
      s = longint'(params[H*D_IN + o]) * 256;
      for (int i = 0; i < D_IN; i++) s += longint'(params[o*D_IN + i]) * longint'(xin[i]);
      h1[o] = sat16(fl8(s));
      if (h1[o] < 0) h1[o] = 0;
    end
    p = H*D_IN + H;
    for (int o = 0; o < H; o++) begin
      s = longint'(params[p + H*H + o]) * 256;
      for (int i = 0; i < H; i++) s += longint'(params[p + o*H + i]) * h1[i];
      h2[o] = sat16(fl8(s));
      if (h2[o] < 0) h2[o] = 0;
    end
    p = p + H*H + H;
    for (int o = 0; o < D_OUT; o++) begin
      s = longint'(params[p + D_OUT*H + o]) * 256;
      for (int i = 0; i < H; i++) s += longint'(params[p + o*H + i]) * h2[i];
      yo[o] = sat16(fl8(s));
      if (yo[o] == 32767 || yo[o] == -32768) sat_seen++;
    end
  endtask

  function automatic fix_t rnd(int range);
    return fix_t'($signed($urandom_range(2*range, 0)) - range);
  endfunction

  // Output checker
  int rx = 0;
  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (out_tag != 8'(rx)) begin failures++; $display("tag mismatch %0d vs %0d", out_tag, rx); end
      if (cyc - sent_cyc[rx] != 3) begin failures++; $display("latency %0d", cyc - sent_cyc[rx]); end
      for (int o = 0; o < D_OUT; o++) begin
        checks++;
        if (longint'(y[o]) != exp_y[rx][o]) begin
          failures++;
          $display("vec %0d out %0d: got %0d exp %0d", rx, o, y[o], exp_y[rx][o]);
        end
      end
      rx++;
    end
  end

  initial begin
    for (int i = 0; i < NP; i++) params[i] = rnd(300);  // +-1.17
    for (int i = 0; i < D_IN; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int v = 0; v < NVEC; v++) begin
      fix_t xv [D_IN];
      longint yo [D_OUT];
      int range;
      range = (v % 4 == 3) ? 32000 : 1200;  // every 4th vector is large
      for (int i = 0; i < D_IN; i++) xv[i] = rnd(range);
      ref_mlp(xv, yo);
      exp_y[v] = yo;
      while ($urandom_range(3, 0) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_tag   <= 8'(v);
      for (int i = 0; i < D_IN; i++) x[i] <= xv[i];
      sent_cyc[v] = cyc + 1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (rx != NVEC) begin failures++; $display("received %0d of %0d", rx, NVEC); end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
