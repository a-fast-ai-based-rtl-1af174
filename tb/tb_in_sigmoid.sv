// tb_in_sigmoid: self-checking test of the sigmoid table.
//
// Applies every 4th 16-bit logit plus the extreme values, one per cycle, and
// compares the registered output one cycle later with floor(256 * sigma(v)),
// where v is the logit rounded down to the table grid of 1/64 and clamped to
// [-8, 8 - 1/64]. Also checks that the output never decreases as the logit
// grows and that both clamped ends (0 and 255/256) of the table are reached.
module tb_in_sigmoid;
  import in_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fix_t x = '0, y;
  in_sigmoid dut (.clk(clk), .x(x), .y(y));

  int checks = 0, failures = 0, low_end = 0, high_end = 0;

  function automatic int ref_sig(int xi);
    real v, s;
    int g;
    g = (xi >>> 2);                  // grid steps of 1/64
    if (g < -512) g = -512;
    if (g > 511) g = 511;
    v = real'(g) / 64.0;
    s = 1.0 / (1.0 + $exp(-v));
    return int'($floor(s * 256.0));
  endfunction

  initial begin
    int prev_x, prev_y;
    prev_y = -1;
    prev_x = 0;
    for (int xi = -32768; xi <= 32767 + 4; xi += 4) begin
      int xv;
      xv = (xi > 32767) ? 32767 : xi;
      x <= fix_t'(xv);
      @(posedge clk);  // table read
      @(negedge clk);
      checks++;
      if (int'(y) != ref_sig(xv)) begin
        failures++;
        if (failures < 10) $display("x=%0d got %0d exp %0d", xv, y, ref_sig(xv));
      end
      checks++;
      if (int'(y) < prev_y) begin failures++; $display("not monotonic at %0d", xv); end
      prev_y = int'(y);
      prev_x = xv;
      if (xv < -2048 && y == 0) low_end++;
      if (xv >= 2048 && y == 16'sd255) high_end++;
      if (xv == 32767) break;
    end
    checks++;
    if (low_end == 0 || high_end == 0) begin failures++; $display("table ends not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
