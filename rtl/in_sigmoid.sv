// in_sigmoid: sigmoid activation of the output block, read from a
// precomputed table.
//
// The table covers logits in [-8, 8) with TABLE_SIZE entries; entry i holds
// sigmoid(16*i/TABLE_SIZE - 8) in Q8.8, truncated. The input logit (Q8.8)
// selects entry floor(x * TABLE_SIZE/16) + TABLE_SIZE/2, clamped to the
// table, so logits below -8 read entry 0 (value 0) and logits at or above 8
// read the last entry (value 1.0). Storing the exponential function in a
// table, to be held in block RAM, follows the evaluated design; the range,
// the table size and the index rule are this design's choice, modelled on
// the usual hls4ml table. The table is computed at elaboration by a
// constant function. The read is registered: y follows x after one cycle.
module in_sigmoid
  import in_pkg::*;
#(
  parameter int unsigned TABLE_SIZE = 1024  // power of two, 16..32768
) (
  input  logic clk,
  input  fix_t x,
  output fix_t y
);

  localparam int unsigned AW = $clog2(TABLE_SIZE);

  function automatic fix_t sig_entry(int unsigned i);
    real v, s;
    v = 16.0 * real'(i) / real'(TABLE_SIZE) - 8.0;
    s = 1.0 / (1.0 + $exp(-v));
    return fix_t'(int'($floor(s * real'(2 ** FX_FRAC))));
  endfunction

  typedef fix_t table_t [TABLE_SIZE];

  function automatic table_t make_table();
    table_t t;
    for (int unsigned i = 0; i < TABLE_SIZE; i++) t[i] = sig_entry(i);
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  // index = floor(x_real * TABLE_SIZE / 16) + TABLE_SIZE / 2, where
  // x_real = x / 2^FX_FRAC.
  localparam int SHIFT = int'(FX_FRAC) + 4 - AW;  // 2 for the defaults

  logic signed [FX_W+AW:0] idx_full;
  logic [AW-1:0]           idx;

  always_comb begin
    if (SHIFT >= 0) idx_full = (FX_W+AW+1)'(x) >>> SHIFT;
    else            idx_full = (FX_W+AW+1)'(x) <<< (-SHIFT);
    idx_full = idx_full + (FX_W+AW+1)'(TABLE_SIZE / 2);
    if (idx_full < 0)                         idx = '0;
    else if (idx_full > (FX_W+AW+1)'(TABLE_SIZE - 1)) idx = '1;
    else                                      idx = idx_full[AW-1:0];
  end

  always_ff @(posedge clk) y <= TABLE[idx];

endmodule
