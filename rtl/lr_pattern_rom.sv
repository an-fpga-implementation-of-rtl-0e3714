// lr_pattern_rom: the pre-generated line patterns of one layer of the
// Low-Resources HT.
//
// In the Low-Resources HT the radius of a layer is not measured per cluster:
// every cluster of the layer is drawn with the same pattern, chosen only by
// the phi sub-range the cluster falls in. For sub-range s and qA/pt row k the
// pattern holds the first and last phi0 column the line can cross, relative
// to the cluster's own column:
//   lo = floor( s/NSUB     + min over r of r*q_k     * C )
//   hi = ceil ((s+1)/NSUB  + max over r of r*q_(k+1) * C ) - 1   (at least lo)
// where q_k = -QAPT_MAX + k*2*QAPT_MAX/N_ROWS is the lower border of row k and
// C = N_COLS/PHI_REGION_W converts radians into columns. With "Fix r"
// (R_LO = R_HI) the layer's radius is a single value; with "Scan r" it ranges
// over R_LO..R_HI and the pattern covers every line in that band, which is
// wider. The table is computed at elaboration from these formulas.
// Fixed patterns per layer, drawn by phi range, and the Fix r / Scan r
// alternatives follow the document; the formulas above, the radii and the
// sub-range count are this design's choices.
//
// Interface: sub selects the pattern; lo_off/hi_off give every row's range.
// Timing: registered read, one cycle.
module lr_pattern_rom
  import ht_pkg::*;
#(
  parameter int N_ROWS = ht_pkg::N_QPT,
  parameter int N_COLS = ht_pkg::N_PHI0_LR,
  parameter int NSUB   = 4,
  parameter int R_LO   = 1000,              // mm
  parameter int R_HI   = 1000,              // mm
  localparam int SUB_W = (NSUB > 1) ? $clog2(NSUB) : 1
) (
  input  logic                                 clk,
  input  logic [SUB_W-1:0]                     sub,
  output off_t [N_ROWS-1:0]        lo_off,
  output off_t [N_ROWS-1:0]        hi_off
);

  typedef logic [NSUB-1:0][N_ROWS-1:0][1:0][7:0] table_t;

  function automatic int floor_int(real x);
    int t;
    t = $rtoi(x);
    if (real'(t) > x) t = t - 1;
    return t;
  endfunction

  function automatic int clamp8(int v);
    if (v > 127)  return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  function automatic table_t make_table();
    table_t t;
    real c, q0, q1, mn, mx;
    int  lo, hi;
    c = N_COLS / PHI_REGION_W;
    for (int s = 0; s < NSUB; s++)
      for (int k = 0; k < N_ROWS; k++) begin
        q0 = -QAPT_MAX + k       * 2.0 * QAPT_MAX / N_ROWS;
        q1 = -QAPT_MAX + (k + 1) * 2.0 * QAPT_MAX / N_ROWS;
        mn = real'(s) / NSUB + ((q0 >= 0.0) ? R_LO * q0 : R_HI * q0) * c;
        mx = real'(s + 1) / NSUB + ((q1 >= 0.0) ? R_HI * q1 : R_LO * q1) * c;
        lo = floor_int(mn);
        hi = -floor_int(-mx) - 1;            // ceil(mx) - 1
        if (hi < lo) hi = lo;
        t[s][k][0] = 8'(clamp8(lo));
        t[s][k][1] = 8'(clamp8(hi));
      end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk)
    for (int k = 0; k < N_ROWS; k++) begin
      lo_off[k] <= TABLE[sub][k][0];
      hi_off[k] <= TABLE[sub][k][1];
    end

endmodule
