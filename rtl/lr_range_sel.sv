// lr_range_sel: first step of the Low-Resources HT. Splits a cluster's phi
// into the accumulator column it falls in and the sub-range of that column,
// by comparing the position inside the column with a set of predefined
// boundaries.
//
// The sub-range index chooses which pre-generated line pattern is drawn;
// the column index shifts that pattern across the accumulator. Comparing phi
// with predefined ranges follows the document; the NSUB equal sub-ranges per
// column are this design's choice (the boundaries are a parameter table, so
// unequal ranges need no other change).
//
// Interface and timing: purely combinational. phi is in ht_pkg units
// (columns * 2**PHI_FRAC from the region's lower edge); col is the signed
// column (floor), sub the sub-range 0..NSUB-1.
module lr_range_sel
  import ht_pkg::*;
#(
  parameter int NSUB   = 4,
  localparam int SUB_W = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int COL_W = PHI_W - PHI_FRAC
) (
  input  phi_t                     phi,
  output logic signed [COL_W-1:0]  col,
  output logic [SUB_W-1:0]         sub
);

  // Lower boundary of sub-range s inside a column, in 2**-PHI_FRAC columns.
  function automatic int bound(int s);
    return (s * (2 ** PHI_FRAC)) / NSUB;
  endfunction

  logic [PHI_FRAC-1:0] frac;
  assign col  = phi[PHI_W-1:PHI_FRAC];
  assign frac = phi[PHI_FRAC-1:0];

  always_comb begin
    sub = '0;
    for (int s = 1; s < NSUB; s++)
      if (int'(frac) >= bound(s)) sub = SUB_W'(s);
  end

endmodule
