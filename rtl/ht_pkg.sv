// ht_pkg: constants and fixed-point scales shared by the two Hough Transform
// (HT) track finders.
//
// Both finders work on one detector region, 0.3..0.5 rad in azimuth phi, and
// fill an accumulator of qA/pt rows by phi0 columns using
//     phi0 = phi + r * qA/pt .
// The region, the 216 qA/pt rows, the 32 (Flexible) or 64 (Low-Resources)
// phi0 columns, the 8 layers and the 160 stored clusters per layer follow
// the document. The qA/pt range of +-3e-4 /mm corresponds to A = 0.0003 GeV/mm
// and pt >= 1 GeV. All number formats below are this design's own choice.
//
// Fixed point:
//   * phi enters as a signed PHI_W-bit number measured from the lower edge of
//     the region, in units of one phi0 column divided by 2**PHI_FRAC.
//   * r enters as an unsigned R_W-bit radius in mm.
//   * Inside the line arithmetic a phi0 value carries EDGE_FRAC fraction bits
//     of a column, and the slope constants are scaled to match.
package ht_pkg;

  // ---- region and accumulator geometry --------------------------------------
  localparam real PHI_REGION_W = 0.2;      // rad, 0.3 .. 0.5
  localparam real QAPT_MAX     = 3.0e-4;   // /mm, |qA/pt| at pt = 1 GeV

  localparam int N_QPT       = 216;        // qA/pt rows (both versions)
  localparam int N_PHI0_FLEX = 32;         // phi0 columns, Flexible HT
  localparam int N_PHI0_LR   = 64;         // phi0 columns, Low-Resources HT
  localparam int N_LAYERS    = 8;          // Flexible HT layers
  localparam int N_CLUST     = 160;        // clusters stored per layer
  localparam int LR_LAYERS   = 5;          // Low-Resources HT layers

  // ---- number formats ------------------------------------------------------
  localparam int PHI_W     = 16;
  localparam int PHI_FRAC  = 8;
  localparam int R_W       = 11;
  localparam int EDGE_FRAC = 24;           // fraction bits of a column
  localparam int EDGE_W    = 44;           // signed width of edge values

  typedef logic signed [PHI_W-1:0] phi_t;
  typedef logic        [R_W-1:0]   r_t;
  typedef logic signed [EDGE_W-1:0] edge_t;
  typedef logic signed [7:0]        off_t;    // pattern column offset

  // One cluster: radius and azimuth.
  typedef struct packed {
    r_t   r;
    phi_t phi;
  } cluster_t;

  // Slope of the line per qA/pt row for r = 1 mm, in columns * 2**EDGE_FRAC:
  // (row width in qA/pt) * (columns per rad).
  function automatic longint slope_per_row(int n_qpt, int n_phi0);
    real v;
    v = (2.0 * QAPT_MAX / n_qpt) * (n_phi0 / PHI_REGION_W) * (2.0 ** EDGE_FRAC);
    return longint'(v);
  endfunction

  // Value of r*qA/pt at the lower edge of row 0 (qA/pt = -QAPT_MAX), per mm,
  // in the same units. Defined as -(n_qpt/2) row slopes so that the rows sit
  // symmetrically around qA/pt = 0.
  function automatic longint offset_row0(int n_qpt, int n_phi0);
    return -(longint'(n_qpt) / 64'sd2) * slope_per_row(n_qpt, n_phi0);
  endfunction

  // Column index (floor) of an edge value.
  function automatic int edge_col(edge_t e);
    edge_t s;
    s = e >>> EDGE_FRAC;
    return int'(s);
  endfunction

  // Columns lo..hi (inclusive) of a row, clipped to the accumulator width,
  // as a bit mask (bit b = column b). Callers take the low N_PHI0 bits.
  localparam int MAX_PHI0 = 64;
  function automatic logic [MAX_PHI0-1:0] range_mask(int lo, int hi, int n_phi0);
    int lo_c, hi_c;
    lo_c = (lo < 0) ? 0 : lo;
    hi_c = (hi > n_phi0 - 1) ? n_phi0 - 1 : hi;
    if (lo_c > hi_c) return '0;
    return ({MAX_PHI0{1'b1}} << lo_c) & ({MAX_PHI0{1'b1}} >> (MAX_PHI0 - 1 - hi_c));
  endfunction

  // Columns crossed by the line inside one row, given the line's values at
  // the row's lower edge e_lo and upper edge e_hi (e_hi >= e_lo). The upper
  // edge is treated as open, so a line that ends exactly on a column border
  // does not mark the next column.
  function automatic logic [MAX_PHI0-1:0] row_mask(edge_t e_lo, edge_t e_hi, int n_phi0);
    int lo, hi;
    lo = edge_col(e_lo);
    hi = edge_col(e_hi - edge_t'(1));
    if (hi < lo) hi = lo;
    return range_mask(lo, hi, n_phi0);
  endfunction

endpackage
