// line_drawer: turns one cluster (r, phi) into the line it draws in the
// Flexible HT accumulator, as one column mask per qA/pt row.
//
// The line is phi0 = phi + r * qA/pt. It is evaluated at the N_QPT+1 row
// borders; row k marks every column between its two border values. To use
// few multipliers the line is built the way the document describes: the
// formula is evaluated with multipliers only for one short segment of SEG
// rows (the "truncated line"), and that segment is then copied up the
// accumulator, each copy shifted by the segment step r*SEG*dq, which is a
// chain of additions. Because everything is exact integer arithmetic the
// copies give the same values as evaluating the formula on every row.
// Segment copying follows the document; the segment length, the evaluation
// at row borders and the number formats are this design's choices.
//
// Interface: in_valid/in_cluster are taken every cycle (no back-pressure).
// Timing: out_valid/out_mask follow two cycles after in_valid (one stage of
// multipliers, one stage of segment copies and mask building).
module line_drawer
  import ht_pkg::*;
#(
  parameter int N_ROWS = ht_pkg::N_QPT,
  parameter int N_COLS = ht_pkg::N_PHI0_FLEX,
  parameter int SEG    = 8                    // rows per truncated segment
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  cluster_t                in_cluster,
  output logic                    out_valid,
  output logic [N_ROWS-1:0][N_COLS-1:0] out_mask
);

  localparam int     NSEG  = N_ROWS / SEG;
  localparam longint SLOPE = slope_per_row(N_ROWS, N_COLS);
  localparam longint OFF0  = offset_row0(N_ROWS, N_COLS);

  initial assert (NSEG * SEG == N_ROWS) else $error("N_ROWS must be a multiple of SEG");

  // ---- stage 1: multipliers for the truncated segment -----------------------
  edge_t             base_q;              // line value at border 0
  edge_t [SEG:0]     d_q;                 // r * i * SLOPE, i = 0..SEG
  logic              v1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q   <= 1'b0;
      base_q <= '0;
      d_q    <= '0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        base_q <= (edge_t'(in_cluster.phi) <<< (EDGE_FRAC - PHI_FRAC))
                  + edge_t'($signed({1'b0, in_cluster.r})) * edge_t'(OFF0);
        for (int i = 0; i <= SEG; i++)
          d_q[i] <= edge_t'($signed({1'b0, in_cluster.r})) * edge_t'(longint'(i) * SLOPE);
      end
    end
  end

  // ---- stage 2: copy the segment over the accumulator -------------------------
  edge_t [NSEG:0]   seg_base;             // line value at border j*SEG
  edge_t [N_ROWS:0] border;               // line value at every row border
  logic [N_ROWS-1:0][N_COLS-1:0] mask_d;

  // Each copy is the previous one shifted by the segment step.
  assign seg_base[0] = base_q;
  for (genvar j = 1; j <= NSEG; j++) begin : g_copy
    assign seg_base[j] = seg_base[j-1] + d_q[SEG];
  end

  for (genvar j = 0; j < NSEG; j++) begin : g_seg
    for (genvar i = 0; i < SEG; i++) begin : g_row
      assign border[j*SEG + i] = seg_base[j] + d_q[i];
    end
  end
  assign border[N_ROWS] = seg_base[NSEG];

  for (genvar k = 0; k < N_ROWS; k++) begin : g_mask
    assign mask_d[k] = N_COLS'(row_mask(border[k], border[k+1], N_COLS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mask  <= '0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) out_mask <= mask_d;
    end
  end

endmodule
