// cluster_recovery: finds, for one track candidate at a time, the stored
// clusters whose Hough Transform line passes through the candidate's bin.
//
// For a candidate (row k, column c) the qA/pt value at the row's lower border
// is formed once. Then all stored clusters of the event are walked through,
// index by index, all layers in parallel: for each cluster the HT formula
// phi0 = phi + r*qA/pt is applied again at the row's two borders, and the
// cluster belongs to the candidate if column c lies in the resulting range.
// The arithmetic is the same integer arithmetic as line_drawer, so a cluster
// is recovered exactly when its drawn line marked the bin. Recovering the
// clusters by reapplying the formula over all clusters of the event, one
// candidate at a time, follows the document; the parallel walk over the
// layers and the output format are this design's choices.
//
// Interface: cand_valid/cand_ready accepts a candidate (only when idle);
// layer_count gives how many clusters each layer holds; mem_addr/mem_data
// read all layers' stores (data one cycle after the address). The output
// carries, per cluster index, one lane per layer: hit flag and cluster, plus
// the candidate and out_last on the final index. out_valid/out_ready is a
// valid/ready handshake; at least one output (possibly without hits) is
// produced per candidate.
// Timing: one index per cycle while out_ready is high; a candidate takes
// max(max(layer_count),1) + 2 cycles.
module cluster_recovery
  import ht_pkg::*;
#(
  parameter int N_LAYERS = ht_pkg::N_LAYERS,
  parameter int N_ROWS   = ht_pkg::N_QPT,
  parameter int N_COLS   = ht_pkg::N_PHI0_FLEX,
  parameter int DEPTH    = ht_pkg::N_CLUST,
  localparam int ROW_W   = $clog2(N_ROWS),
  localparam int COL_W   = $clog2(N_COLS),
  localparam int AW      = $clog2(DEPTH),
  localparam int CW      = $clog2(DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cand_valid,
  output logic                          cand_ready,
  input  logic [ROW_W-1:0]              cand_row,
  input  logic [COL_W-1:0]              cand_col,
  input  logic [N_LAYERS-1:0][CW-1:0]   layer_count,
  output logic [AW-1:0]                 mem_addr,
  input  cluster_t [N_LAYERS-1:0]       mem_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [ROW_W-1:0]              out_row,
  output logic [COL_W-1:0]              out_col,
  output logic [AW-1:0]                 out_index,
  output logic [N_LAYERS-1:0]           out_hit,
  output cluster_t [N_LAYERS-1:0]       out_cluster,
  output logic                          out_last,
  output logic                          busy
);

  localparam longint SLOPE = slope_per_row(N_ROWS, N_COLS);
  localparam longint OFF0  = offset_row0(N_ROWS, N_COLS);

  logic             run_q;
  logic [ROW_W-1:0] row_q;
  logic [COL_W-1:0] col_q;
  edge_t            qk_q;          // r-independent part: OFF0 + k*SLOPE
  logic [CW-1:0]    nsteps_q;      // indices to walk
  logic [CW-1:0]    issue_q;       // next index to read
  logic             v1_q;          // mem_data holds index idx1_q
  logic [AW-1:0]    idx1_q;

  // largest layer count of the event, at least one step
  logic [CW-1:0] nmax;
  always_comb begin
    nmax = CW'(1);
    for (int l = 0; l < N_LAYERS; l++)
      if (layer_count[l] > nmax) nmax = layer_count[l];
  end

  logic en, issuing;
  assign en      = !out_valid || out_ready;
  assign issuing = run_q && (issue_q < nsteps_q);
  // While stalled, re-read the entry in flight so mem_data stays valid.
  assign mem_addr   = en ? AW'(issue_q) : idx1_q;
  assign cand_ready = !run_q;
  assign busy       = run_q || out_valid;

  // ---- HT formula again, for the clusters in flight ---------------------------------
  logic [N_LAYERS-1:0] hit_d;
  always_comb begin
    for (int l = 0; l < N_LAYERS; l++) begin
      edge_t r_s, e_lo, e_hi;
      logic [MAX_PHI0-1:0] m;
      r_s  = edge_t'($signed({1'b0, mem_data[l].r}));
      e_lo = (edge_t'(mem_data[l].phi) <<< (EDGE_FRAC - PHI_FRAC)) + r_s * qk_q;
      e_hi = e_lo + r_s * edge_t'(SLOPE);
      m    = row_mask(e_lo, e_hi, N_COLS);
      hit_d[l] = (CW'(idx1_q) < layer_count[l]) && m[col_q];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q       <= 1'b0;
      row_q       <= '0;
      col_q       <= '0;
      qk_q        <= '0;
      nsteps_q    <= '0;
      issue_q     <= '0;
      v1_q        <= 1'b0;
      idx1_q      <= '0;
      out_valid   <= 1'b0;
      out_row     <= '0;
      out_col     <= '0;
      out_index   <= '0;
      out_hit     <= '0;
      out_cluster <= '0;
      out_last    <= 1'b0;
    end else if (!run_q) begin
      if (out_ready) out_valid <= 1'b0;
      if (cand_valid) begin
        run_q    <= 1'b1;
        row_q    <= cand_row;
        col_q    <= cand_col;
        qk_q     <= edge_t'(OFF0) + edge_t'(cand_row) * edge_t'(SLOPE);
        nsteps_q <= nmax;
        issue_q  <= '0;
        v1_q     <= 1'b0;
      end
    end else if (en) begin
      v1_q <= issuing;
      if (issuing) begin
        idx1_q  <= AW'(issue_q);
        issue_q <= issue_q + CW'(1);
      end
      out_valid <= v1_q;
      if (v1_q) begin
        out_row     <= row_q;
        out_col     <= col_q;
        out_index   <= idx1_q;
        out_hit     <= hit_d;
        out_cluster <= mem_data;
        out_last    <= (CW'(idx1_q) == nsteps_q - CW'(1));
        if (CW'(idx1_q) == nsteps_q - CW'(1)) run_q <= 1'b0;
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_index) && $stable(out_hit));

endmodule
