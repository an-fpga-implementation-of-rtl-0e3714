// ht_top: the two Hough Transform track finders side by side.
//
// The Flexible HT (flex_ht) computes every line from the cluster's measured
// radius and phi, finds candidates and recovers the clusters behind each one;
// it has an input clock domain and a core clock domain. The Low-Resources HT
// (lr_ht) draws pre-generated patterns chosen by phi alone and reports the
// candidates. The two are independent designs for the same task; this top
// only brings both out with their own ports, with their default sizes
// (216 x 32 bins and 8 layers for the Flexible HT, 216 x 64 bins and 5
// layers for the Low-Resources HT).
//
// Interface: flex_* ports are those of flex_ht, lr_* ports those of lr_ht.
// The Low-Resources HT runs on the core clock clk.
module ht_top
  import ht_pkg::*;
(
  // Flexible HT, input clock domain
  input  logic                         clk_in,
  input  logic                         rst_in_n,
  input  logic                         flex_in_valid,
  output logic                         flex_in_ready,
  input  logic [N_LAYERS-1:0]          flex_in_layer_valid,
  input  cluster_t [N_LAYERS-1:0]      flex_in_cluster,
  input  logic                         flex_in_eoe,
  // core clock domain
  input  logic                         clk,
  input  logic                         rst_n,
  output logic                         flex_out_valid,
  input  logic                         flex_out_ready,
  output logic [$clog2(N_QPT)-1:0]     flex_out_row,
  output logic [$clog2(N_PHI0_FLEX)-1:0] flex_out_col,
  output logic [$clog2(N_CLUST)-1:0]   flex_out_index,
  output logic [N_LAYERS-1:0]          flex_out_hit,
  output cluster_t [N_LAYERS-1:0]      flex_out_cluster,
  output logic                         flex_out_last,
  output logic                         flex_event_done,
  output logic [15:0]                  flex_event_ncand,
  output logic                         flex_event_overflow,
  // Low-Resources HT
  input  logic                         lr_in_valid,
  output logic                         lr_in_ready,
  input  logic [LR_LAYERS-1:0]         lr_in_layer_valid,
  input  phi_t [LR_LAYERS-1:0]         lr_in_phi,
  input  logic                         lr_in_eoe,
  output logic                         lr_cand_valid,
  input  logic                         lr_cand_ready,
  output logic [$clog2(N_QPT)-1:0]     lr_cand_row,
  output logic [$clog2(N_PHI0_LR)-1:0] lr_cand_col,
  output logic [$clog2(LR_LAYERS+1)-1:0] lr_cand_count,
  output logic                         lr_event_done,
  output logic [15:0]                  lr_event_ncand
);

  flex_ht u_flex (
    .clk_in, .rst_in_n,
    .in_valid (flex_in_valid), .in_ready (flex_in_ready),
    .in_layer_valid (flex_in_layer_valid), .in_cluster (flex_in_cluster),
    .in_eoe (flex_in_eoe),
    .clk, .rst_n,
    .out_valid (flex_out_valid), .out_ready (flex_out_ready),
    .out_row (flex_out_row), .out_col (flex_out_col), .out_index (flex_out_index),
    .out_hit (flex_out_hit), .out_cluster (flex_out_cluster), .out_last (flex_out_last),
    .event_done (flex_event_done), .event_ncand (flex_event_ncand),
    .event_overflow (flex_event_overflow)
  );

  lr_ht u_lr (
    .clk, .rst_n,
    .in_valid (lr_in_valid), .in_ready (lr_in_ready),
    .in_layer_valid (lr_in_layer_valid), .in_phi (lr_in_phi), .in_eoe (lr_in_eoe),
    .cand_valid (lr_cand_valid), .cand_ready (lr_cand_ready),
    .cand_row (lr_cand_row), .cand_col (lr_cand_col), .cand_count (lr_cand_count),
    .event_done (lr_event_done), .event_ncand (lr_event_ncand)
  );

endmodule
