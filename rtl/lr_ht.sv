// lr_ht: the Low-Resources Hough Transform track finder for one detector
// region (barrel layers only).
//
// It replaces the multipliers of the Flexible HT by tables. A cluster gives
// only its phi; its layer's radius is taken as known. The phi is split into a
// column and a sub-range (lr_range_sel); the sub-range selects one of the
// layer's pre-generated line patterns (lr_pattern_rom), and the pattern,
// shifted to the cluster's column, is ORed into the layer's plane of the
// 216 x 64 accumulator. One cluster per layer is drawn per cycle. After the
// end-of-event word the peak finder emits the bins reached by at least THRESH
// layers as track candidates, and the accumulator is cleared.
//
// The pattern approach, the fixed radius per layer, the barrel-only use and
// the 216 x 64 accumulator follow the document. The five layers and their
// radii, the threshold, the sub-range count and the single clock domain are
// this design's choices.
//
// Interface: in_valid/in_ready handshake with in_layer_valid, in_phi (one
// per layer) and in_eoe; candidates on cand_valid/cand_ready with their row,
// column and layer count; event_done pulses after an event's last candidate
// with event_ncand.
// Timing: one input word per cycle; the pattern reaches the accumulator two
// cycles after the word; after end-of-event, 2 cycles of drain, 2 cycles per
// row of scan plus one per candidate, 1 cycle of clear.
module lr_ht
  import ht_pkg::*;
#(
  parameter int N_LAYERS         = ht_pkg::LR_LAYERS,
  parameter int N_ROWS           = ht_pkg::N_QPT,
  parameter int N_COLS           = ht_pkg::N_PHI0_LR,
  parameter int NSUB             = 4,
  parameter int THRESH           = 4,
  parameter int R_MM [N_LAYERS]  = '{291, 405, 562, 762, 1000},
  parameter bit SCAN_R           = 1'b0,      // 0: Fix r, 1: Scan r
  parameter int R_HALF           = 10,        // Scan r: +-mm around R_MM
  localparam int ROW_W           = $clog2(N_ROWS),
  localparam int COL_W           = $clog2(N_COLS),
  localparam int CNT_W           = $clog2(N_LAYERS + 1),
  localparam int SUB_W           = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int PCOL_W          = PHI_W - PHI_FRAC
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [N_LAYERS-1:0]         in_layer_valid,
  input  phi_t [N_LAYERS-1:0]         in_phi,
  input  logic                        in_eoe,
  output logic                        cand_valid,
  input  logic                        cand_ready,
  output logic [ROW_W-1:0]            cand_row,
  output logic [COL_W-1:0]            cand_col,
  output logic [CNT_W-1:0]            cand_count,
  output logic                        event_done,
  output logic [15:0]                 event_ncand
);

  typedef enum logic [1:0] {S_LOAD, S_DRAIN, S_SCAN, S_CLEAR} state_t;
  state_t state_q;

  logic accept, clear;
  assign in_ready = (state_q == S_LOAD);
  assign accept   = in_valid && in_ready;
  assign clear    = (state_q == S_CLEAR);

  // ---- per layer: range select, pattern lookup, shift into place ----------------------
  logic [N_LAYERS-1:0]                          wr_en;
  logic [N_LAYERS-1:0][N_ROWS-1:0][N_COLS-1:0]  wr_mask;

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    logic signed [PCOL_W-1:0] col_d, col_q;
    logic [SUB_W-1:0]         sub_d;
    logic                     v_q;
    off_t [N_ROWS-1:0] lo_off, hi_off;

    lr_range_sel #(.NSUB(NSUB)) u_sel (.phi (in_phi[l]), .col (col_d), .sub (sub_d));

    lr_pattern_rom #(
      .N_ROWS (N_ROWS), .N_COLS (N_COLS), .NSUB (NSUB),
      .R_LO (SCAN_R ? R_MM[l] - R_HALF : R_MM[l]),
      .R_HI (SCAN_R ? R_MM[l] + R_HALF : R_MM[l])
    ) u_rom (.clk, .sub (sub_d), .lo_off, .hi_off);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q   <= 1'b0;
        col_q <= '0;
      end else begin
        v_q   <= accept && in_layer_valid[l];
        col_q <= col_d;
      end
    end

    assign wr_en[l] = v_q;
    for (genvar k = 0; k < N_ROWS; k++) begin : g_row
      assign wr_mask[l][k] = N_COLS'(range_mask(int'(col_q) + int'(lo_off[k]),
                                                int'(col_q) + int'(hi_off[k]), N_COLS));
    end
  end

  // ---- accumulator and peak finder -----------------------------------------------------
  logic [ROW_W-1:0]                acc_row;
  logic [N_LAYERS-1:0][N_COLS-1:0] acc_data;
  logic pf_start, pf_busy, pf_done;
  logic [1:0] drain_q;

  ht_accumulator #(.N_LAYERS(N_LAYERS), .N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_acc (
    .clk, .rst_n, .clear, .wr_en, .wr_mask, .rd_row (acc_row), .rd_data (acc_data)
  );

  assign pf_start = (state_q == S_DRAIN) && (drain_q == 2'd0);

  peak_finder #(.N_LAYERS(N_LAYERS), .N_ROWS(N_ROWS), .N_COLS(N_COLS), .THRESH(THRESH)) u_peak (
    .clk, .rst_n, .start (pf_start), .busy (pf_busy), .done (pf_done),
    .rd_row (acc_row), .rd_data (acc_data),
    .cand_valid, .cand_ready, .cand_row, .cand_col, .cand_count
  );

  // ---- sequencer ----------------------------------------------------------------------
  logic [15:0] ncand_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_LOAD;
      drain_q     <= '0;
      ncand_q     <= '0;
      event_done  <= 1'b0;
      event_ncand <= '0;
    end else begin
      event_done <= 1'b0;
      if (cand_valid && cand_ready) ncand_q <= ncand_q + 16'd1;
      unique case (state_q)
        S_LOAD:
          if (accept && in_eoe) begin
            state_q <= S_DRAIN;
            drain_q <= 2'd1;              // pattern lookup and accumulator write
          end
        S_DRAIN:
          if (drain_q == 2'd0) state_q <= S_SCAN;
          else                 drain_q <= drain_q - 2'd1;
        S_SCAN:
          if (pf_done) state_q <= S_CLEAR;
        S_CLEAR: begin
          state_q     <= S_LOAD;
          event_done  <= 1'b1;
          event_ncand <= ncand_q;
          ncand_q     <= '0;
        end
        default: state_q <= S_LOAD;
      endcase
    end
  end

  a_no_busy_load: assert property (@(posedge clk) disable iff (!rst_n)
      state_q == S_LOAD |-> !pf_busy);

endmodule
