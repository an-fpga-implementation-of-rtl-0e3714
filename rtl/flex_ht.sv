// flex_ht: the Flexible Hough Transform track finder for one detector region.
//
// An event arrives as a stream of words, each carrying at most one cluster
// (r, phi) per layer, the last word flagged end-of-event. The words cross
// from the input clock domain into the core clock domain through an
// asynchronous FIFO. In the core every cluster of a word is stored in its
// layer's cluster store and drawn, all layers at once, into the accumulator
// by one line_drawer per layer. After the end-of-event word the peak finder
// scans the accumulator for bins crossed by at least THRESH layers, and for
// each such qA/pt:phi0 candidate the cluster recovery walks the stored
// clusters and returns those whose line passes through the bin. Then the
// accumulator and the stores are cleared.
//
// The core holds N_BANKS events (default 2): each bank is an accumulator plus
// one cluster store per layer. The next event is loaded into a free bank
// while the previous one is scanned and recovered; banks are used in turn,
// so events leave in the order they came. With N_BANKS = 1 loading waits
// until the single bank is cleared.
//
// The two-pass flow (build the accumulator, find candidates, reapply the
// formula to recover their clusters one candidate at a time), the separate
// clock domains, the concurrent per-layer drawing, two events in flight and
// the sizes (216 x 32 bins, 8 layers, 160 clusters per layer) follow the
// document. The input word format, the threshold, dropping clusters beyond
// the store depth, the bank organisation and the event sequencing are this
// design's choices.
//
// Interface: input side in clk_in: in_valid/in_ready handshake with
// in_layer_valid, in_cluster and in_eoe. Output side in clk: one word per
// cluster index and candidate (see cluster_recovery), out_valid/out_ready.
// event_done pulses once per event after its last output, together with
// event_ncand (candidates found) and event_overflow (some layer had more
// than DEPTH clusters; the extra ones were not used).
// Timing: one input word per core cycle while a bank is free; after
// end-of-event 4 cycles of drain, then 2 cycles per accumulator row plus,
// per candidate, max(layer counts)+2 cycles of recovery, then 1 cycle of
// clear.
module flex_ht
  import ht_pkg::*;
#(
  parameter int N_LAYERS = ht_pkg::N_LAYERS,
  parameter int N_ROWS   = ht_pkg::N_QPT,
  parameter int N_COLS   = ht_pkg::N_PHI0_FLEX,
  parameter int DEPTH    = ht_pkg::N_CLUST,
  parameter int THRESH   = 7,
  parameter int FIFO_AW  = 4,
  parameter int N_BANKS  = 2,                  // events held in the core at once
  localparam int ROW_W   = $clog2(N_ROWS),
  localparam int COL_W   = $clog2(N_COLS),
  localparam int AW      = $clog2(DEPTH),
  localparam int CW      = $clog2(DEPTH + 1)
) (
  // input clock domain
  input  logic                     clk_in,
  input  logic                     rst_in_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [N_LAYERS-1:0]      in_layer_valid,
  input  cluster_t [N_LAYERS-1:0]  in_cluster,
  input  logic                     in_eoe,
  // core clock domain
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [ROW_W-1:0]         out_row,
  output logic [COL_W-1:0]         out_col,
  output logic [AW-1:0]            out_index,
  output logic [N_LAYERS-1:0]      out_hit,
  output cluster_t [N_LAYERS-1:0]  out_cluster,
  output logic                     out_last,
  output logic                     event_done,
  output logic [15:0]              event_ncand,
  output logic                     event_overflow
);

  typedef struct packed {
    logic                    eoe;
    logic [N_LAYERS-1:0]     lv;
    cluster_t [N_LAYERS-1:0] cl;
  } in_word_t;

  // ---- clock-domain crossing ----------------------------------------------------
  in_word_t wr_word, rd_word;
  logic     fifo_full, fifo_empty, fifo_pop;

  assign wr_word  = '{eoe: in_eoe, lv: in_layer_valid, cl: in_cluster};
  assign in_ready = !fifo_full;

  cdc_fifo #(.WIDTH($bits(in_word_t)), .AW(FIFO_AW)) u_fifo (
    .wr_clk (clk_in), .wr_rst_n (rst_in_n),
    .wr_en  (in_valid), .wr_data (wr_word), .wr_full (fifo_full),
    .rd_clk (clk), .rd_rst_n (rst_n),
    .rd_en  (fifo_pop), .rd_data (rd_word), .rd_empty (fifo_empty)
  );

  // ---- banks ----------------------------------------------------------------------
  // Each bank holds one event: an accumulator and one cluster store per layer.
  // Words are loaded into load_q's bank while scan_q's bank is scanned and
  // recovered; with two banks two events are in the core at once.
  localparam int BW = (N_BANKS > 1) ? $clog2(N_BANKS) : 1;

  function automatic logic [BW-1:0] next_bank(logic [BW-1:0] b);
    return (int'(b) == N_BANKS - 1) ? '0 : b + BW'(1);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_DRAIN, S_SCAN, S_CLEAR} state_t;
  state_t              state_q;
  logic [BW-1:0]       load_q, scan_q;
  logic [N_BANKS-1:0]  loaded_q;           // bank holds a complete event
  logic [1:0]          drain_q;
  logic                pf_start, pf_busy, pf_done, seen_done_q;
  logic                rec_busy;

  assign fifo_pop = !fifo_empty && !loaded_q[load_q];
  assign pf_start = (state_q == S_DRAIN) && (drain_q == 2'd0);

  // ---- line drawers, one per layer, shared by the banks -------------------------------
  logic [N_BANKS-1:0][N_LAYERS-1:0]             mem_full, mem_ovf;
  logic [N_BANKS-1:0][N_LAYERS-1:0][CW-1:0]     mem_count;
  cluster_t [N_BANKS-1:0][N_LAYERS-1:0]         mem_data;
  logic [AW-1:0]                                mem_addr;
  logic [N_LAYERS-1:0]                          take, draw_valid;
  logic [N_LAYERS-1:0][N_ROWS-1:0][N_COLS-1:0]  draw_mask;
  logic [BW-1:0]                                bank_d1, bank_d2;   // bank of the lines in flight

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    assign take[l] = fifo_pop && rd_word.lv[l];
    // a cluster the store refuses is not drawn either
    line_drawer #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_draw (
      .clk, .rst_n,
      .in_valid (take[l] && !mem_full[load_q][l]), .in_cluster (rd_word.cl[l]),
      .out_valid (draw_valid[l]), .out_mask (draw_mask[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_d1 <= '0;
      bank_d2 <= '0;
    end else begin
      bank_d1 <= load_q;
      bank_d2 <= bank_d1;
    end
  end

  // ---- per bank: cluster stores and accumulator ---------------------------------------
  logic [ROW_W-1:0]                                acc_row;
  logic [N_BANKS-1:0][N_LAYERS-1:0][N_COLS-1:0]    acc_data;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic clear_b;
    assign clear_b = (state_q == S_CLEAR) && (int'(scan_q) == b);

    for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
      cluster_mem #(.DEPTH(DEPTH)) u_mem (
        .clk, .rst_n, .clear (clear_b),
        .wr_en (take[l] && (int'(load_q) == b)), .wr_data (rd_word.cl[l]),
        .full (mem_full[b][l]), .overflow (mem_ovf[b][l]), .count (mem_count[b][l]),
        .rd_addr (mem_addr), .rd_data (mem_data[b][l])
      );
    end

    ht_accumulator #(.N_LAYERS(N_LAYERS), .N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_acc (
      .clk, .rst_n, .clear (clear_b),
      .wr_en (draw_valid & {N_LAYERS{int'(bank_d2) == b}}), .wr_mask (draw_mask),
      .rd_row (acc_row), .rd_data (acc_data[b])
    );
  end

  // ---- peak finder ------------------------------------------------------------------------
  logic             cand_valid, cand_ready;
  logic [ROW_W-1:0] cand_row;
  logic [COL_W-1:0] cand_col;
  logic [$clog2(N_LAYERS+1)-1:0] cand_count;

  peak_finder #(.N_LAYERS(N_LAYERS), .N_ROWS(N_ROWS), .N_COLS(N_COLS), .THRESH(THRESH)) u_peak (
    .clk, .rst_n, .start (pf_start), .busy (pf_busy), .done (pf_done),
    .rd_row (acc_row), .rd_data (acc_data[scan_q]),
    .cand_valid, .cand_ready, .cand_row, .cand_col, .cand_count
  );

  // every candidate handed on has reached the threshold
  a_thresh: assert property (@(posedge clk) disable iff (!rst_n)
      cand_valid |-> cand_count >= ($clog2(N_LAYERS+1))'(THRESH));

  // ---- cluster recovery --------------------------------------------------------------
  cluster_recovery #(.N_LAYERS(N_LAYERS), .N_ROWS(N_ROWS), .N_COLS(N_COLS), .DEPTH(DEPTH)) u_rec (
    .clk, .rst_n,
    .cand_valid, .cand_ready, .cand_row, .cand_col,
    .layer_count (mem_count[scan_q]), .mem_addr, .mem_data (mem_data[scan_q]),
    .out_valid, .out_ready, .out_row, .out_col, .out_index, .out_hit, .out_cluster,
    .out_last, .busy (rec_busy)
  );

  // ---- sequencer ---------------------------------------------------------------------
  logic [15:0] ncand_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= S_IDLE;
      load_q         <= '0;
      scan_q         <= '0;
      loaded_q       <= '0;
      drain_q        <= '0;
      seen_done_q    <= 1'b0;
      ncand_q        <= '0;
      event_done     <= 1'b0;
      event_ncand    <= '0;
      event_overflow <= 1'b0;
    end else begin
      event_done <= 1'b0;
      if (cand_valid && cand_ready) ncand_q <= ncand_q + 16'd1;

      // load side: the end-of-event word closes the bank
      if (fifo_pop && rd_word.eoe) begin
        loaded_q[load_q] <= 1'b1;
        load_q           <= next_bank(load_q);
      end

      // scan side, banks in turn
      unique case (state_q)
        S_IDLE:
          if (loaded_q[scan_q]) begin
            state_q <= S_DRAIN;
            drain_q <= 2'd2;              // line drawer and accumulator write
          end
        S_DRAIN:
          if (drain_q == 2'd0) begin
            state_q     <= S_SCAN;
            seen_done_q <= 1'b0;
          end else begin
            drain_q <= drain_q - 2'd1;
          end
        S_SCAN: begin
          if (pf_done) seen_done_q <= 1'b1;
          if (seen_done_q && !pf_busy && !rec_busy) state_q <= S_CLEAR;
        end
        S_CLEAR: begin
          state_q          <= S_IDLE;
          loaded_q[scan_q] <= 1'b0;
          scan_q           <= next_bank(scan_q);
          event_done       <= 1'b1;
          event_ncand      <= ncand_q;
          event_overflow   <= |mem_ovf[scan_q];
          ncand_q          <= '0;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // a bank is never written while it is being scanned
  a_no_load_into_scan: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q != S_IDLE) && fifo_pop |-> load_q != scan_q);

endmodule
