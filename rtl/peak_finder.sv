// peak_finder: extracts track candidates, qA/pt:phi0 bin pairs, from a filled
// accumulator.
//
// After start it reads the accumulator one qA/pt row at a time. For every
// bin of the row it counts the layers whose line crosses the bin; a bin
// whose count reaches THRESH is a candidate. The candidates of a row are
// emitted one per handshake, lowest phi0 column first, before the next row is
// read. Checking the bins for crossing lines follows the document; the
// threshold value, the row-by-row scan order and the output handshake are
// this design's choices.
//
// Interface: start (one cycle, while idle) begins a scan; rd_row/rd_data is
// the accumulator's row read port (data one cycle after the address);
// cand_valid/cand_ready is a valid/ready handshake carrying the row, the
// column and the layer count; done pulses for one cycle when the last row is
// finished; busy is high from start until done.
// Timing: two cycles per row plus one cycle per candidate emitted while
// cand_ready is high: 2*N_ROWS cycles for an empty accumulator.
module peak_finder #(
  parameter int N_LAYERS = 8,
  parameter int N_ROWS   = 216,
  parameter int N_COLS   = 32,
  parameter int THRESH   = 7,
  localparam int ROW_W   = $clog2(N_ROWS),
  localparam int COL_W   = $clog2(N_COLS),
  localparam int CNT_W   = $clog2(N_LAYERS + 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  output logic [ROW_W-1:0]                rd_row,
  input  logic [N_LAYERS-1:0][N_COLS-1:0] rd_data,
  output logic                            cand_valid,
  input  logic                            cand_ready,
  output logic [ROW_W-1:0]                cand_row,
  output logic [COL_W-1:0]                cand_col,
  output logic [CNT_W-1:0]                cand_count
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_EVAL, S_EMIT} state_t;
  state_t state_q;

  logic [ROW_W-1:0]              row_q;
  logic [N_COLS-1:0]             peak_q;       // candidates left in this row
  logic [N_COLS-1:0][CNT_W-1:0]  count_q;

  // ---- layer count per bin and threshold --------------------------------------
  logic [N_COLS-1:0][CNT_W-1:0] count_d;
  logic [N_COLS-1:0]            peak_d;
  always_comb begin
    for (int c = 0; c < N_COLS; c++) begin
      count_d[c] = '0;
      for (int l = 0; l < N_LAYERS; l++)
        count_d[c] = count_d[c] + CNT_W'(rd_data[l][c]);
      peak_d[c] = (count_d[c] >= CNT_W'(THRESH));
    end
  end

  // ---- lowest remaining candidate of the row -----------------------------------
  logic [COL_W-1:0] first_col;
  always_comb begin
    first_col = '0;
    for (int c = N_COLS - 1; c >= 0; c--)
      if (peak_q[c]) first_col = COL_W'(c);
  end

  assign rd_row     = row_q;
  assign busy       = (state_q != S_IDLE);
  assign cand_valid = (state_q == S_EMIT);
  assign cand_row   = row_q;
  assign cand_col   = first_col;
  assign cand_count = count_q[first_col];

  logic last_row;
  assign last_row = (row_q == ROW_W'(N_ROWS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      row_q   <= '0;
      peak_q  <= '0;
      count_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE:
          if (start) begin
            row_q   <= '0;
            state_q <= S_READ;
          end
        S_READ:                                   // address out, data next cycle
          state_q <= S_EVAL;
        S_EVAL: begin
          peak_q  <= peak_d;
          count_q <= count_d;
          if (peak_d != '0) begin
            state_q <= S_EMIT;
          end else if (last_row) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            row_q   <= row_q + ROW_W'(1);
            state_q <= S_READ;
          end
        end
        S_EMIT:
          if (cand_ready) begin
            peak_q[first_col] <= 1'b0;
            if ((peak_q & ~(N_COLS'(1) << first_col)) == '0) begin
              if (last_row) begin
                state_q <= S_IDLE;
                done    <= 1'b1;
              end else begin
                row_q   <= row_q + ROW_W'(1);
                state_q <= S_READ;
              end
            end
          end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The candidate must stay put while it waits for cand_ready.
  a_cand_stable: assert property (@(posedge clk) disable iff (!rst_n)
      cand_valid && !cand_ready |=> cand_valid && $stable(cand_row) && $stable(cand_col));

endmodule
