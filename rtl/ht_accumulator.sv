// ht_accumulator: the Hough Transform accumulator, a grid of N_ROWS qA/pt
// rows by N_COLS phi0 columns, holding one hit bit per bin and per layer.
//
// The number of lines crossing a bin is the number of layers whose bit is
// set there (at most one count per layer, which is what the peak finder
// thresholds). Every layer can write a complete line in one cycle: the
// written masks are ORed into that layer's bits, so the clusters of all
// layers are drawn concurrently, one cluster per layer per cycle. The grid is
// held in flip-flops because a full line touches every row at once.
// The accumulator and its dimensions follow the document; storing one bit per
// layer and bin is this design's choice.
//
// Interface: clear empties the whole grid in one cycle (it takes priority over
// a write in the same cycle). wr_en[l] ORs wr_mask[l] into layer l.
// rd_row selects a row; rd_data returns it for every layer one cycle later.
module ht_accumulator #(
  parameter int N_LAYERS = 8,
  parameter int N_ROWS   = 216,
  parameter int N_COLS   = 32
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      clear,
  input  logic [N_LAYERS-1:0]                       wr_en,
  input  logic [N_LAYERS-1:0][N_ROWS-1:0][N_COLS-1:0] wr_mask,
  input  logic [$clog2(N_ROWS)-1:0]                 rd_row,
  output logic [N_LAYERS-1:0][N_COLS-1:0]           rd_data
);

  logic [N_LAYERS-1:0][N_ROWS-1:0][N_COLS-1:0] bins_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bins_q <= '0;
    end else if (clear) begin
      bins_q <= '0;
    end else begin
      for (int l = 0; l < N_LAYERS; l++)
        if (wr_en[l]) bins_q[l] <= bins_q[l] | wr_mask[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_data <= '0;
    else
      for (int l = 0; l < N_LAYERS; l++)
        rd_data[l] <= bins_q[l][rd_row];
  end

endmodule
