// cluster_mem: stores the clusters of one layer for the current event, so
// that the clusters behind a track candidate can be found again after the
// accumulator is filled.
//
// Clusters are appended in arrival order up to DEPTH entries (160 in the
// document). A cluster arriving when the store is full is refused: full is
// high, the cluster is neither stored nor meant to be drawn, and the sticky
// overflow flag is set until the next clear. The store itself is a simple
// dual-port memory (one write, one registered read), suited to block RAM.
// Depth follows the document; the overflow handling is this design's choice.
//
// Interface: wr_en/wr_data append (ignored while full); count is the number
// stored; clear empties the store and the overflow flag; rd_addr selects an
// entry and rd_data returns it one cycle later.
module cluster_mem
  import ht_pkg::*;
#(
  parameter int DEPTH = ht_pkg::N_CLUST,
  localparam int AW   = $clog2(DEPTH),
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          wr_en,
  input  cluster_t      wr_data,
  output logic          full,
  output logic          overflow,
  output logic [CW-1:0] count,
  input  logic [AW-1:0] rd_addr,
  output cluster_t      rd_data
);

  cluster_t mem [DEPTH];

  assign full = (count == CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (wr_en) begin
      if (full) overflow <= 1'b1;
      else      count    <= count + CW'(1);
    end
  end

  always_ff @(posedge clk)
    if (wr_en && !full && !clear) mem[AW'(count)] <= wr_data;

  always_ff @(posedge clk)
    rd_data <= mem[rd_addr];

endmodule
