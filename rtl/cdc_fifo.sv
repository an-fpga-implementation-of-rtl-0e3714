// cdc_fifo: asynchronous FIFO that carries data words from one clock domain
// into another.
//
// The Flexible HT is split into clock domains so that the core can run at
// its own, high clock; this FIFO is the crossing between the input (cluster)
// domain and the core domain. It is a standard dual-clock FIFO: binary
// pointers in each domain, Gray-coded copies passed across through two
// flip-flop synchronisers, full computed on the write side and empty on the
// read side. The use of separate clock domains follows the document; the
// FIFO structure, its depth and the show-ahead read port are this design's
// choices.
//
// Interface: write side wr_en/wr_data/wr_full (a write while full is
// ignored). Read side is show-ahead: rd_data holds the oldest word whenever
// rd_empty is low, and rd_en pops it.
// Timing: a word written is visible on the read side 2-3 read-clock cycles
// later; freed space is seen by the writer 2-3 write-clock cycles later.
module cdc_fifo #(
  parameter int WIDTH = 8,
  parameter int AW    = 4                     // log2 of the depth
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty
);

  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;          // read pointer seen by the writer
  logic [AW:0] wgray_r1, wgray_r2;          // write pointer seen by the reader

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write domain ---------------------------------------------------------
  logic [AW:0] wbin_n;
  assign wbin_n  = wbin + (AW+1)'(1);
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  always_ff @(posedge wr_clk)
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;

  // ---- read domain ----------------------------------------------------------
  logic [AW:0] rbin_n;
  assign rbin_n   = rbin + (AW+1)'(1);
  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

endmodule
