// tb_cdc_fifo: streams numbered words through the dual-clock FIFO with
// unrelated write and read clocks and random enables, and checks that every
// word comes out once, in order, that nothing is lost while full, and that
// both the full and the empty condition were reached.
module tb_cdc_fifo;
  localparam int W = 16, AW = 3, N = 600;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #7 wclk = ~wclk;
  always #3 rclk = ~rclk;

  logic         wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic         wr_full, rd_empty;

  cdc_fifo #(.WIDTH(W), .AW(AW)) dut (
    .wr_clk (wclk), .wr_rst_n (wrst_n), .wr_en, .wr_data, .wr_full,
    .rd_clk (rclk), .rd_rst_n (rrst_n), .rd_en, .rd_data, .rd_empty);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0, sent = 0, got = 0;
  bit slow_reader = 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: the first half of the run against a slow reader (fills up)
  initial begin
    #20 wrst_n = 1;
    while (sent < N) begin
      @(negedge wclk);
      if (wr_full) n_full++;
      wr_en   = ($urandom_range(0, 3) != 0) && (sent < N);
      wr_data = W'(sent);
    end
    @(negedge wclk) wr_en = 0;
  end

  // count words at the clock edges, seeing the values from before the edge
  always @(posedge wclk) if (wr_en && !wr_full) sent <= sent + 1;
  always @(posedge rclk)
    if (rd_en && !rd_empty) begin
      checks <= checks + 1;
      if (rd_data != W'(got)) begin
        failures <= failures + 1;
        $display("FAIL: got %0d expected %0d", rd_data, got);
      end
      got <= got + 1;
    end

  // reader
  initial begin
    #20 rrst_n = 1;
    while (got < N) begin
      @(negedge rclk);
      if (rd_empty) n_empty++;
      if (got > N / 2) slow_reader = 0;
      rd_en = slow_reader ? ($urandom_range(0, 9) == 0) : ($urandom_range(0, 1) == 0);
    end
    checks += 2;
    if (n_full == 0)  begin failures++; $display("FAIL: never full");  end
    if (n_empty == 0) begin failures++; $display("FAIL: never empty"); end
    $display("full seen %0d, empty seen %0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
