// tb_cluster_mem: fills one layer's store past its 160 entries and checks
// the count, full, the sticky overflow flag, that the first 160 clusters read
// back in order with one cycle of read latency, and that clear empties it.
module tb_cluster_mem;
  import ht_pkg::*;
  localparam int DEPTH = 160;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     clear = 0, wr_en = 0, full, overflow;
  cluster_t wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [$clog2(DEPTH)-1:0]   rd_addr = '0;

  cluster_mem #(.DEPTH(DEPTH)) dut (.*);

  cluster_t written [DEPTH + 10];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      int n;
      n = (round == 0) ? DEPTH + 10 : 37;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        wr_en = 1;
        written[i] = cluster_t'($urandom);
        wr_data = written[i];
        if (i < DEPTH) check(!full, "full too early");
      end
      @(negedge clk) wr_en = 0;
      check(count == ((n > DEPTH) ? DEPTH : n), $sformatf("count %0d", count));
      check(overflow == (n > DEPTH), "overflow flag");
      check(full == (n >= DEPTH), "full flag");
      for (int i = 0; i < ((n > DEPTH) ? DEPTH : n); i++) begin
        @(negedge clk) rd_addr = i[$clog2(DEPTH)-1:0];
        @(negedge clk);
        check(rd_data == written[i], $sformatf("entry %0d", i));
      end
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      check(count == 0 && !overflow && !full, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
