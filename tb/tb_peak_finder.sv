// tb_peak_finder: runs the peak finder over accumulator contents held in a
// testbench model (random bits, a dense row, an empty accumulator) and
// checks the emitted candidates (row, column, layer count) against a list
// computed by the testbench, in scan order, under random back-pressure. Also
// checks the scan time of an empty accumulator: 2 cycles per row.
module tb_peak_finder;
  localparam int NL = 4, NR = 10, NC = 8, TH = 3;
  localparam int RW = $clog2(NR), CLW = $clog2(NC), CNW = $clog2(NL + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, cand_valid, cand_ready = 0;
  logic [RW-1:0]  rd_row, cand_row;
  logic [CLW-1:0] cand_col;
  logic [CNW-1:0] cand_count;
  logic [NL-1:0][NC-1:0] rd_data;

  peak_finder #(.N_LAYERS(NL), .N_ROWS(NR), .N_COLS(NC), .THRESH(TH)) dut (.*);

  // accumulator model with a registered read
  logic [NL-1:0][NR-1:0][NC-1:0] acc;
  always_ff @(posedge clk)
    for (int l = 0; l < NL; l++) rd_data[l] <= acc[l][rd_row];

  int checks = 0, failures = 0;
  int exp_row[$], exp_col[$], exp_cnt[$];

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

  task automatic scan(int ready_pct, output int cycles);
    exp_row.delete(); exp_col.delete(); exp_cnt.delete();
    for (int k = 0; k < NR; k++)
      for (int c = 0; c < NC; c++) begin
        int n;
        n = 0;
        for (int l = 0; l < NL; l++) n += acc[l][k][c];
        if (n >= TH) begin exp_row.push_back(k); exp_col.push_back(c); exp_cnt.push_back(n); end
      end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      cand_ready = ($urandom_range(0, 99) < ready_pct);
      @(posedge clk);
      if (cand_valid && cand_ready) begin
        if (exp_row.size() == 0) check(0, "unexpected candidate");
        else begin
          check(cand_row == exp_row[0] && cand_col == exp_col[0] && cand_count == exp_cnt[0],
                $sformatf("cand (%0d,%0d,%0d) exp (%0d,%0d,%0d)", cand_row, cand_col, cand_count,
                          exp_row[0], exp_col[0], exp_cnt[0]));
          void'(exp_row.pop_front()); void'(exp_col.pop_front()); void'(exp_cnt.pop_front());
        end
      end
      @(negedge clk);
      cycles++;
    end
    check(exp_row.size() == 0, $sformatf("%0d candidates missing", exp_row.size()));
    @(negedge clk) check(!busy, "busy after done");
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // empty accumulator: timing
    acc = '0;
    scan(100, cyc);
    check(cyc == 2 * NR + 1, $sformatf("empty scan took %0d cycles", cyc));
    // random contents
    for (int t = 0; t < 20; t++) begin
      for (int l = 0; l < NL; l++)
        for (int k = 0; k < NR; k++) acc[l][k] = NC'($urandom);
      if (t == 0) for (int l = 0; l < NL; l++) acc[l][NR-1] = '1;   // last row all peaks
      scan((t % 2) ? 40 : 100, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
