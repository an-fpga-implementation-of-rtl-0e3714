// tb_line_drawer: checks the line drawn for random clusters against a
// row-by-row evaluation of phi0 = phi + r*qA/pt, checks with real-valued
// arithmetic that the column of the line at each row centre is marked, and
// checks the two-cycle latency. Default size: 216 rows x 32 columns.
module tb_line_drawer;
  import ht_pkg::*;
  import tb_ht_ref::*;

  localparam int NR = 216, NC = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     in_valid = 0;
  cluster_t in_cluster = '0;
  logic     out_valid;
  logic [NR-1:0][NC-1:0] out_mask;

  line_drawer #(.N_ROWS(NR), .N_COLS(NC)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(int r, int phi);
    longint lo, hi;
    int lat;
    @(negedge clk);
    in_valid = 1; in_cluster.r = r_t'(r); in_cluster.phi = phi_t'(phi);
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("latency %0d", lat));
    for (int k = 0; k < NR; k++) begin
      logic [NC-1:0] exp_m;
      real qc, col;
      row_range(phi, r, k, NR, NC, lo, hi);
      for (int c = 0; c < NC; c++) exp_m[c] = (c >= lo) && (c <= hi);
      check(out_mask[k] == exp_m,
            $sformatf("r=%0d phi=%0d row %0d got %h exp %h", r, phi, k, out_mask[k], exp_m));
      // independent real-valued check at the row centre
      qc  = -3.0e-4 + (k + 0.5) * 6.0e-4 / NR;
      col = phi / 256.0 + r * qc * (NC / 0.2);
      if (col >= 0.0 && col < NC && (col - $floor(col)) > 1e-3 && (col - $floor(col)) < 0.999)
        check(out_mask[k][int'($floor(col))], $sformatf("centre r=%0d phi=%0d row %0d", r, phi, k));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_one(1000, 16 * 256);         // straight through the middle
    run_one(291, 0);
    run_one(0, 5 * 256 + 7);         // r = 0: a vertical line
    run_one(2047, 31 * 256 + 255);
    for (int i = 0; i < 60; i++)
      run_one(200 + $urandom_range(0, 900), int'($urandom_range(0, 40 * 256)) - 4 * 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
