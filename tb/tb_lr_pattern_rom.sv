// tb_lr_pattern_rom: checks the pattern table of a Fix-r layer (r = 1000 mm)
// and of a Scan-r layer (990..1010 mm) against the pattern formula evaluated
// in the testbench, and checks by brute-force sampling of phi inside the
// sub-range and qA/pt inside the row that every sampled line column lies in
// the pattern and that the pattern is tight (lower end reached, upper end
// within one column of the samples). Also checks the one-cycle read.
module tb_lr_pattern_rom;
  import tb_ht_ref::*;
  localparam int NR = 216, NC = 64, NSUB = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] sub = '0;
  ht_pkg::off_t [NR-1:0] lo_f, hi_f, lo_s, hi_s;

  lr_pattern_rom #(.N_ROWS(NR), .N_COLS(NC), .NSUB(NSUB), .R_LO(1000), .R_HI(1000))
    u_fix  (.clk, .sub, .lo_off (lo_f), .hi_off (hi_f));
  lr_pattern_rom #(.N_ROWS(NR), .N_COLS(NC), .NSUB(NSUB), .R_LO(990), .R_HI(1010))
    u_scan (.clk, .sub, .lo_off (lo_s), .hi_off (hi_s));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSUB; s++) begin
      @(negedge clk) sub = 2'(s);
      @(negedge clk);
      for (int k = 0; k < NR; k++) begin
        longint elo, ehi;
        longint smin, smax;
        smin = 1000; smax = -1000;
        lr_range(s, NSUB, k, NR, NC, 1000.0, 1000.0, elo, ehi);
        check(lo_f[k] == elo && hi_f[k] == ehi,
              $sformatf("fix s%0d row %0d got %0d..%0d exp %0d..%0d", s, k, lo_f[k], hi_f[k], elo, ehi));
        lr_range(s, NSUB, k, NR, NC, 990.0, 1010.0, elo, ehi);
        check(lo_s[k] == elo && hi_s[k] == ehi, $sformatf("scan s%0d row %0d", s, k));
        check(lo_s[k] <= lo_f[k] && hi_s[k] >= hi_f[k], "scan pattern covers fix pattern");
        // sampling: phi in 1/256 steps inside the sub-range, qA/pt in 8 steps inside the row
        for (int f = s * 64; f < (s + 1) * 64; f++)
          for (int j = 0; j < 8; j++) begin
            real q;
            longint c;
            q = -3.0e-4 + (k + j / 8.0) * 6.0e-4 / NR;
            c = rfloor(f / 256.0 + 1000.0 * q * (NC / 0.2));
            if (c < smin) smin = c;
            if (c > smax) smax = c;
          end
        check(smin >= lo_f[k] && smax <= hi_f[k], $sformatf("sample outside, s%0d row %0d: %0d..%0d vs %0d..%0d", s, k, smin, smax, lo_f[k], hi_f[k]));
        check(smin == lo_f[k] && (hi_f[k] - smax) <= 1, $sformatf("pattern not tight, s%0d row %0d", s, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
