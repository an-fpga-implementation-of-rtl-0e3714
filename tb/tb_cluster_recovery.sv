// tb_cluster_recovery: gives the recovery random candidates over random
// cluster stores (held in testbench memories with a registered read) and
// checks every output word: candidate, index, per-layer hit flags computed
// from phi0 = phi + r*qA/pt by the reference, clusters, and the last flag,
// under random back-pressure. Clusters are built around a track so that hits
// occur. Also checks the cycle count of a candidate at full throughput:
// max(layer counts) + 2.
module tb_cluster_recovery;
  import ht_pkg::*;
  import tb_ht_ref::*;
  localparam int NL = 8, NR = 216, NC = 32, DEPTH = 160;
  localparam int RW = $clog2(NR), CLW = $clog2(NC), AW = $clog2(DEPTH), CW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cand_valid = 0, cand_ready, out_valid, out_ready = 0, out_last, busy;
  logic [RW-1:0]  cand_row = '0, out_row;
  logic [CLW-1:0] cand_col = '0, out_col;
  logic [NL-1:0][CW-1:0] layer_count;
  logic [AW-1:0]  mem_addr, out_index;
  cluster_t [NL-1:0] mem_data, out_cluster;
  logic [NL-1:0]  out_hit;

  cluster_recovery #(.N_LAYERS(NL), .N_ROWS(NR), .N_COLS(NC), .DEPTH(DEPTH)) dut (.*);

  cluster_t store [NL][DEPTH];
  int       cnt [NL];
  always_ff @(posedge clk)
    for (int l = 0; l < NL; l++) mem_data[l] <= store[l][mem_addr];
  always_comb
    for (int l = 0; l < NL; l++) layer_count[l] = CW'(cnt[l]);

  int checks = 0, failures = 0, total_hits = 0, stalls = 0;
  localparam int RADII [NL] = '{405, 415, 562, 572, 762, 772, 1000, 1010};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(int maxn);
    int k0, c0;
    k0 = $urandom_range(20, NR - 20);
    c0 = $urandom_range(2, NC - 3);
    for (int l = 0; l < NL; l++) begin
      cnt[l] = $urandom_range(0, maxn);
      for (int i = 0; i < DEPTH; i++) begin
        // half the clusters lie on a track through bin (k0, c0)
        int r, phi;
        real q;
        r = RADII[l] + $urandom_range(0, 3);
        if (i % 2 == 0) begin
          q = -3.0e-4 + (k0 + 0.5) * 6.0e-4 / NR;
          phi = int'(((c0 + 0.5) - r * q * (NC / 0.2)) * 256.0) + $urandom_range(0, 40) - 20;
        end else phi = $urandom_range(0, NC * 256 - 1);
        store[l][i].r = r_t'(r); store[l][i].phi = phi_t'(phi);
      end
    end
    cand_row = RW'(k0); cand_col = CLW'(c0);
  endtask

  task automatic one_candidate(int ready_pct, bit random_cand);
    int n, idx, cycles;
    bit seen_last;
    n = 1; idx = 0; cycles = 0; seen_last = 0;
    if (random_cand) begin cand_row = RW'($urandom_range(0, NR - 1)); cand_col = CLW'($urandom_range(0, NC - 1)); end
    for (int l = 0; l < NL; l++) if (cnt[l] > n) n = cnt[l];
    @(negedge clk) cand_valid = 1;
    check(cand_ready, "not ready when idle");
    @(negedge clk) cand_valid = 0;
    while (!seen_last) begin
      out_ready = ($urandom_range(0, 99) < ready_pct);
      @(posedge clk);
      cycles++;
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        check(out_row == cand_row && out_col == cand_col, "candidate echoed");
        check(int'(out_index) == idx, $sformatf("index %0d exp %0d", out_index, idx));
        check(out_last == (idx == n - 1), "last flag");
        for (int l = 0; l < NL; l++) begin
          bit e;
          e = (idx < cnt[l]) && crosses(int'(store[l][idx].phi), int'(store[l][idx].r),
                                            int'(cand_row), int'(cand_col), NR, NC);
          check(out_hit[l] == e, $sformatf("hit l%0d idx %0d got %0d", l, idx, out_hit[l]));
          if (idx < cnt[l]) check(out_cluster[l] == store[l][idx], "cluster data");
          total_hits += e;
        end
        seen_last = out_last;
        idx++;
      end
      @(negedge clk);
    end
    if (ready_pct == 100) check(cycles == n + 2, $sformatf("candidate took %0d cycles, n=%0d", cycles, n));
    out_ready = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 12; ev++) begin
      fill((ev == 0) ? 0 : DEPTH);
      one_candidate(100, 0);
      one_candidate(50, 0);
      one_candidate(70, 1);
    end
    check(total_hits > 50, $sformatf("only %0d hits", total_hits));
    check(stalls > 0, "no back-pressure seen");
    $display("hits %0d stalls %0d", total_hits, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
