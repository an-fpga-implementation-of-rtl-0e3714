// tb_flex_ht: end-to-end test of the Flexible HT at its default size
// (8 layers, 216 x 32 bins, 160 clusters per layer, threshold 7), with an
// input clock and a faster core clock.
// Four events are sent back to back: one clean track; two tracks with noise;
// a layer with more clusters than the store holds; an empty event. The
// testbench computes the accumulator, the candidate list and, for every
// candidate, the hit flags of every stored cluster straight from
// phi0 = phi + r*qA/pt, and compares each output word and each event summary.
// It counts input stalls (FIFO full while the core is busy), output
// back-pressure, store overflow and rows with several candidates, and fails
// if one never happened, and likewise if the core never loaded one event
// while scanning the previous one (two events in flight). It also reports the core cycles per event and checks
// the two-track event against 10 us at 350 MHz (3500 cycles).
module tb_flex_ht;
  import ht_pkg::*;
  import tb_ht_ref::*;
  localparam int NL = 8, NR = 216, NC = 32, DEPTH = 160, TH = 7, NEV = 4;
  localparam int RW = $clog2(NR), CLW = $clog2(NC), AW = $clog2(DEPTH);
  localparam int RADII [NL] = '{400, 410, 560, 570, 760, 770, 1000, 1010};

  logic clk_in = 0, clk = 0, rst_in_n = 0, rst_n = 0;
  always #7 clk_in = ~clk_in;
  always #3 clk = ~clk;

  logic in_valid = 0, in_ready, in_eoe = 0;
  logic [NL-1:0] in_layer_valid = '0;
  cluster_t [NL-1:0] in_cluster = '0;
  logic out_valid, out_ready = 1, out_last, event_done, event_overflow;
  logic [RW-1:0] out_row;
  logic [CLW-1:0] out_col;
  logic [AW-1:0] out_index;
  logic [NL-1:0] out_hit;
  cluster_t [NL-1:0] out_cluster;
  logic [15:0] event_ncand;

  flex_ht dut (.*);

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_backpressure = 0, n_overflow = 0, n_multi_row = 0, n_hits = 0;

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

  // ---- events -------------------------------------------------------------------
  int ev_r   [NEV][NL][$];
  int ev_phi [NEV][NL][$];

  function automatic int track_phi(int r, int k0, int c0);
    real q;
    q = -3.0e-4 + (k0 + 0.5) * 6.0e-4 / NR;
    return int'(((c0 + 0.5) - r * q * (NC / 0.2)) * 256.0);
  endfunction

  task automatic add_track(int e, int k0, int c0);
    for (int l = 0; l < NL; l++) begin
      ev_r[e][l].push_back(RADII[l]);
      ev_phi[e][l].push_back(track_phi(RADII[l], k0, c0));
    end
  endtask

  task automatic add_noise(int e, int l, int n);
    for (int i = 0; i < n; i++) begin
      ev_r[e][l].push_back(RADII[l] + $urandom_range(0, 5));
      ev_phi[e][l].push_back($urandom_range(0, NC * 256 - 1));
    end
  endtask

  // ---- expected output ----------------------------------------------------------
  typedef struct { int row, col, index, last; logic [NL-1:0] hit; cluster_t [NL-1:0] cl; } word_t;
  word_t exp_words [$];
  int    exp_ncand [NEV], exp_ovf [NEV];

  task automatic expect_event(int e);
    int cnt [NL];
    int nmax, ncand;
    logic [NL-1:0][NR-1:0][NC-1:0] acc;
    acc = '0;
    nmax = 1;
    ncand = 0;
    exp_ovf[e] = 0;
    for (int l = 0; l < NL; l++) begin
      cnt[l] = ev_r[e][l].size();
      if (cnt[l] > DEPTH) begin cnt[l] = DEPTH; exp_ovf[e] = 1; end
      if (cnt[l] > nmax) nmax = cnt[l];
      for (int i = 0; i < cnt[l]; i++)
        for (int k = 0; k < NR; k++) begin
          longint lo, hi;
          row_range(ev_phi[e][l][i], ev_r[e][l][i], k, NR, NC, lo, hi);
          for (int c = 0; c < NC; c++) if (c >= lo && c <= hi) acc[l][k][c] = 1'b1;
        end
    end
    for (int k = 0; k < NR; k++) begin
      int in_row;
      in_row = 0;
      for (int c = 0; c < NC; c++) begin
        int n;
        n = 0;
        for (int l = 0; l < NL; l++) n += acc[l][k][c];
        if (n >= TH) begin
          in_row++;
          ncand++;
          for (int i = 0; i < nmax; i++) begin
            word_t w;
            w.row = k; w.col = c; w.index = i; w.last = (i == nmax - 1);
            for (int l = 0; l < NL; l++) begin
              w.hit[l] = (i < cnt[l]) && crosses(ev_phi[e][l][i], ev_r[e][l][i], k, c, NR, NC);
              w.cl[l]  = (i < cnt[l]) ? cluster_t'{r: r_t'(ev_r[e][l][i]), phi: phi_t'(ev_phi[e][l][i])} : '0;
            end
            exp_words.push_back(w);
          end
        end
      end
      if (in_row > 1) n_multi_row++;
    end
    exp_ncand[e] = ncand;
  endtask

  // ---- sender (input clock domain) ---------------------------------------------------
  task automatic send_event(int e);
    int nw;
    nw = 1;
    for (int l = 0; l < NL; l++) if (ev_r[e][l].size() > nw) nw = ev_r[e][l].size();
    for (int w = 0; w < nw; w++) begin
      @(negedge clk_in);
      in_valid = 1;
      in_eoe   = (w == nw - 1);
      for (int l = 0; l < NL; l++) begin
        in_layer_valid[l] = (w < ev_r[e][l].size());
        in_cluster[l].r   = (w < ev_r[e][l].size()) ? r_t'(ev_r[e][l][w]) : '0;
        in_cluster[l].phi = (w < ev_r[e][l].size()) ? phi_t'(ev_phi[e][l][w]) : '0;
      end
      @(posedge clk_in);
      while (!in_ready) begin n_in_stall++; @(posedge clk_in); end
    end
    @(negedge clk_in) in_valid = 0;
  endtask

  // ---- monitor (core clock domain) -----------------------------------------------------
  int ev_seen = 0, cyc = 0, ev_start = 0;
  int ev_cycles [NEV];
  int n_overlap = 0;                      // loading one event while scanning another
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.fifo_pop && dut.state_q != dut.S_IDLE) n_overlap++;
    if (out_valid && !out_ready) n_backpressure++;
    if (out_valid && out_ready) begin
      if (exp_words.size() == 0) check(0, "unexpected output word");
      else begin
        word_t w;
        w = exp_words.pop_front();
        check(int'(out_row) == w.row && int'(out_col) == w.col && int'(out_index) == w.index
              && int'(out_last) == w.last,
              $sformatf("ev %0d word (%0d,%0d,#%0d,%0d) exp (%0d,%0d,#%0d,%0d)", ev_seen,
                        out_row, out_col, out_index, out_last, w.row, w.col, w.index, w.last));
        check(out_hit == w.hit, $sformatf("ev %0d hits %b exp %b at (%0d,%0d,#%0d)",
                                          ev_seen, out_hit, w.hit, w.row, w.col, w.index));
        for (int l = 0; l < NL; l++) if (w.hit[l]) check(out_cluster[l] == w.cl[l], "hit cluster");
        n_hits += $countones(out_hit);
      end
    end
    if (event_done && rst_n) begin
      check(int'(event_ncand) == exp_ncand[ev_seen], $sformatf("ev %0d ncand %0d exp %0d",
                                                              ev_seen, event_ncand, exp_ncand[ev_seen]));
      check(int'(event_overflow) == exp_ovf[ev_seen], $sformatf("ev %0d overflow flag", ev_seen));
      if (event_overflow) n_overflow++;
      ev_cycles[ev_seen] = cyc - ev_start;
      ev_start <= cyc;
      ev_seen  <= ev_seen + 1;
    end
  end

  always @(negedge clk) out_ready = (ev_seen < 2) ? 1'b1 : ($urandom_range(0, 3) != 0);

  initial begin
    add_track(0, 100, 16);
    add_track(1, 60, 8);
    add_track(1, 150, 25);
    for (int l = 0; l < NL; l++) add_noise(1, l, 5);
    add_track(2, 120, 20);
    add_noise(2, 0, 175);                 // layer 0 overflows its store
    add_noise(2, 3, 20);
    // event 3 stays empty
    for (int e = 0; e < NEV; e++) expect_event(e);
    $display("expected candidates per event: %0d %0d %0d %0d", exp_ncand[0], exp_ncand[1], exp_ncand[2], exp_ncand[3]);
    repeat (3) @(posedge clk_in);
    rst_in_n = 1; rst_n = 1;
    for (int e = 0; e < NEV; e++) send_event(e);
    while (ev_seen < NEV) @(posedge clk);
    repeat (5) @(posedge clk);
    check(exp_words.size() == 0, $sformatf("%0d output words missing", exp_words.size()));
    $display("core cycles per event: %0d %0d %0d %0d", ev_cycles[0], ev_cycles[1], ev_cycles[2], ev_cycles[3]);
    check(ev_cycles[1] < 3500, "two-track event over 10 us at 350 MHz");
    $display("input stalls %0d, back-pressure %0d, overflow events %0d, multi-candidate rows %0d, hits %0d",
             n_in_stall, n_backpressure, n_overflow, n_multi_row, n_hits);
    check(n_in_stall > 0, "input stall never happened");
    check(n_backpressure > 0, "back-pressure never happened");
    check(n_overflow > 0, "overflow never happened");
    check(n_multi_row > 0, "no row with several candidates");
    check(n_hits > 0, "no cluster recovered");
    check(n_overlap > 0, "two events never in the core at once");
    $display("cycles loading while scanning: %0d", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
