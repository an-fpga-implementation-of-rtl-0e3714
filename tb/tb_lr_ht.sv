// tb_lr_ht: end-to-end test of the Low-Resources HT at its default size
// (5 layers, 216 x 64 bins), in Fix-r and in Scan-r form side by side.
// Each event holds one or two tracks through all layers plus noise clusters.
// The testbench builds its own accumulator from the pattern formula, derives
// the expected candidate list and compares it with what each design emits
// under random back-pressure; it also checks that every track's true bin is
// found. Counts how often input stalls, output back-pressure and rows with
// several candidates occurred.
module tb_lr_ht;
  import ht_pkg::*;
  import tb_ht_ref::*;
  localparam int NL = 5, NR = 216, NC = 64, NSUB = 4, TH = 4, RHALF = 10;
  localparam int RADII [NL] = '{291, 405, 562, 762, 1000};
  localparam int RW = $clog2(NR), CLW = $clog2(NC), CNW = $clog2(NL + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_eoe = 0;
  logic [NL-1:0] in_layer_valid = '0;
  phi_t [NL-1:0] in_phi = '0;

  logic [1:0]           in_ready, cand_valid, cand_ready, event_done;
  logic [1:0][RW-1:0]   cand_row;
  logic [1:0][CLW-1:0]  cand_col;
  logic [1:0][CNW-1:0]  cand_count;
  logic [1:0][15:0]     event_ncand;

  lr_ht #(.SCAN_R(1'b0)) dut_fix (
    .clk, .rst_n, .in_valid, .in_ready (in_ready[0]), .in_layer_valid, .in_phi, .in_eoe,
    .cand_valid (cand_valid[0]), .cand_ready (cand_ready[0]), .cand_row (cand_row[0]),
    .cand_col (cand_col[0]), .cand_count (cand_count[0]),
    .event_done (event_done[0]), .event_ncand (event_ncand[0]));
  lr_ht #(.SCAN_R(1'b1), .R_HALF(RHALF)) dut_scan (
    .clk, .rst_n, .in_valid, .in_ready (in_ready[1]), .in_layer_valid, .in_phi, .in_eoe,
    .cand_valid (cand_valid[1]), .cand_ready (cand_ready[1]), .cand_row (cand_row[1]),
    .cand_col (cand_col[1]), .cand_count (cand_count[1]),
    .event_done (event_done[1]), .event_ncand (event_ncand[1]));

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_backpressure = 0, n_multi_row = 0;
  int got_row [2][$], got_col [2][$], got_cnt [2][$];
  int ndone [2];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect outputs
  always @(posedge clk)
    for (int d = 0; d < 2; d++) begin
      if (cand_valid[d] && cand_ready[d]) begin
        got_row[d].push_back(int'(cand_row[d]));
        got_col[d].push_back(int'(cand_col[d]));
        got_cnt[d].push_back(int'(cand_count[d]));
      end
      if (cand_valid[d] && !cand_ready[d]) n_backpressure++;
      if (event_done[d]) ndone[d]++;
    end
  always @(negedge clk) cand_ready = {1'($urandom_range(0, 2) != 0), 1'($urandom_range(0, 2) != 0)};

  // event contents
  int   ev_layer [$], ev_phi [$];
  logic [1:0][NL-1:0][NR-1:0][NC-1:0] model;

  function automatic int track_phi(int l, int k0, int c0);
    real q;
    q = -3.0e-4 + (k0 + 0.5) * 6.0e-4 / NR;
    return int'(((c0 + 0.5) - RADII[l] * q * (NC / 0.2)) * 256.0);
  endfunction

  task automatic draw_model(int l, int phi);
    longint lo, hi;
    int col, s;
    col = phi >>> 8;
    s   = ((phi - col * 256) * NSUB) / 256;
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < NR; k++) begin
        if (d == 0) lr_range(s, NSUB, k, NR, NC, RADII[l], RADII[l], lo, hi);
        else        lr_range(s, NSUB, k, NR, NC, RADII[l] - RHALF, RADII[l] + RHALF, lo, hi);
        for (int c = 0; c < NC; c++)
          if (c >= col + lo && c <= col + hi) model[d][l][k][c] = 1'b1;
      end
  endtask

  task automatic run_event(int ntracks, int nnoise);
    int tk [2], tc [2];
    int nwords, wi, d0, d1;
    d0 = ndone[0]; d1 = ndone[1];
    ev_layer.delete(); ev_phi.delete();
    model = '0;
    for (int t = 0; t < ntracks; t++) begin
      tk[t] = $urandom_range(10, NR - 10);
      tc[t] = $urandom_range(4, NC - 5);
      for (int l = 0; l < NL; l++) begin ev_layer.push_back(l); ev_phi.push_back(track_phi(l, tk[t], tc[t])); end
    end
    for (int n = 0; n < nnoise; n++) begin
      ev_layer.push_back($urandom_range(0, NL - 1));
      ev_phi.push_back($urandom_range(0, NC * 256 - 1));
    end
    for (int i = 0; i < ev_layer.size(); i++) draw_model(ev_layer[i], ev_phi[i]);
    for (int d = 0; d < 2; d++) begin got_row[d].delete(); got_col[d].delete(); got_cnt[d].delete(); end
    // send: one cluster per layer per word, in list order
    wi = 0;
    while (wi < ev_layer.size() || !in_eoe) begin
      logic [NL-1:0] used;
      @(negedge clk);
      if (in_valid && !(in_ready[0] && in_ready[1])) begin n_in_stall++; continue; end
      used = '0;
      in_layer_valid = '0;
      while (wi < ev_layer.size() && !used[ev_layer[wi]]) begin
        used[ev_layer[wi]] = 1'b1;
        in_layer_valid[ev_layer[wi]] = 1'b1;
        in_phi[ev_layer[wi]] = phi_t'(ev_phi[wi]);
        wi++;
      end
      in_eoe = (wi == ev_layer.size());
      in_valid = 1;
      // both designs accept in the same cycle (both are in their load state)
      @(posedge clk);
      check(in_ready[0] && in_ready[1], "input not accepted");
    end
    // An empty word right behind the end of the event: it has to wait until
    // both designs are back in their load state.
    @(negedge clk);
    in_eoe = 0; in_layer_valid = '0;
    while (!(in_ready[0] && in_ready[1])) begin n_in_stall++; @(negedge clk); end
    @(negedge clk) in_valid = 0;
    begin
      while (ndone[0] == d0 || ndone[1] == d1) @(posedge clk);
      check(ndone[0] == d0 + 1 && ndone[1] == d1 + 1, "one event_done per event");
    end
    // compare with the model
    for (int d = 0; d < 2; d++) begin
      int e;
      e = 0;
      for (int k = 0; k < NR; k++) begin
        int in_row;
        in_row = 0;
        for (int c = 0; c < NC; c++) begin
          int n;
          n = 0;
          for (int l = 0; l < NL; l++) n += model[d][l][k][c];
          if (n >= TH) begin
            in_row++;
            if (e < got_row[d].size())
              check(got_row[d][e] == k && got_col[d][e] == c && got_cnt[d][e] == n,
                    $sformatf("d%0d cand %0d got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", d, e,
                              got_row[d][e], got_col[d][e], got_cnt[d][e], k, c, n));
            e++;
          end
        end
        if (in_row > 1) n_multi_row++;
      end
      check(e == got_row[d].size(), $sformatf("d%0d: %0d candidates, expected %0d", d, got_row[d].size(), e));
      check(int'(event_ncand[d]) == e, "event_ncand");
      for (int t = 0; t < ntracks; t++) begin
        bit found;
        found = 0;
        for (int i = 0; i < got_row[d].size(); i++)
          if (got_row[d][i] == tk[t] && got_col[d][i] == tc[t]) found = 1;
        check(found, $sformatf("d%0d: track (%0d,%0d) not found", d, tk[t], tc[t]));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_event(1, 0);
    run_event(1, 10);
    run_event(2, 20);
    run_event(0, 30);
    run_event(2, 5);
    $display("input stalls %0d, back-pressure %0d, multi-candidate rows %0d", n_in_stall, n_backpressure, n_multi_row);
    check(n_in_stall > 0, "input stall never happened");
    check(n_backpressure > 0, "back-pressure never happened");
    check(n_multi_row > 0, "no row with several candidates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
