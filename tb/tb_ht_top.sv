// tb_ht_top: runs one event through each of the two track finders in the
// top, both at their default sizes. The Flexible HT gets one track through
// its 8 layers plus noise; the Low-Resources HT gets one track through its 5
// layers plus noise. For each, the testbench builds the accumulator from its
// own reference arithmetic, and checks the number of candidates, that the
// track's bin is among them, and (Flexible HT) that all 8 track clusters are
// recovered for that bin.
module tb_ht_top;
  import ht_pkg::*;
  import tb_ht_ref::*;
  localparam int NL = 8, NR = 216, NC = 32, TH = 7;
  localparam int LNL = 5, LNC = 64, LTH = 4, NSUB = 4;
  localparam int RADII [NL]   = '{400, 410, 560, 570, 760, 770, 1000, 1010};
  localparam int LRADII [LNL] = '{291, 405, 562, 762, 1000};
  localparam int K0 = 90, C0 = 12, LK0 = 130, LC0 = 40, NNOISE = 6;

  logic clk_in = 0, clk = 0, rst_in_n = 0, rst_n = 0;
  always #7 clk_in = ~clk_in;
  always #3 clk = ~clk;

  logic flex_in_valid = 0, flex_in_ready, flex_in_eoe = 0;
  logic [NL-1:0] flex_in_layer_valid = '0;
  cluster_t [NL-1:0] flex_in_cluster = '0;
  logic flex_out_valid, flex_out_ready = 1, flex_out_last, flex_event_done, flex_event_overflow;
  logic [$clog2(NR)-1:0] flex_out_row;
  logic [$clog2(NC)-1:0] flex_out_col;
  logic [$clog2(N_CLUST)-1:0] flex_out_index;
  logic [NL-1:0] flex_out_hit;
  cluster_t [NL-1:0] flex_out_cluster;
  logic [15:0] flex_event_ncand;

  logic lr_in_valid = 0, lr_in_ready, lr_in_eoe = 0;
  logic [LNL-1:0] lr_in_layer_valid = '0;
  phi_t [LNL-1:0] lr_in_phi = '0;
  logic lr_cand_valid, lr_cand_ready = 1, lr_event_done;
  logic [$clog2(NR)-1:0] lr_cand_row;
  logic [$clog2(LNC)-1:0] lr_cand_col;
  logic [$clog2(LNL+1)-1:0] lr_cand_count;
  logic [15:0] lr_event_ncand;

  ht_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int track_phi(int r, int k0, int c0, int ncols);
    real q;
    q = -3.0e-4 + (k0 + 0.5) * 6.0e-4 / NR;
    return int'(((c0 + 0.5) - r * q * (ncols / 0.2)) * 256.0);
  endfunction

  // event contents: word 0 = the track, words 1..NNOISE = noise
  int fr [NNOISE+1][NL], fp [NNOISE+1][NL], lp [NNOISE+1][LNL];
  int flex_exp = 0, lr_exp = 0;

  task automatic build_and_expect();
    logic [NL-1:0][NR-1:0][NC-1:0]   acc;
    logic [LNL-1:0][NR-1:0][LNC-1:0] lacc;
    acc = '0; lacc = '0;
    for (int w = 0; w <= NNOISE; w++) begin
      for (int l = 0; l < NL; l++) begin
        fr[w][l] = RADII[l];
        fp[w][l] = (w == 0) ? track_phi(RADII[l], K0, C0, NC) : $urandom_range(0, NC * 256 - 1);
        for (int k = 0; k < NR; k++) begin
          longint lo, hi;
          row_range(fp[w][l], fr[w][l], k, NR, NC, lo, hi);
          for (int c = 0; c < NC; c++) if (c >= lo && c <= hi) acc[l][k][c] = 1'b1;
        end
      end
      for (int l = 0; l < LNL; l++) begin
        int col, s;
        lp[w][l] = (w == 0) ? track_phi(LRADII[l], LK0, LC0, LNC) : $urandom_range(0, LNC * 256 - 1);
        col = lp[w][l] >>> 8;
        s   = ((lp[w][l] - col * 256) * NSUB) / 256;
        for (int k = 0; k < NR; k++) begin
          longint lo, hi;
          lr_range(s, NSUB, k, NR, LNC, LRADII[l], LRADII[l], lo, hi);
          for (int c = 0; c < LNC; c++) if (c >= col + lo && c <= col + hi) lacc[l][k][c] = 1'b1;
        end
      end
    end
    for (int k = 0; k < NR; k++) begin
      for (int c = 0; c < NC; c++) begin
        int n;
        n = 0;
        for (int l = 0; l < NL; l++) n += acc[l][k][c];
        if (n >= TH) flex_exp++;
      end
      for (int c = 0; c < LNC; c++) begin
        int n;
        n = 0;
        for (int l = 0; l < LNL; l++) n += lacc[l][k][c];
        if (n >= LTH) lr_exp++;
      end
    end
  endtask

  // monitors
  bit flex_found = 0, lr_found = 0, flex_done = 0, lr_done = 0;
  int flex_track_hits = 0;
  always @(posedge clk) if (rst_n) begin
    if (flex_out_valid && flex_out_ready && flex_out_row == K0 && flex_out_col == C0) begin
      flex_found = 1;
      if (flex_out_index == 0) flex_track_hits = $countones(flex_out_hit);
    end
    if (lr_cand_valid && lr_cand_ready && lr_cand_row == LK0 && lr_cand_col == LC0) begin
      lr_found = 1;
      check(lr_cand_count == LNL, "LR track bin count");
    end
    if (flex_event_done) begin
      flex_done = 1;
      check(int'(flex_event_ncand) == flex_exp, $sformatf("flex candidates %0d exp %0d", flex_event_ncand, flex_exp));
      check(!flex_event_overflow, "flex overflow");
    end
    if (lr_event_done) begin
      lr_done = 1;
      check(int'(lr_event_ncand) == lr_exp, $sformatf("lr candidates %0d exp %0d", lr_event_ncand, lr_exp));
    end
  end

  initial begin
    build_and_expect();
    repeat (3) @(posedge clk_in);
    rst_in_n = 1; rst_n = 1;
    fork
      for (int w = 0; w <= NNOISE; w++) begin
        @(negedge clk_in);
        flex_in_valid = 1; flex_in_eoe = (w == NNOISE); flex_in_layer_valid = '1;
        for (int l = 0; l < NL; l++) flex_in_cluster[l] = '{r: r_t'(fr[w][l]), phi: phi_t'(fp[w][l])};
        @(posedge clk_in);
        while (!flex_in_ready) @(posedge clk_in);
        if (w == NNOISE) @(negedge clk_in) flex_in_valid = 0;
      end
      for (int w = 0; w <= NNOISE; w++) begin
        @(negedge clk);
        lr_in_valid = 1; lr_in_eoe = (w == NNOISE); lr_in_layer_valid = '1;
        for (int l = 0; l < LNL; l++) lr_in_phi[l] = phi_t'(lp[w][l]);
        @(posedge clk);
        while (!lr_in_ready) @(posedge clk);
        if (w == NNOISE) @(negedge clk) lr_in_valid = 0;
      end
    join
    while (!(flex_done && lr_done)) @(posedge clk);
    check(flex_found, "flex track bin not found");
    check(flex_track_hits == NL, $sformatf("flex track clusters recovered: %0d", flex_track_hits));
    check(lr_found, "LR track bin not found");
    $display("flex candidates %0d, LR candidates %0d", flex_exp, lr_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
