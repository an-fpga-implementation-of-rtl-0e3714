// tb_lr_range_sel: sweeps phi over several columns on both sides of the
// region and checks the column (floor of phi in column units) and the
// sub-range (which quarter of the column) against arithmetic on the value.
module tb_lr_range_sel;
  import ht_pkg::*;
  localparam int NSUB = 4;

  phi_t phi;
  logic signed [PHI_W-PHI_FRAC-1:0] col;
  logic [1:0] sub;

  lr_range_sel #(.NSUB(NSUB)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -3 * 256; v < 70 * 256; v += 3) begin
      int ec, es;
      phi = phi_t'(v);
      #1;
      ec = (v >= 0) ? v / 256 : -((-v + 255) / 256);
      es = ((v - ec * 256) * NSUB) / 256;
      checks++;
      if (int'(col) != ec || int'(sub) != es) begin
        failures++;
        if (failures < 10) $display("FAIL: phi %0d col %0d sub %0d exp %0d %0d", v, col, sub, ec, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
