// tb_ht_accumulator: ORs random line masks into a small accumulator, layers
// written together and separately, and checks every row read back (one cycle
// after its address) against a model; then checks clear and that clear wins
// over a write in the same cycle.
module tb_ht_accumulator;
  localparam int NL = 3, NR = 12, NC = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                              clear = 0;
  logic [NL-1:0]                     wr_en = '0;
  logic [NL-1:0][NR-1:0][NC-1:0]     wr_mask = '0;
  logic [$clog2(NR)-1:0]             rd_row = '0;
  logic [NL-1:0][NC-1:0]             rd_data;

  ht_accumulator #(.N_LAYERS(NL), .N_ROWS(NR), .N_COLS(NC)) dut (.*);

  logic [NL-1:0][NR-1:0][NC-1:0] model = '0;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int k = 0; k < NR; k++) begin
      @(negedge clk) rd_row = k[$clog2(NR)-1:0];
      @(negedge clk);
      checks++;
      for (int l = 0; l < NL; l++)
        if (rd_data[l] != model[l][k]) begin
          failures++;
          if (failures < 10) $display("FAIL: layer %0d row %0d got %h exp %h", l, k, rd_data[l], model[l][k]);
        end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int n = 0; n < 8; n++) begin
        @(negedge clk);
        for (int l = 0; l < NL; l++) begin
          wr_en[l] = ($urandom_range(0, 2) != 0);
          for (int k = 0; k < NR; k++) wr_mask[l][k] = NC'($urandom) & NC'($urandom);
          if (wr_en[l]) model[l] = model[l] | wr_mask[l];
        end
      end
      @(negedge clk) wr_en = '0;
      read_all();
      // clear, with a write in the same cycle that must be dropped
      @(negedge clk);
      clear = 1; wr_en = '1; wr_mask = '1;
      @(negedge clk);
      clear = 0; wr_en = '0;
      model = '0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
