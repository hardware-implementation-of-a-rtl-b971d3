// tb_cell_histogram: random increments into a small 4-cell x 5-bin histogram
// with 3-bit counters (saturating at 7), compared with a software count.
// Checks the concatenation order (cell*NUM_BINS + bin), saturation,
// desc_valid one cycle after the last increment, that the descriptor is held
// after `clear` until the next frame's first increment, and that this first
// increment starts every counter afresh.
module tb_cell_histogram;
  localparam int NC = 4, NB = 5, CW = 3;

  logic clk = 0, rst_n = 0;
  logic clear = 0, inc_valid = 0, inc_last = 0;
  logic [1:0] inc_cell = 0;
  logic [2:0] inc_bin = 0;
  logic [NC*NB-1:0][CW-1:0] hist;
  logic desc_valid;
  int checks = 0, failures = 0;

  cell_histogram #(.NUM_CELLS(NC), .NUM_BINS(NB), .CNT_W(CW)) dut (
    .clk, .rst_n, .clear, .inc_valid, .inc_cell, .inc_bin, .inc_last, .hist, .desc_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [NC*NB];
  int dv = 0;
  always @(posedge clk) if (rst_n && desc_valid) dv++;

  task automatic compare(string when);
    for (int i = 0; i < NC * NB; i++) begin
      checks++;
      if (int'(hist[i]) != cnt[i]) begin
        failures++;
        $display("%s: feature %0d = %0d exp %0d", when, i, hist[i], cnt[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < NC * NB; i++) cnt[i] = 0;
    @(posedge clk);
    compare("after reset");
    for (int f = 0; f < 4; f++) begin
      int n;
      n = (f == 1) ? 150 : 40;   // frame 1 saturates counters
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      // previous descriptor still visible after clear
      @(posedge clk);
      compare("held after clear");
      for (int i = 0; i < NC * NB; i++) cnt[i] = 0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) begin inc_valid = 0; @(negedge clk); end
        inc_valid = 1;
        inc_cell = 2'($urandom_range(0, NC - 1));
        inc_bin  = 3'($urandom_range(0, NB - 1));
        inc_last = (k == n - 1);
        if (cnt[inc_cell * NB + inc_bin] < (1 << CW) - 1) cnt[inc_cell * NB + inc_bin]++;
      end
      @(negedge clk) begin inc_valid = 0; inc_last = 0; end
      // desc_valid is high in the cycle after the last increment
      checks++;
      if (!desc_valid) begin failures++; $display("desc_valid missing in frame %0d", f); end
      compare("frame end");
      repeat (5) @(posedge clk);
      compare("idle");
    end
    checks++;
    if (dv != 4) begin failures++; $display("desc_valid %0d times", dv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
