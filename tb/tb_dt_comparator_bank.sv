// tb_dt_comparator_bank: drives random descriptors into the comparator bank
// (default 83-split tree) and checks every registered split bit against a
// direct feature/threshold comparison, including the one-cycle latency and
// a back-to-back stream of descriptors.
module tb_dt_comparator_bank;
  import dt_pkg::*;
  localparam int NS = DEF_TREE_SPLITS;
  localparam tree_t T = synth_tree(NS, DEF_TREE_DEPTH, 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  descriptor_t features;
  logic [NS-1:0] split;
  int checks = 0, failures = 0;

  dt_comparator_bank dut (.clk, .rst_n, .in_valid, .features, .out_valid, .split);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  descriptor_t sent [$];

  function automatic logic [NS-1:0] ref_split(descriptor_t f);
    logic [NS-1:0] r;
    for (int i = 0; i < NS; i++) r[i] = (int'(f[T.feat[i]]) > int'(T.thr[i]));
    return r;
  endfunction

  // checker: one cycle after each accepted descriptor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      descriptor_t f;
      f = sent.pop_front();
      checks++;
      if (split !== ref_split(f)) begin
        failures++;
        $display("split mismatch: got %h exp %h", split, ref_split(f));
      end
    end
  end

  initial begin
    features = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < NUM_FEATURES; i++)
        features[i] = (n % 4 == 3) ? 8'($urandom) : 8'($urandom_range(0, 30));
      // make some thresholds sit exactly at the boundary
      if (n % 5 == 0)
        for (int i = 0; i < NS; i++) features[T.feat[i]] = T.thr[i] + 8'(n % 2);
      if (in_valid) sent.push_back(features);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    if (sent.size() != 0) begin failures++; $display("results missing"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
