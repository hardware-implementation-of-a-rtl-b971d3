// tb_decision_tree: runs the two-stage classifier with the five tree sizes
// evaluated for the design (depth 5/7/10/15/20 with 30/54/65/77/83 splits)
// side by side on the same random descriptors. Every result is compared with
// a node-by-node walk of the same tree; the latency must be exactly two
// cycles and a result must come out for every descriptor, back to back.
module tb_decision_tree;
  import dt_pkg::*;

  localparam int NCFG = 5;
  localparam int DEPTHS [NCFG] = '{5, 7, 10, 15, 20};
  localparam int SPLITS [NCFG] = '{30, 54, 65, 77, 83};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  descriptor_t features;
  int cycle = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int done_cnt [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NS = SPLITS[g];
    localparam tree_t T = synth_tree(NS, DEPTHS[g], 1);
    logic out_valid, obj_class;
    logic [NS:0] leaf_hit;
    int exp_q [$];
    int cyc_q [$];
    int ones = 0, zeros = 0;

    decision_tree #(.NUM_SPLITS(NS), .TREE_DEPTH(DEPTHS[g])) dut (
      .clk, .rst_n, .in_valid, .features, .out_valid, .obj_class, .leaf_hit);

    function automatic int walk(descriptor_t f);
      int n = 0;
      logic [CHILD_W-1:0] c;
      for (int d = 0; d < 64; d++) begin
        c = (int'(f[T.feat[n]]) > int'(T.thr[n])) ? T.right[n] : T.left[n];
        if (c[CHILD_W-1]) return int'(T.leaf_class[c[7:0]]);
        n = int'(c[7:0]);
      end
      return -1;
    endfunction

    // the tree reaches its depth: some leaf path has DEPTH splits
    initial begin
      int maxd;
      maxd = 0;
      for (int j = 0; j <= NS; j++)
        if ($countones(T.leaf_mask[j]) > maxd) maxd = $countones(T.leaf_mask[j]);
      checks++;
      if (maxd != DEPTHS[g]) begin
        failures++;
        $display("cfg %0d: depth %0d", g, maxd);
      end
    end

    always @(posedge clk) begin
      if (rst_n && in_valid) begin
        exp_q.push_back(walk(features));
        cyc_q.push_back(cycle);
      end
      if (rst_n && out_valid) begin
        int e, c;
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        checks++;
        if (obj_class !== e[0] || cycle - c != 2) begin
          failures++;
          $display("cfg %0d: class %0d exp %0d, latency %0d", g, obj_class, e, cycle - c);
        end
        if (obj_class) ones++; else zeros++;
        done_cnt[g]++;
      end
    end
  end

  int sent = 0;

  initial begin
    for (int g = 0; g < NCFG; g++) done_cnt[g] = 0;
    features = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = (n < 100) ? 1'b1 : ($urandom_range(0, 2) != 0);
      for (int i = 0; i < NUM_FEATURES; i++) features[i] = 8'($urandom_range(0, 30));
      if (in_valid) sent++;
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      checks++;
      if (done_cnt[g] != sent) begin
        failures++;
        $display("cfg %0d: %0d results for %0d descriptors", g, done_cnt[g], sent);
      end
    end
    checks++;
    if (g_cfg[4].ones == 0 || g_cfg[4].zeros == 0) begin
      failures++;
      $display("default tree produced only one class");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
