// tb_dt_leaf_logic: feeds random split vectors to the leaf stage and
// compares the class with a node-by-node walk of the tree (the way software
// evaluates it), checks that exactly the walked-to leaf is hit, and checks
// the one-cycle latency.
module tb_dt_leaf_logic;
  import dt_pkg::*;
  localparam int NS = DEF_TREE_SPLITS;
  localparam int NL = NS + 1;
  localparam tree_t T = synth_tree(NS, DEF_TREE_DEPTH, 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid, obj_class;
  logic [NS-1:0] split;
  logic [NL-1:0] leaf_hit;
  int checks = 0, failures = 0;

  dt_leaf_logic dut (.clk, .rst_n, .in_valid, .split, .out_valid, .obj_class, .leaf_hit);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // walk from the root: split bit 0 -> left child, 1 -> right child
  function automatic int walk(logic [NS-1:0] s);
    int n = 0;
    logic [CHILD_W-1:0] c;
    for (int d = 0; d < 64; d++) begin
      c = s[n] ? T.right[n] : T.left[n];
      if (c[CHILD_W-1]) return int'(c[7:0]);
      n = int'(c[7:0]);
    end
    return -1;
  endfunction

  int exp_q [$];
  int seen0 = 0, seen1 = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (obj_class !== e[0]) begin
        failures++;
        $display("class mismatch: got %0d exp %0d", obj_class, e);
      end
      if (obj_class) seen1++; else seen0++;
    end
  end

  initial begin
    split = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      int lf;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < NS; i++) split[i] = 1'($urandom);
      #1;
      lf = walk(split);
      checks++;
      if (leaf_hit !== (NL'(1) << lf)) begin
        failures++;
        $display("leaf_hit %h, walk reached leaf %0d", leaf_hit, lf);
      end
      if (in_valid) exp_q.push_back(int'(T.leaf_class[lf]));
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || seen0 == 0 || seen1 == 0) begin
      failures++;
      $display("missing results or one class never produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
