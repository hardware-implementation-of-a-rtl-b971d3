// dt_leaf_logic: second stage of the decision tree classifier.
//
// Each leaf of the tree is reached by exactly one root-to-leaf path, i.e. one
// conjunction of split results (split_a = 0 & split_b = 1 & ...). This stage
// evaluates the conjunction of every leaf in parallel from the registered
// split bits of the comparator bank. Because the paths are mutually
// exclusive, exactly one leaf is hit; the object class is the class of that
// leaf, formed as the OR of the hits of all class-1 leaves. The class is
// registered: one clock cycle from in_valid to out_valid, one result per
// clock.
//
// Interface: split[i] from dt_comparator_bank; obj_class is 1 for "object
// present" (e.g. human silhouette). leaf_hit is the one-hot leaf vector (not
// registered, for observation). The valid flag and reset are this design's
// own choice.
module dt_leaf_logic
  import dt_pkg::*;
#(
  parameter int    NUM_SPLITS = dt_pkg::DEF_TREE_SPLITS,
  parameter tree_t TREE       = dt_pkg::synth_tree(NUM_SPLITS, dt_pkg::DEF_TREE_DEPTH, 1),
  localparam int   NUM_LEAVES = NUM_SPLITS + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [NUM_SPLITS-1:0] split,
  output logic                  out_valid,
  output logic                  obj_class,
  output logic [NUM_LEAVES-1:0] leaf_hit
);

  for (genvar j = 0; j < NUM_LEAVES; j++) begin : g_leaf
    localparam logic [NUM_SPLITS-1:0] MASK = TREE.leaf_mask[j][NUM_SPLITS-1:0];
    localparam logic [NUM_SPLITS-1:0] VAL  = TREE.leaf_val[j][NUM_SPLITS-1:0];
    // all splits on the path have the value that leads to this leaf
    assign leaf_hit[j] = ((split ^ VAL) & MASK) == '0;
  end

  localparam logic [NUM_LEAVES-1:0] CLASS1 = TREE.leaf_class[NUM_LEAVES-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) obj_class <= |(leaf_hit & CLASS1);
  end

  // The root-to-leaf paths are exclusive: exactly one leaf is hit.
  a_one_leaf: assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid |-> $onehot(leaf_hit));

endmodule
