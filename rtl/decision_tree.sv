// decision_tree: two-stage pipelined decision tree classifier.
//
// Stage 1 (dt_comparator_bank) performs every split comparison of the tree
// at once; stage 2 (dt_leaf_logic) checks the root-to-leaf path of every
// leaf and outputs the class of the one leaf that is reached. Each stage
// takes one clock cycle, so a descriptor presented with in_valid yields
// obj_class with out_valid two cycles later, and a new descriptor can be
// accepted on every clock. The register count is NUM_SPLITS split bits plus
// one class bit (plus two valid bits added by this design).
//
// The tree (split features, thresholds, leaf paths and classes) is the TREE
// parameter, normally produced from a trained model; the default is the
// stand-in tree of dt_pkg::synth_tree with the size of the 20-level tree
// (83 splits, 84 leaves). TREE_DEPTH and TREE_SEED only shape that default.
module decision_tree
  import dt_pkg::*;
#(
  parameter int    N_FEATURES = dt_pkg::NUM_FEATURES,
  parameter int    NUM_SPLITS   = dt_pkg::DEF_TREE_SPLITS,
  parameter int    TREE_DEPTH   = dt_pkg::DEF_TREE_DEPTH,
  parameter int    TREE_SEED    = 1,
  parameter tree_t TREE         = dt_pkg::synth_tree(NUM_SPLITS, TREE_DEPTH, TREE_SEED),
  localparam int   NUM_LEAVES   = NUM_SPLITS + 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  logic [N_FEATURES-1:0][FEAT_W-1:0] features,
  output logic                                out_valid,
  output logic                                obj_class,
  output logic [NUM_LEAVES-1:0]               leaf_hit
);

  logic                  split_valid;
  logic [NUM_SPLITS-1:0] split;

  dt_comparator_bank #(
    .N_FEATURES (N_FEATURES),
    .NUM_SPLITS   (NUM_SPLITS),
    .TREE         (TREE)
  ) u_cmp (
    .clk, .rst_n,
    .in_valid  (in_valid),
    .features  (features),
    .out_valid (split_valid),
    .split     (split)
  );

  dt_leaf_logic #(
    .NUM_SPLITS (NUM_SPLITS),
    .TREE       (TREE)
  ) u_leaf (
    .clk, .rst_n,
    .in_valid  (split_valid),
    .split     (split),
    .out_valid (out_valid),
    .obj_class (obj_class),
    .leaf_hit  (leaf_hit)
  );

endmodule
