// dt_comparator_bank: first stage of the decision tree classifier.
//
// Every split of the tree is one comparator "feature > threshold", and all
// NUM_SPLITS comparators work in parallel on the same descriptor, whatever
// path the tree would take in software. Each comparator's feature index and
// threshold are fixed at elaboration by the TREE parameter, so a comparator
// is a constant-select of one 8-bit feature and a compare against a constant.
// The split bits are registered: one clock cycle from in_valid to out_valid,
// one result per clock.
//
// Interface: features is the whole concatenated histogram descriptor;
// split[i] is 1 when features[TREE.feat[i]] > TREE.thr[i] (the comparator
// sense of the original architecture). The valid flag is this design's own
// addition, as is the synchronous active-low reset (which clears only valid).
module dt_comparator_bank
  import dt_pkg::*;
#(
  parameter int    N_FEATURES = dt_pkg::NUM_FEATURES,
  parameter int    NUM_SPLITS   = dt_pkg::DEF_TREE_SPLITS,
  parameter tree_t TREE         = dt_pkg::synth_tree(NUM_SPLITS, dt_pkg::DEF_TREE_DEPTH, 1)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic [N_FEATURES-1:0][FEAT_W-1:0]  features,
  output logic                                 out_valid,
  output logic [NUM_SPLITS-1:0]                split
);

  logic [NUM_SPLITS-1:0] cmp;

  for (genvar i = 0; i < NUM_SPLITS; i++) begin : g_cmp
    localparam int FIDX = int'(TREE.feat[i]);
    localparam logic [FEAT_W-1:0] THR = TREE.thr[i];
    assign cmp[i] = features[FIDX] > THR;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) split <= cmp;
  end

endmodule
