// dt_pkg: types, sizes and elaboration-time helper functions shared by the
// ULBP descriptor pipeline and the decision tree classifier.
//
// Sizes follow the detection set-up the design was made for: a 96x160 pixel
// detection window split into a 6x10 grid of 16x16 pixel cells, 59 uniform
// LBP bins per cell, 8-bit histogram bins as features (60*59 = 3540 features).
//
// The decision tree itself is a trained model and is therefore a parameter
// (tree_t). A tree is described twice over in tree_t: as nodes (feature,
// threshold, left and right child) for reference models, and as one path per
// leaf (which splits lie on the path and which value each must have) for the
// hardware. synth_tree() builds a deterministic stand-in tree of a given
// number of splits and depth, so the RTL elaborates without a trained model;
// a trained tree is dropped in by passing another tree_t value.
package dt_pkg;

  // Image / descriptor geometry
  localparam int PIX_W        = 8;
  localparam int WIN_W        = 96;    // detection window width  (pixels)
  localparam int WIN_H        = 160;   // detection window height (pixels)
  localparam int CELL_SIZE    = 16;    // cell edge (pixels)
  localparam int CELLS_X      = WIN_W / CELL_SIZE;   // 6
  localparam int CELLS_Y      = WIN_H / CELL_SIZE;   // 10
  localparam int NUM_CELLS    = CELLS_X * CELLS_Y;   // 60
  localparam int NUM_BINS     = 59;                  // 58 uniform + 1 other
  localparam int FEAT_W       = 8;                   // histogram bin width
  localparam int NUM_FEATURES = NUM_CELLS * NUM_BINS; // 3540
  localparam int FEAT_IDX_W   = 12;
  localparam int BIN_W        = 6;

  // Tree table capacity (the largest tree evaluated has 83 splits)
  localparam int MAX_SPLITS   = 128;
  localparam int MAX_LEAVES   = MAX_SPLITS + 1;
  localparam int CHILD_W      = 9;     // {is_leaf, index[7:0]}

  // Default tree: the 20-level tree with 83 splits and 84 leaves
  localparam int DEF_TREE_DEPTH  = 20;
  localparam int DEF_TREE_SPLITS = 83;

  typedef logic [NUM_FEATURES-1:0][FEAT_W-1:0] descriptor_t;

  typedef struct packed {
    logic [MAX_SPLITS-1:0][FEAT_IDX_W-1:0] feat;      // feature tested by split i
    logic [MAX_SPLITS-1:0][FEAT_W-1:0]     thr;       // split i is 1 when feature > thr
    logic [MAX_SPLITS-1:0][CHILD_W-1:0]    left;      // child taken when split i is 0
    logic [MAX_SPLITS-1:0][CHILD_W-1:0]    right;     // child taken when split i is 1
    logic [MAX_LEAVES-1:0][MAX_SPLITS-1:0] leaf_mask; // splits on the path to leaf j
    logic [MAX_LEAVES-1:0][MAX_SPLITS-1:0] leaf_val;  // value each of them must have
    logic [MAX_LEAVES-1:0]                 leaf_class;
  } tree_t;

  // Number of 0/1 changes around the circular 8-bit pattern
  function automatic int lbp_transitions(input logic [7:0] v);
    int n = 0;
    for (int b = 0; b < 8; b++)
      if (v[b] != v[(b + 1) % 8]) n++;
    return n;
  endfunction

  // Bin table of the uniform LBP mapping: the 58 patterns with at most two
  // transitions get bins 0..57 in ascending order of value, all other
  // patterns share bin 58.
  function automatic logic [255:0][BIN_W-1:0] build_ulbp_lut();
    logic [255:0][BIN_W-1:0] lut;
    int rank = 0;
    for (int v = 0; v < 256; v++) begin
      if (lbp_transitions(v[7:0]) <= 2) begin
        lut[v] = BIN_W'(rank);
        rank++;
      end else begin
        lut[v] = BIN_W'(NUM_BINS - 1);
      end
    end
    return lut;
  endfunction

  // Deterministic stand-in tree with num_splits splits and depth levels of
  // splits. Split k < depth forms a chain so that the depth is reached; the
  // remaining splits fill the shallowest free child slots breadth first.
  // Features and thresholds come from a 32-bit LCG started at seed. Leaves
  // are numbered in node order (left slot before right slot); leaf classes
  // alternate 0/1 in that order.
  function automatic tree_t synth_tree(input int num_splits, input int depth,
                                       input int seed);
    tree_t t;
    int ndepth [MAX_SPLITS];
    int parent [MAX_SPLITS];
    int pside  [MAX_SPLITS];
    logic [MAX_SPLITS-1:0] used_l, used_r;
    logic [31:0] rng;
    int nleaf;
    t = '0;
    used_l = '0;
    used_r = '0;
    rng = 32'(seed) ^ 32'h2545_F491;
    for (int i = 0; i < MAX_SPLITS; i++) begin
      ndepth[i] = 0; parent[i] = -1; pside[i] = 0;
    end
    for (int k = 0; k < num_splits; k++) begin
      if (k > 0) begin
        int p; int s; int best;
        p = -1; s = 0; best = depth;
        if (k < depth) begin
          p = k - 1; s = k % 2;
        end else begin
          for (int i = 0; i < k; i++) begin
            if (ndepth[i] + 1 < best && !used_l[i]) begin p = i; s = 0; best = ndepth[i] + 1; end
            if (ndepth[i] + 1 < best && !used_r[i]) begin p = i; s = 1; best = ndepth[i] + 1; end
          end
        end
        if (p >= 0) begin
          parent[k] = p; pside[k] = s; ndepth[k] = ndepth[p] + 1;
          if (s == 0) begin used_l[p] = 1'b1; t.left[p]  = CHILD_W'(k); end
          else        begin used_r[p] = 1'b1; t.right[p] = CHILD_W'(k); end
        end
      end
      rng = rng * 32'd1664525 + 32'd1013904223;
      t.feat[k] = FEAT_IDX_W'((rng >> 8) % NUM_FEATURES);
      rng = rng * 32'd1664525 + 32'd1013904223;
      t.thr[k]  = FEAT_W'((rng >> 8) % 24);
    end
    nleaf = 0;
    for (int i = 0; i < num_splits; i++) begin
      for (int s = 0; s < 2; s++) begin
        if ((s == 0 && !used_l[i]) || (s == 1 && !used_r[i])) begin
          int n; int side;
          if (s == 0) t.left[i]  = {1'b1, 8'(nleaf)};
          else        t.right[i] = {1'b1, 8'(nleaf)};
          n = i; side = s;
          while (n >= 0) begin
            t.leaf_mask[nleaf][n] = 1'b1;
            t.leaf_val[nleaf][n]  = side[0];
            side = pside[n];
            n = parent[n];
          end
          t.leaf_class[nleaf] = nleaf[0];
          nleaf++;
        end
      end
    end
    return t;
  endfunction

endpackage
