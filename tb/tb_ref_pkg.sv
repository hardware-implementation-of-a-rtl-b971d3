// tb_ref_pkg: software reference models used by the testbenches.
//
// ref_bin    uniform-LBP bin of an 8-bit pattern, from an explicit list of
//            the uniform patterns (all-zero, all-one, and every rotation of
//            a run of 1..7 ones), sorted by value; other patterns -> 58.
// ref_lbp    LBP of pixel (r, c) of an image, neighbours numbered clockwise
//            from the top-left, neighbour 1 in the MSB, bit = !(nb > centre).
// ref_desc   descriptor of a whole 96x160 image: every interior pixel counts
//            in its 16x16 cell, counters saturate at 255.
// ref_class  class reached by walking a tree node by node from the root.
package tb_ref_pkg;
  import dt_pkg::*;

  typedef logic [7:0] image_t [WIN_H][WIN_W];

  function automatic int ref_bin(logic [7:0] code);
    logic [7:0] u [$];
    logic [7:0] run, rot;
    u.push_back(8'h00);
    u.push_back(8'hFF);
    for (int k = 1; k < 8; k++) begin
      run = 8'((1 << k) - 1);
      for (int r = 0; r < 8; r++) begin
        rot = (run << r) | (run >> (8 - r));
        u.push_back(rot);
      end
    end
    u.sort();
    u = u.unique();
    if (u.size() != 58) return -1;
    foreach (u[i]) if (u[i] == code) return i;
    return 58;
  endfunction

  function automatic logic [7:0] ref_lbp(const ref image_t img, int r, int c);
    int dr [8] = '{-1, -1, -1, 0, 1, 1, 1, 0};
    int dc [8] = '{-1, 0, 1, 1, 1, 0, -1, -1};
    logic [7:0] code;
    for (int k = 0; k < 8; k++)
      code[7 - k] = (img[r + dr[k]][c + dc[k]] > img[r][c]) ? 1'b0 : 1'b1;
    return code;
  endfunction

  function automatic descriptor_t ref_desc(const ref image_t img);
    descriptor_t d;
    int lut [256];
    for (int v = 0; v < 256; v++) lut[v] = ref_bin(8'(v));
    d = '0;
    for (int r = 1; r < WIN_H - 1; r++)
      for (int c = 1; c < WIN_W - 1; c++) begin
        int f;
        f = ((r / CELL_SIZE) * CELLS_X + c / CELL_SIZE) * NUM_BINS + lut[ref_lbp(img, r, c)];
        if (d[f] != 8'hFF) d[f] = d[f] + 8'd1;
      end
    return d;
  endfunction

  function automatic int ref_class(input tree_t t, input descriptor_t f);
    int n = 0;
    logic [CHILD_W-1:0] c;
    for (int d = 0; d < 200; d++) begin
      c = (int'(f[t.feat[n]]) > int'(t.thr[n])) ? t.right[n] : t.left[n];
      if (c[CHILD_W-1]) return int'(t.leaf_class[c[7:0]]);
      n = int'(c[7:0]);
    end
    return -1;
  endfunction

  // Test image generator: kind 0 smooth gradient, 1 noise, 2 blocks,
  // 3 gradient with noise, 4 dark frame with bright blob
  function automatic void make_image(ref image_t img, input int kind, input int seed);
    int s;
    s = seed;
    for (int r = 0; r < WIN_H; r++)
      for (int c = 0; c < WIN_W; c++) begin
        s = s * 1103515245 + 12345;
        case (kind % 5)
          0: img[r][c] = 8'(r + 2 * c + seed);
          1: img[r][c] = 8'(s >>> 16);
          2: img[r][c] = 8'((((r / (4 + seed % 5)) + (c / (3 + seed % 7))) % 2) * 120 + (s >>> 28));
          3: img[r][c] = 8'(r * (seed % 3) + c + ((s >>> 16) & 3));
          default: img[r][c] = ((r - 80) * (r - 80) + (c - 48) * (c - 48) < 900 + seed * 37)
                               ? 8'(200 + ((s >>> 16) & 7)) : 8'(10 + ((s >>> 16) & 1));
        endcase
      end
  endfunction

endpackage
