// tb_lbp_window: streams random 10x7 images (with idle cycles) through the
// 3x3 window generator and checks that each valid window is the exact
// neighbourhood of its reported centre, one cycle after the pixel that
// completes it, that every interior pixel gets exactly one window and that
// border pixels get none.
module tb_lbp_window;
  localparam int W = 10, H = 7;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, frame_start = 0, frame_end = 0;
  logic [7:0] pix = 0;
  logic [2:0] pix_row = 0;
  logic [3:0] pix_col = 0;
  logic win_valid, fs_o, fe_o;
  logic [2:0][2:0][7:0] win;
  logic [2:0] ctr_row;
  logic [3:0] ctr_col;
  int checks = 0, failures = 0;

  lbp_window #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .pix_valid, .pix, .pix_row, .pix_col, .frame_start, .frame_end,
    .win_valid, .win, .ctr_row, .ctr_col, .frame_start_o (fs_o), .frame_end_o (fe_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [H][W];
  int seen [H][W];
  int nwin = 0, prev_valid_pix = 0, nstart = 0, nend = 0;
  int prev_r, prev_c;

  always @(posedge clk) begin
    if (rst_n && win_valid) begin
      int r, c;
      bit ok;
      r = int'(ctr_row); c = int'(ctr_col);
      nwin++;
      ok = (r >= 1 && r <= H - 2 && c >= 1 && c <= W - 2);
      // the window must follow the pixel at (r+1, c+1) by one cycle
      ok = ok && prev_valid_pix && prev_r == r + 1 && prev_c == c + 1;
      if (ok) begin
        seen[r][c]++;
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++)
            if (win[i][j] != img[r - 1 + i][c - 1 + j]) ok = 0;
      end
      checks++;
      if (!ok) begin failures++; $display("bad window at r%0d c%0d", r, c); end
    end
    if (rst_n && fs_o) nstart++;
    if (rst_n && fe_o) nend++;
    prev_valid_pix <= pix_valid;
    prev_r <= int'(pix_row);
    prev_c <= int'(pix_col);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        img[r][c] = 8'($urandom);
        seen[r][c] = 0;
      end
      nwin = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          if ($urandom_range(0, 3) == 0) begin pix_valid = 0; @(negedge clk); end
          pix_valid = 1; pix = img[r][c];
          pix_row = 3'(r); pix_col = 4'(c);
          frame_start = (r == 0 && c == 0);
          frame_end = (r == H - 1 && c == W - 1);
        end
      @(negedge clk) begin pix_valid = 0; frame_start = 0; frame_end = 0; end
      repeat (3) @(posedge clk);
      checks++;
      if (nwin != (H - 2) * (W - 2)) begin failures++; $display("%0d windows", nwin); end
      for (int r = 1; r < H - 1; r++) for (int c = 1; c < W - 1; c++) begin
        checks++;
        if (seen[r][c] != 1) begin failures++; $display("centre r%0d c%0d seen %0d", r, c, seen[r][c]); end
      end
    end
    checks++;
    if (nstart != 3 || nend != 3) begin failures++; $display("markers %0d %0d", nstart, nend); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
