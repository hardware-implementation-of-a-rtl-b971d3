// tb_lbp_descriptor: streams full 96x160 frames of several image kinds
// through the descriptor core and compares all 3540 features with the
// software model. Checks desc_valid three cycles after the frame_end pixel
// and that the descriptor stays unchanged into the next frame until that
// frame's first count arrives.
module tb_lbp_descriptor;
  import dt_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, frame_start = 0, frame_end = 0;
  logic [7:0] pix = 0;
  logic [7:0] pix_row = 0;
  logic [6:0] pix_col = 0;
  descriptor_t desc;
  logic desc_valid;
  int checks = 0, failures = 0;
  int cycle = 0;

  lbp_descriptor dut (.clk, .rst_n, .pix_valid, .pix, .pix_row, .pix_col,
                      .frame_start, .frame_end, .desc, .desc_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tb_ref_pkg::image_t img;
  descriptor_t exp_d;
  int end_cycle, dv_cycle = -1, nframes = 0;

  always @(posedge clk) begin
    if (rst_n && frame_end && pix_valid) end_cycle <= cycle;
    if (rst_n && desc_valid) begin
      dv_cycle = cycle;
      checks++;
      if (desc != exp_d) begin
        failures++;
        for (int i = 0; i < NUM_FEATURES; i++)
          if (desc[i] != exp_d[i]) begin
            $display("feature %0d = %0d exp %0d", i, desc[i], exp_d[i]);
            break;
          end
      end
      checks++;
      if (cycle - end_cycle != 3) begin failures++; $display("latency %0d", cycle - end_cycle); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 5; f++) begin
      descriptor_t prev;
      prev = exp_d;
      tb_ref_pkg::make_image(img, f, 11 * f + 2);
      for (int r = 0; r < WIN_H; r++)
        for (int c = 0; c < WIN_W; c++) begin
          @(negedge clk);
          pix_valid = 1; pix = img[r][c];
          pix_row = 8'(r); pix_col = 7'(c);
          frame_start = (r == 0 && c == 0);
          frame_end = (r == WIN_H - 1 && c == WIN_W - 1);
          // before the first interior count of this frame the old one is kept
          if (f > 0 && r == 2 && c == 1) begin
            checks++;
            if (desc != prev) begin failures++; $display("descriptor not held in frame %0d", f); end
          end
          if (r == 0 && c == 0) exp_d = tb_ref_pkg::ref_desc(img);
        end
      @(negedge clk) begin pix_valid = 0; frame_start = 0; frame_end = 0; end
      repeat (6) @(posedge clk);
      nframes++;
    end
    checks++;
    if (dv_cycle < 0) begin failures++; $display("no descriptor"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
