// tb_lbp_ctrl: checks frame admission and pixel tagging of the LBP control
// logic on a small 8x5 window: a frame sent while disabled is ignored; an
// enabled frame yields every pixel once with its row and column one cycle
// later, frame_start on (0,0) and frame_end on the last pixel; a line with a
// misplaced tlast and a start of frame inside a frame count framing errors
// and abort the frame; idle cycles inside a frame are tolerated.
module tb_lbp_ctrl;
  localparam int W = 8, H = 5;

  logic clk = 0, rst_n = 0, enable = 0;
  logic [7:0] tdata = 0;
  logic tvalid = 0, tready, tuser = 0, tlast = 0;
  logic pix_valid, frame_start, frame_end;
  logic [7:0] pix;
  logic [2:0] pix_row, pix_col;
  logic [31:0] frames_done, frame_errors;
  int checks = 0, failures = 0;

  lbp_ctrl #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .enable,
    .s_axis_tdata (tdata), .s_axis_tvalid (tvalid), .s_axis_tready (tready),
    .s_axis_tuser (tuser), .s_axis_tlast (tlast),
    .pix_valid, .pix, .pix_row, .pix_col, .frame_start, .frame_end,
    .frames_done, .frame_errors);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected output stream: {start, end, row, col, data}
  typedef struct { bit s; bit e; int r; int c; logic [7:0] d; } exp_t;
  exp_t exp_q [$];
  int outs = 0;

  always @(posedge clk) begin
    if (rst_n && pix_valid) begin
      exp_t x;
      outs++;
      if (exp_q.size() == 0) check(0, "unexpected pixel");
      else begin
        x = exp_q.pop_front();
        check(pix == x.d && int'(pix_row) == x.r && int'(pix_col) == x.c &&
              frame_start == x.s && frame_end == x.e,
              $sformatf("pixel r%0d c%0d d%0h exp r%0d c%0d d%0h", pix_row, pix_col, pix, x.r, x.c, x.d));
      end
    end else if (rst_n) begin
      check(!frame_start && !frame_end, "frame marker without pixel");
    end
    if (rst_n) check(tready, "tready low");
  end

  // send a frame; bad_row ends that row one pixel early; expect: admitted
  task automatic send(int bad_row, bit admitted, bit gaps, int stop_row);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        if (r == stop_row) return;
        @(negedge clk);
        if (gaps && (r + c) % 3 == 0) begin tvalid = 0; @(negedge clk); end
        tvalid = 1;
        tdata = 8'(r * 16 + c);
        tuser = (r == 0 && c == 0);
        tlast = (c == W - 1) || (r == bad_row && c == W - 2);
        if (admitted && (bad_row < 0 || r < bad_row || (r == bad_row && c < W - 2)))
          exp_q.push_back('{(r == 0 && c == 0), (r == H - 1 && c == W - 1), r, c, tdata});
        if (r == bad_row && c == W - 2) begin
          @(negedge clk); tvalid = 0; tuser = 0; tlast = 0;
          // rest of the frame is ignored until the next start of frame
          @(negedge clk); tvalid = 1; tdata = 8'hAA; tuser = 0; tlast = 0;
          @(negedge clk); tvalid = 0;
          return;
        end
      end
    @(negedge clk) begin tvalid = 0; tuser = 0; tlast = 0; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    send(-1, 0, 0, -1);                       // disabled: ignored
    repeat (3) @(posedge clk);
    check(frames_done == 0, "frame counted while disabled");
    @(negedge clk) enable = 1;
    send(-1, 1, 0, -1);                       // good frame
    send(-1, 1, 1, -1);                       // good frame with idle cycles
    repeat (3) @(posedge clk);
    check(frames_done == 2 && frame_errors == 0, "two frames counted");
    send(2, 1, 0, -1);                        // short line in row 2
    repeat (3) @(posedge clk);
    check(frame_errors == 1 && frames_done == 2, "short line counted as error");
    send(-1, 1, 0, 3);                        // frame cut after 3 rows ...
    send(-1, 1, 0, -1);                       // ... by a new start of frame
    repeat (3) @(posedge clk);
    check(frame_errors == 2 && frames_done == 3, "restart counted as error");
    check(exp_q.size() == 0, "pixels missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
