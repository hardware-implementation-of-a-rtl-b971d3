// lbp_window: 3x3 neighbourhood generator for a raster pixel stream.
//
// Two line buffers of WIDTH pixels hold the two previous image lines; with
// the incoming pixel they give one column of three vertically adjacent
// pixels, which is shifted into a 3x3 register window. When pixel (r, c)
// is accepted, the window one cycle later holds rows r-2..r and columns
// c-2..c, i.e. the full 8-neighbourhood of the centre pixel (r-1, c-1).
// win_valid is raised only when that neighbourhood lies inside the image
// (r >= 2 and c >= 2), so border pixels produce no window.
//
// win[i][j] is row i (0 = top) and column j (0 = left) of the window.
// frame_start and frame_end travel alongside with the same one-cycle delay
// (frame_start_o is raised whether or not a window is valid). Using line
// buffers and dropping border pixels is this design's own choice.
module lbp_window #(
  parameter int WIDTH  = dt_pkg::WIN_W,
  parameter int HEIGHT = dt_pkg::WIN_H,
  localparam int COL_W = $clog2(WIDTH),
  localparam int ROW_W = $clog2(HEIGHT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pix_valid,
  input  logic [7:0]            pix,
  input  logic [ROW_W-1:0]      pix_row,
  input  logic [COL_W-1:0]      pix_col,
  input  logic                  frame_start,
  input  logic                  frame_end,
  output logic                  win_valid,
  output logic [2:0][2:0][7:0]  win,
  output logic [ROW_W-1:0]      ctr_row,
  output logic [COL_W-1:0]      ctr_col,
  output logic                  frame_start_o,
  output logic                  frame_end_o
);

  logic [7:0] line1 [WIDTH];  // line r-1
  logic [7:0] line2 [WIDTH];  // line r-2
  logic [7:0] up1, up2;

  assign up1 = line1[pix_col];
  assign up2 = line2[pix_col];

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      line1[pix_col] <= pix;
      line2[pix_col] <= up1;
    end
  end

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      for (int i = 0; i < 3; i++) begin
        win[i][0] <= win[i][1];
        win[i][1] <= win[i][2];
      end
      win[0][2] <= up2;
      win[1][2] <= up1;
      win[2][2] <= pix;
      ctr_row   <= pix_row - 1'b1;
      ctr_col   <= pix_col - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_valid     <= 1'b0;
      frame_start_o <= 1'b0;
      frame_end_o   <= 1'b0;
    end else begin
      win_valid     <= pix_valid && pix_row >= ROW_W'(2) && pix_col >= COL_W'(2);
      frame_start_o <= pix_valid && frame_start;
      frame_end_o   <= pix_valid && frame_end;
    end
  end

endmodule
