// lbp_descriptor: uniform-LBP window descriptor core.
//
// Chains the 3x3 window generator (lbp_window), the LBP / uniform-LBP
// mapping (lbp_ulbp) and the per-cell histograms (cell_histogram). Each
// interior pixel of a WIDTH x HEIGHT image adds one count to the bin of its
// uniform LBP in the histogram of the CELL x CELL cell it lies in; once the
// last pixel has been counted, the concatenated histograms of all cells form
// the descriptor, flagged by desc_valid for one cycle and held stable until
// the next frame produces its first count.
//
// Timing: pipeline of three registers from the tagged pixel inputs (as made
// by lbp_ctrl) to the histogram, so desc_valid follows the frame_end pixel
// by three cycles; one pixel per clock is accepted without stalls.
// This core computes the descriptor of one detection-window-sized image per
// frame; sliding the window over a larger image is not part of it.
module lbp_descriptor #(
  parameter int WIDTH     = dt_pkg::WIN_W,
  parameter int HEIGHT    = dt_pkg::WIN_H,
  parameter int CELL      = dt_pkg::CELL_SIZE,
  localparam int CELLS_X  = WIDTH / CELL,
  localparam int NUM_CELLS = CELLS_X * (HEIGHT / CELL),
  localparam int NF       = NUM_CELLS * dt_pkg::NUM_BINS,
  localparam int COL_W    = $clog2(WIDTH),
  localparam int ROW_W    = $clog2(HEIGHT)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  pix_valid,
  input  logic [7:0]                            pix,
  input  logic [ROW_W-1:0]                      pix_row,
  input  logic [COL_W-1:0]                      pix_col,
  input  logic                                  frame_start,
  input  logic                                  frame_end,
  output logic [NF-1:0][dt_pkg::FEAT_W-1:0]     desc,
  output logic                                  desc_valid
);

  localparam int CELL_W = $clog2(NUM_CELLS);

  logic                 win_valid, win_start, win_end;
  logic [2:0][2:0][7:0] win;
  logic [ROW_W-1:0]     ctr_row;
  logic [COL_W-1:0]     ctr_col;
  logic [CELL_W-1:0]    win_cell;

  lbp_window #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_win (
    .clk, .rst_n,
    .pix_valid, .pix, .pix_row, .pix_col, .frame_start, .frame_end,
    .win_valid, .win, .ctr_row, .ctr_col,
    .frame_start_o (win_start),
    .frame_end_o   (win_end)
  );

  assign win_cell = CELL_W'((int'(ctr_row) / CELL) * CELLS_X + int'(ctr_col) / CELL);

  logic                      code_valid, code_last, code_start;
  logic [7:0]                code_lbp;
  logic [dt_pkg::BIN_W-1:0]  code_bin;
  logic [CELL_W-1:0]         code_cell;

  lbp_ulbp #(.TAG_W(CELL_W + 1)) u_ulbp (
    .clk, .rst_n,
    .in_valid  (win_valid),
    .win       (win),
    .in_tag    ({win_end, win_cell}),
    .out_valid (code_valid),
    .lbp       (code_lbp),
    .bin       (code_bin),
    .out_tag   ({code_last, code_cell})
  );

  // frame start follows the same delay as the LBP stage
  always_ff @(posedge clk) begin
    if (!rst_n) code_start <= 1'b0;
    else        code_start <= win_start;
  end

  cell_histogram #(
    .NUM_CELLS (NUM_CELLS),
    .NUM_BINS  (dt_pkg::NUM_BINS),
    .CNT_W     (dt_pkg::FEAT_W)
  ) u_hist (
    .clk, .rst_n,
    .clear      (code_start),
    .inc_valid  (code_valid),
    .inc_cell   (code_cell),
    .inc_bin    (code_bin),
    .inc_last   (code_last),
    .hist       (desc),
    .desc_valid (desc_valid)
  );

endmodule
