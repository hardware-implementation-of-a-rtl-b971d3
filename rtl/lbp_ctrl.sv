// lbp_ctrl: control logic in front of the LBP descriptor core.
//
// Accepts the pixel stream of the image sensor as AXI4-Stream video (tuser
// marks the first pixel of a frame, tlast the last pixel of a line), admits a
// frame only when it starts while `enable` is set, and tags every admitted
// pixel with its row and column inside the WIDTH x HEIGHT detection window.
// A line whose tlast does not fall on column WIDTH-1, or a start of frame in
// the middle of a frame, aborts the frame and counts a framing error; the
// pixels already sent are then superseded by the next frame's restart.
//
// The sensor cannot be stalled, so tready is always 1. Outputs are
// registered: a pixel accepted in cycle t appears on pix_* in cycle t+1.
// frame_start marks pixel (0,0), frame_end pixel (HEIGHT-1, WIDTH-1).
// The framing rules, counters and register timing are this design's own
// choices; the original architecture only names this control logic.
module lbp_ctrl #(
  parameter int WIDTH  = dt_pkg::WIN_W,
  parameter int HEIGHT = dt_pkg::WIN_H,
  localparam int COL_W = $clog2(WIDTH),
  localparam int ROW_W = $clog2(HEIGHT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  // pixel stream from the sensor
  input  logic [7:0]       s_axis_tdata,
  input  logic             s_axis_tvalid,
  output logic             s_axis_tready,
  input  logic             s_axis_tuser,
  input  logic             s_axis_tlast,
  // tagged pixels to the descriptor core
  output logic             pix_valid,
  output logic [7:0]       pix,
  output logic [ROW_W-1:0] pix_row,
  output logic [COL_W-1:0] pix_col,
  output logic             frame_start,
  output logic             frame_end,
  // status
  output logic [31:0]      frames_done,
  output logic [31:0]      frame_errors
);

  typedef enum logic [0:0] {IDLE, ACTIVE} state_t;
  state_t state;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;

  assign s_axis_tready = 1'b1;

  wire sof       = s_axis_tvalid && s_axis_tuser;
  wire last_col  = (col == COL_W'(WIDTH - 1));
  wire last_row  = (row == ROW_W'(HEIGHT - 1));
  // a start of frame begins a new frame (when enabled) in either state
  wire start     = sof && enable;
  wire in_frame  = s_axis_tvalid && state == ACTIVE && !sof;
  wire line_err  = in_frame && (s_axis_tlast != last_col);
  wire good_pix  = start || (in_frame && !line_err);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= IDLE;
      row          <= '0;
      col          <= '0;
      pix_valid    <= 1'b0;
      frame_start  <= 1'b0;
      frame_end    <= 1'b0;
      frames_done  <= '0;
      frame_errors <= '0;
    end else begin
      pix_valid   <= good_pix;
      frame_start <= start;
      frame_end   <= 1'b0;
      if (good_pix) begin
        pix     <= s_axis_tdata;
        pix_row <= start ? '0 : row;
        pix_col <= start ? '0 : col;
      end
      if (sof && state == ACTIVE) frame_errors <= frame_errors + 1;
      if (start) begin
        state <= ACTIVE;
        row   <= '0;
        col   <= COL_W'(1);
      end else if (in_frame) begin
        if (line_err) begin
          state        <= IDLE;
          frame_errors <= frame_errors + 1;
        end else if (last_col) begin
          col <= '0;
          row <= row + 1'b1;
          if (last_row) begin
            state       <= IDLE;
            frame_end   <= 1'b1;
            frames_done <= frames_done + 1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
