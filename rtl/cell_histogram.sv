// cell_histogram: per-cell uniform-LBP histograms forming the descriptor.
//
// Holds NUM_CELLS x NUM_BINS saturating counters of CNT_W bits. Each
// increment names a cell and a bin; counter (cell, bin) is feature number
// cell*NUM_BINS + bin of the concatenated descriptor, so cells appear in
// raster order (left to right, top to bottom) and the bins of one cell are
// contiguous. Counters saturate at 2**CNT_W-1: a 16x16 cell can hold 256
// pixels, one more than an 8-bit bin can count.
//
// Timing: one increment per clock. The increment flagged inc_last completes
// the descriptor; desc_valid is raised for one cycle after it, and the
// histograms then stay unchanged until the next frame. `clear` (at the start
// of a frame) does not erase the counters at once: it marks them stale, and
// the first increment of the new frame zeroes every other counter while
// setting its own to 1. The previous descriptor thus remains readable until
// new data arrives. The lazy clear and saturation are this design's choices.
module cell_histogram #(
  parameter int NUM_CELLS = dt_pkg::NUM_CELLS,
  parameter int NUM_BINS  = dt_pkg::NUM_BINS,
  parameter int CNT_W     = dt_pkg::FEAT_W,
  localparam int CELL_W   = $clog2(NUM_CELLS),
  localparam int BIN_W    = $clog2(NUM_BINS)
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     clear,
  input  logic                                     inc_valid,
  input  logic [CELL_W-1:0]                        inc_cell,
  input  logic [BIN_W-1:0]                         inc_bin,
  input  logic                                     inc_last,
  output logic [NUM_CELLS*NUM_BINS-1:0][CNT_W-1:0] hist,
  output logic                                     desc_valid
);

  localparam int NF = NUM_CELLS * NUM_BINS;
  localparam int IDX_W = $clog2(NF);

  logic stale;
  logic [IDX_W-1:0] idx;

  assign idx = IDX_W'(inc_cell) * IDX_W'(NUM_BINS) + IDX_W'(inc_bin);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist       <= '0;
      stale      <= 1'b0;
      desc_valid <= 1'b0;
    end else begin
      desc_valid <= inc_valid && inc_last;
      if (clear) stale <= 1'b1;
      if (inc_valid) begin
        stale <= 1'b0;
        if (stale) begin
          hist      <= '0;
          hist[idx] <= CNT_W'(1);
        end else if (hist[idx] != '1) begin
          hist[idx] <= hist[idx] + 1'b1;
        end
      end
    end
  end

  a_no_clear_during_inc: assert property (@(posedge clk) disable iff (!rst_n)
                                          !(clear && inc_valid));

endmodule
