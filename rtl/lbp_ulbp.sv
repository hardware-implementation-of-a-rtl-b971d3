// lbp_ulbp: local binary pattern and uniform-LBP bin of one 3x3 window.
//
// The eight neighbours are numbered clockwise from the top-left corner
// (1 top-left, 2 top, 3 top-right, 4 right, 5 bottom-right, 6 bottom,
// 7 bottom-left, 8 left); neighbour 1 gives the most significant bit of the
// 8-bit LBP. A bit is 0 when the neighbour is brighter than the centre and 1
// otherwise. The LBP is then mapped to one of 59 histogram bins: the 58
// uniform patterns (at most two circular 0/1 transitions) get bins 0..57 in
// ascending order of their value, every other pattern bin 58. The bin order
// is this design's own choice; the mapping table is computed at elaboration.
//
// One register stage: a window with in_valid in cycle t gives lbp/bin with
// out_valid in cycle t+1. TAG_W bits of side information (cell index, frame
// markers) travel along unchanged.
module lbp_ulbp #(
  parameter int TAG_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [2:0][2:0][7:0]    win,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic [7:0]              lbp,
  output logic [dt_pkg::BIN_W-1:0] bin,
  output logic [TAG_W-1:0]        out_tag
);

  localparam logic [255:0][dt_pkg::BIN_W-1:0] ULBP_LUT = dt_pkg::build_ulbp_lut();

  logic [7:0] centre;
  logic [7:0][7:0] nb;   // nb[7] = neighbour 1 ... nb[0] = neighbour 8
  logic [7:0] code;

  always_comb begin
    centre = win[1][1];
    nb[7] = win[0][0];   // 1 top-left
    nb[6] = win[0][1];   // 2 top
    nb[5] = win[0][2];   // 3 top-right
    nb[4] = win[1][2];   // 4 right
    nb[3] = win[2][2];   // 5 bottom-right
    nb[2] = win[2][1];   // 6 bottom
    nb[1] = win[2][0];   // 7 bottom-left
    nb[0] = win[1][0];   // 8 left
    for (int b = 0; b < 8; b++) code[b] = !(nb[b] > centre);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lbp     <= code;
      bin     <= ULBP_LUT[code];
      out_tag <= in_tag;
    end
  end

endmodule
