// dt_stream_out: result side of the decision tree core's control logic.
//
// Turns every classification result into one 32-bit AXI4-Stream beat for
// the S2MM (stream to memory) channel of a DMA engine, which stores the
// results in memory for further processing. Beat format:
//   tdata[31:8] = window number (counts classified windows from 0, wraps)
//   tdata[0]    = object class (1 = object present), tdata[7:1] = 0
//   tlast       = 1 on every beat (one result per DMA packet)
// A FIFO of FIFO_DEPTH beats absorbs back-pressure from the DMA. A result
// that arrives while the FIFO is full is dropped and counted in `dropped`.
// `results` and `detections` count all classified windows and those with
// class 1. The beat format, FIFO and drop policy are this design's choices:
// the original architecture only says that results go as an AXI4-Stream to
// a DMA S2MM channel and are stored in memory.
module dt_stream_out #(
  parameter int FIFO_DEPTH = 4,
  localparam int PTR_W = $clog2(FIFO_DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        res_valid,
  input  logic        res_class,
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  output logic [31:0] results,
  output logic [31:0] detections,
  output logic [31:0] dropped
);

  if (FIFO_DEPTH < 2 || (FIFO_DEPTH & (FIFO_DEPTH - 1)) != 0)
    $error("dt_stream_out: FIFO_DEPTH must be a power of two, at least 2");

  logic [31:0]    mem [FIFO_DEPTH];
  logic [PTR_W:0] wr_ptr, rd_ptr;
  logic [23:0]    win_no;

  wire full  = (wr_ptr[PTR_W] != rd_ptr[PTR_W]) && (wr_ptr[PTR_W-1:0] == rd_ptr[PTR_W-1:0]);
  wire empty = (wr_ptr == rd_ptr);
  wire push  = res_valid && !full;
  wire pop   = m_axis_tvalid && m_axis_tready;

  assign m_axis_tvalid = !empty;
  assign m_axis_tdata  = mem[rd_ptr[PTR_W-1:0]];
  assign m_axis_tlast  = 1'b1;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[PTR_W-1:0]] <= {win_no, 7'b0, res_class};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      win_no     <= '0;
      results    <= '0;
      detections <= '0;
      dropped    <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      if (res_valid) begin
        win_no  <= win_no + 1'b1;
        results <= results + 1;
        if (res_class) detections <= detections + 1;
        if (full)      dropped    <= dropped + 1;
      end
    end
  end

  // AXI4-Stream: a beat once offered stays until it is taken
  a_axis_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

endmodule
