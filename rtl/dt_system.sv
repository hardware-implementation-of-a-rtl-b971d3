// dt_system: programmable-logic part of a camera pipeline that detects
// objects (human silhouettes) with an uniform-LBP descriptor and a decision
// tree classifier.
//
// Data flow: the sensor's pixel stream enters lbp_ctrl (frame gating, row
// and column tags), lbp_descriptor turns each 96x160 frame into a 3540-value
// descriptor (6x10 cells x 59 uniform-LBP bins, 8 bits each), decision_tree
// classifies it in two pipelined cycles, and dt_stream_out sends the result
// as an AXI4-Stream beat towards a DMA engine that writes it to memory.
// ctrl_regs is the AXI4-Lite port through which the processor enables the
// two cores and reads their counters.
//
// Latency: the result of a frame enters the result FIFO 6 cycles after the
// frame's last pixel is accepted (1 cycle lbp_ctrl, 3 descriptor, 2 tree)
// and appears on m_axis one cycle later. Pixels are taken one per clock
// with no back-pressure. The processor, DMA engine, memory and image sensor
// are outside this module; their links are its ports.
module dt_system #(
  parameter int          WIDTH      = dt_pkg::WIN_W,
  parameter int          HEIGHT     = dt_pkg::WIN_H,
  parameter int          CELL       = dt_pkg::CELL_SIZE,
  parameter int          NUM_SPLITS = dt_pkg::DEF_TREE_SPLITS,
  parameter int          TREE_DEPTH = dt_pkg::DEF_TREE_DEPTH,
  parameter int          TREE_SEED  = 1,
  parameter dt_pkg::tree_t TREE     = dt_pkg::synth_tree(NUM_SPLITS, TREE_DEPTH, TREE_SEED),
  parameter int          FIFO_DEPTH = 4,
  localparam int         NF         = (WIDTH / CELL) * (HEIGHT / CELL) * dt_pkg::NUM_BINS
) (
  input  logic        clk,
  input  logic        rst_n,
  // pixel stream from the image sensor (AXI4-Stream video)
  input  logic [7:0]  s_axis_pix_tdata,
  input  logic        s_axis_pix_tvalid,
  output logic        s_axis_pix_tready,
  input  logic        s_axis_pix_tuser,
  input  logic        s_axis_pix_tlast,
  // results to the DMA S2MM channel (AXI4-Stream)
  output logic [31:0] m_axis_res_tdata,
  output logic        m_axis_res_tvalid,
  input  logic        m_axis_res_tready,
  output logic        m_axis_res_tlast,
  // AXI4-Lite control from the processor
  input  logic [4:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [4:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready
);

  localparam int COL_W = $clog2(WIDTH);
  localparam int ROW_W = $clog2(HEIGHT);

  logic lbp_enable, dt_enable;
  logic [31:0] frames, frame_errors, results, detections, dropped;

  logic             pix_valid, frame_start, frame_end;
  logic [7:0]       pix;
  logic [ROW_W-1:0] pix_row;
  logic [COL_W-1:0] pix_col;

  lbp_ctrl #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_lbp_ctrl (
    .clk, .rst_n,
    .enable        (lbp_enable),
    .s_axis_tdata  (s_axis_pix_tdata),
    .s_axis_tvalid (s_axis_pix_tvalid),
    .s_axis_tready (s_axis_pix_tready),
    .s_axis_tuser  (s_axis_pix_tuser),
    .s_axis_tlast  (s_axis_pix_tlast),
    .pix_valid, .pix, .pix_row, .pix_col, .frame_start, .frame_end,
    .frames_done   (frames),
    .frame_errors  (frame_errors)
  );

  logic [NF-1:0][dt_pkg::FEAT_W-1:0] desc;
  logic                              desc_valid;

  lbp_descriptor #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .CELL(CELL)) u_lbp (
    .clk, .rst_n,
    .pix_valid, .pix, .pix_row, .pix_col, .frame_start, .frame_end,
    .desc, .desc_valid
  );

  logic res_valid, res_class;
  logic [NUM_SPLITS:0] leaf_hit;

  decision_tree #(
    .N_FEATURES (NF),
    .NUM_SPLITS (NUM_SPLITS),
    .TREE       (TREE)
  ) u_tree (
    .clk, .rst_n,
    .in_valid  (desc_valid && dt_enable),
    .features  (desc),
    .out_valid (res_valid),
    .obj_class (res_class),
    .leaf_hit  (leaf_hit)
  );

  dt_stream_out #(.FIFO_DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n,
    .res_valid, .res_class,
    .m_axis_tdata  (m_axis_res_tdata),
    .m_axis_tvalid (m_axis_res_tvalid),
    .m_axis_tready (m_axis_res_tready),
    .m_axis_tlast  (m_axis_res_tlast),
    .results, .detections, .dropped
  );

  ctrl_regs #(.ADDR_W(5)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .lbp_enable, .dt_enable,
    .frames, .frame_errors, .results, .detections, .dropped
  );

endmodule
