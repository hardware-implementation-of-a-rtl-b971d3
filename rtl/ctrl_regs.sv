// ctrl_regs: AXI4-Lite control and status registers of the two cores.
//
// The processor reaches the programmable logic through one AXI4-Lite port;
// this slave holds the control bits of the LBP descriptor core and of the
// decision tree core and lets the processor read their counters.
//
//   0x00 CTRL         RW  bit 0 LBP core enable, bit 1 decision tree enable
//   0x04 FRAMES       RO  frames fully received
//   0x08 FRAME_ERRORS RO  frames aborted by framing errors
//   0x0C RESULTS      RO  windows classified
//   0x10 DETECTIONS   RO  windows classified as class 1
//   0x14 DROPPED      RO  results lost to a full result FIFO
// Other addresses read as 0; writes to them and to RO registers are ignored
// (response OKAY). CTRL resets to 0.
//
// Handshake: a write is taken when address and data are both valid and no
// write response is pending (awready and wready are raised together for one
// cycle); the response follows one cycle later and is held until bready.
// A read address is taken when no read data is pending; data follow one
// cycle later and are held until rready. The register map and these timing
// choices are this design's own; the original architecture only has the
// processor reach both cores over AXI4-Lite.
module ctrl_regs #(
  parameter int ADDR_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // control outputs
  output logic              lbp_enable,
  output logic              dt_enable,
  // status inputs
  input  logic [31:0]       frames,
  input  logic [31:0]       frame_errors,
  input  logic [31:0]       results,
  input  logic [31:0]       detections,
  input  logic [31:0]       dropped
);

  typedef enum logic [ADDR_W-3:0] {
    R_CTRL = 0, R_FRAMES = 1, R_FRAME_ERRORS = 2, R_RESULTS = 3,
    R_DETECTIONS = 4, R_DROPPED = 5
  } reg_e;

  wire do_write = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  wire do_read  = s_axil_arvalid && !s_axil_rvalid;

  assign s_axil_awready = do_write;
  assign s_axil_wready  = do_write;
  assign s_axil_arready = do_read;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  logic [31:0] rd_mux;

  always_comb begin
    unique case (s_axil_araddr[ADDR_W-1:2])
      R_CTRL:         rd_mux = {30'b0, dt_enable, lbp_enable};
      R_FRAMES:       rd_mux = frames;
      R_FRAME_ERRORS: rd_mux = frame_errors;
      R_RESULTS:      rd_mux = results;
      R_DETECTIONS:   rd_mux = detections;
      R_DROPPED:      rd_mux = dropped;
      default:        rd_mux = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lbp_enable    <= 1'b0;
      dt_enable     <= 1'b0;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (do_write) begin
        s_axil_bvalid <= 1'b1;
        if (s_axil_awaddr[ADDR_W-1:2] == R_CTRL && s_axil_wstrb[0]) begin
          lbp_enable <= s_axil_wdata[0];
          dt_enable  <= s_axil_wdata[1];
        end
      end else if (s_axil_bready) begin
        s_axil_bvalid <= 1'b0;
      end
      if (do_read) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_mux;
      end else if (s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
