// tb_dt_system: end-to-end test of the whole pipeline at its default size
// (96x160 frames, 3540-feature descriptor, 83-split tree).
//
// A sensor model streams whole frames; an AXI4-Lite master enables the
// cores and reads the status registers; a DMA model takes result beats with
// a chosen tready pattern. Every descriptor is compared with a software
// model of the image, and every result beat with a node-by-node walk of the
// tree on that model descriptor. Mechanisms exercised and counted:
// frames ignored while the LBP core is disabled, classified frames of both
// classes, input gaps, a framing error, the decision tree disabled,
// DMA back-pressure and result drops on a full FIFO.
module tb_dt_system;
  import dt_pkg::*;
  import tb_ref_pkg::*;

  localparam tree_t T = synth_tree(DEF_TREE_SPLITS, DEF_TREE_DEPTH, 1);
  localparam int LATENCY = 7;  // last pixel accepted -> result beat visible

  logic clk = 0, rst_n = 0;
  logic [7:0]  pix_tdata = 0;
  logic        pix_tvalid = 0, pix_tready, pix_tuser = 0, pix_tlast = 0;
  logic [31:0] res_tdata;
  logic        res_tvalid, res_tready, res_tlast;
  logic [4:0]  awaddr = 0, araddr = 0;
  logic        awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic        arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0]  wstrb = 0;
  logic [1:0]  bresp, rresp;

  dt_system dut (
    .clk, .rst_n,
    .s_axis_pix_tdata (pix_tdata), .s_axis_pix_tvalid (pix_tvalid),
    .s_axis_pix_tready (pix_tready), .s_axis_pix_tuser (pix_tuser),
    .s_axis_pix_tlast (pix_tlast),
    .m_axis_res_tdata (res_tdata), .m_axis_res_tvalid (res_tvalid),
    .m_axis_res_tready (res_tready), .m_axis_res_tlast (res_tlast),
    .s_axil_awaddr (awaddr), .s_axil_awvalid (awvalid), .s_axil_awready (awready),
    .s_axil_wdata (wdata), .s_axil_wstrb (wstrb), .s_axil_wvalid (wvalid),
    .s_axil_wready (wready), .s_axil_bresp (bresp), .s_axil_bvalid (bvalid),
    .s_axil_bready (bready), .s_axil_araddr (araddr), .s_axil_arvalid (arvalid),
    .s_axil_arready (arready), .s_axil_rdata (rdata), .s_axil_rresp (rresp),
    .s_axil_rvalid (rvalid), .s_axil_rready (rready)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [cycle %0d]: %s", cycle, what);
    end
  endtask

  // ---------------- AXI4-Lite master ----------------
  task automatic axil_write(logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = 4'hF; awvalid = 1; wvalid = 1; bready = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "write response");
    @(posedge clk);
    @(negedge clk) bready = 0;
  endtask

  task automatic axil_read(logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(posedge clk);
    @(negedge clk) rready = 0;
  endtask

  // ---------------- sensor model ----------------
  tb_ref_pkg::image_t img;
  int last_pix_cycle;

  // bad_row >= 0 ends that row early with tlast; gaps inserts idle cycles
  task automatic send_frame(int bad_row, bit gaps);
    for (int r = 0; r < WIN_H; r++)
      for (int c = 0; c < WIN_W; c++) begin
        @(negedge clk);
        if (gaps && $urandom_range(0, 7) == 0) begin
          pix_tvalid = 0;
          @(negedge clk);
        end
        pix_tvalid = 1;
        pix_tdata  = img[r][c];
        pix_tuser  = (r == 0 && c == 0);
        pix_tlast  = (c == WIN_W - 1) || (r == bad_row && c == WIN_W / 2);
        if (r == WIN_H - 1 && c == WIN_W - 1) last_pix_cycle = cycle;
      end
    @(negedge clk);
    pix_tvalid = 0; pix_tuser = 0; pix_tlast = 0;
  endtask

  // ---------------- descriptor check ----------------
  descriptor_t exp_desc;
  int desc_seen = 0;
  always @(posedge clk) begin
    if (rst_n && dut.desc_valid) begin
      desc_seen++;
      check(dut.desc == exp_desc, "descriptor differs from the model");
    end
  end

  // ---------------- DMA model ----------------
  int exp_class [int];      // window number -> expected class
  int beats = 0, ones = 0, zeros = 0, stall_cycles = 0, first_beat_cycle = -1;
  bit dma_hold = 0;
  assign res_tready = !dma_hold;

  always @(posedge clk) begin
    if (rst_n && res_tvalid && !res_tready) stall_cycles++;
    if (rst_n && res_tvalid && res_tready) begin
      int w;
      w = int'(res_tdata[31:8]);
      beats++;
      if (first_beat_cycle < 0) first_beat_cycle = cycle;
      check(exp_class.exists(w), $sformatf("unexpected window number %0d", w));
      if (exp_class.exists(w)) begin
        check(res_tdata[0] == exp_class[w][0] && res_tdata[7:1] == 0 && res_tlast,
              $sformatf("window %0d class %0d exp %0d", w, res_tdata[0], exp_class[w]));
        if (res_tdata[0]) ones++; else zeros++;
      end
    end
  end

  // ---------------- sequence ----------------
  int win_no = 0;
  int kinds_done = 0;
  int ignored_frames = 0, error_frames = 0, dt_off_frames = 0, gap_frames = 0;
  int dropped_seen = 0;
  int exp_ones;
  logic [31:0] rd;

  task automatic classify_frame(int kind, int seed, bit gaps, bit expect_result);
    descriptor_t d;
    make_image(img, kind, seed);
    d = ref_desc(img);
    exp_desc = d;
    if (expect_result) begin
      exp_class[win_no] = ref_class(T, d);
      win_no++;
    end
    send_frame(-1, gaps);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // 1. cores disabled after reset: a frame is ignored
    make_image(img, 0, 1);
    send_frame(-1, 0);
    repeat (20) @(posedge clk);
    axil_read(5'h04, rd);
    check(rd == 0 && desc_seen == 0 && beats == 0, "frame taken while disabled");
    ignored_frames++;

    // 2. enable both cores, read CTRL back
    axil_write(5'h00, 32'h3);
    axil_read(5'h00, rd);
    check(rd == 32'h3, "CTRL readback");

    // 3. frames of every image kind; first one measures the latency
    for (int k = 0; k < 10; k++) begin
      classify_frame(k, k + 3, k >= 5, 1);
      if (k >= 5) gap_frames++;
      if (k == 0) begin
        repeat (LATENCY + 2) @(posedge clk);
        check(first_beat_cycle - last_pix_cycle == LATENCY,
              $sformatf("latency %0d", first_beat_cycle - last_pix_cycle));
      end
      repeat (10) @(posedge clk);
    end

    // 4. framing error: row 7 ends early -> frame aborted, no result
    make_image(img, 1, 99);
    send_frame(7, 0);
    error_frames++;
    repeat (20) @(posedge clk);
    axil_read(5'h08, rd);
    check(rd == 1, "FRAME_ERRORS");
    classify_frame(2, 77, 0, 1);   // a good frame after the error
    repeat (20) @(posedge clk);

    // 5. decision tree disabled: descriptor made, no result
    axil_write(5'h00, 32'h1);
    classify_frame(3, 5, 0, 0);
    dt_off_frames++;
    repeat (20) @(posedge clk);
    axil_write(5'h00, 32'h3);

    // 6. DMA stalls: six results, FIFO holds four, two are dropped
    @(negedge clk) dma_hold = 1;
    for (int k = 0; k < 6; k++) begin
      classify_frame(k, 200 + k, 0, 1);
      repeat (10) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    @(negedge clk) dma_hold = 0;
    repeat (20) @(posedge clk);
    axil_read(5'h14, rd);
    dropped_seen = int'(rd);
    check(rd == 2, $sformatf("DROPPED = %0d", rd));

    // status counters
    axil_read(5'h04, rd);
    check(rd == 18, $sformatf("FRAMES = %0d", rd));
    axil_read(5'h0C, rd);
    check(rd == win_no, $sformatf("RESULTS = %0d exp %0d", rd, win_no));
    axil_read(5'h10, rd);
    exp_ones = 0;
    foreach (exp_class[w]) exp_ones += exp_class[w];
    check(rd == exp_ones, $sformatf("DETECTIONS = %0d exp %0d", rd, exp_ones));
    check(beats == win_no - 2, $sformatf("%0d beats for %0d results", beats, win_no));
    check(desc_seen == 18, $sformatf("%0d descriptors", desc_seen));

    // every mechanism happened at least once
    $display("mechanisms: ignored=%0d gaps=%0d error=%0d dt_off=%0d stall_cycles=%0d dropped=%0d class1=%0d class0=%0d",
             ignored_frames, gap_frames, error_frames, dt_off_frames, stall_cycles,
             dropped_seen, ones, zeros);
    check(ignored_frames > 0 && gap_frames > 0 && error_frames > 0 && dt_off_frames > 0 &&
          stall_cycles > 0 && dropped_seen > 0, "a mechanism never happened");
    check(ones > 0 && zeros > 0, "only one class produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
