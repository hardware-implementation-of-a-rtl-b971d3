// tb_dt_stream_out: random results against a DMA sink with random tready.
// A software FIFO of the same depth predicts which results are kept and
// which are dropped; every beat's window number, class and tlast are
// checked in order, as are the result, detection and drop counters.
module tb_dt_stream_out;
  logic clk = 0, rst_n = 0;
  logic res_valid = 0, res_class = 0;
  logic [31:0] tdata, results, detections, dropped;
  logic tvalid, tready = 0, tlast;
  int checks = 0, failures = 0;

  dt_stream_out #(.FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .res_valid, .res_class,
    .m_axis_tdata (tdata), .m_axis_tvalid (tvalid), .m_axis_tready (tready),
    .m_axis_tlast (tlast), .results, .detections, .dropped);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [$];
  int nres = 0, ndet = 0, ndrop = 0, beats = 0;

  // model: pop first (registered pointers), then push if there is room
  always @(posedge clk) begin
    if (rst_n) begin
      bit popped;
      popped = 0;
      if (tvalid && tready) begin
        logic [31:0] e;
        beats++;
        e = model.pop_front();
        popped = 1;
        checks++;
        if (tdata !== e || !tlast) begin
          failures++;
          $display("beat %h exp %h", tdata, e);
        end
      end
      checks++;
      if (tvalid != (model.size() + popped > 0)) begin failures++; $display("tvalid wrong"); end
      if (res_valid) begin
        if (model.size() + popped < 4) model.push_back({24'(nres), 7'b0, res_class});
        else ndrop++;
        nres++;
        if (res_class) ndet++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      res_valid = ($urandom_range(0, 2) == 0);
      res_class = 1'($urandom);
      // phases: free flow, heavy stall, light stall
      tready = (n < 1000) ? 1'b1 : (n < 2000) ? ($urandom_range(0, 5) == 0) : ($urandom_range(0, 1) == 0);
    end
    @(negedge clk) begin res_valid = 0; tready = 1; end
    repeat (10) @(posedge clk);
    checks++;
    if (results != nres || detections != ndet || dropped != ndrop || model.size() != 0 || ndrop == 0) begin
      failures++;
      $display("counters %0d/%0d %0d/%0d %0d/%0d", results, nres, detections, ndet, dropped, ndrop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
