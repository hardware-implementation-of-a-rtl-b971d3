// tb_ctrl_regs: AXI4-Lite transactions against the register block: CTRL
// write/readback with byte strobes, read-only status registers returning
// their inputs, writes to them ignored, unmapped addresses reading 0, and
// responses held while bready/rready are low.
module tb_ctrl_regs;
  logic clk = 0, rst_n = 0;
  logic [4:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  logic lbp_enable, dt_enable;
  logic [31:0] st [5];
  int checks = 0, failures = 0;

  ctrl_regs dut (
    .clk, .rst_n,
    .s_axil_awaddr (awaddr), .s_axil_awvalid (awvalid), .s_axil_awready (awready),
    .s_axil_wdata (wdata), .s_axil_wstrb (wstrb), .s_axil_wvalid (wvalid),
    .s_axil_wready (wready), .s_axil_bresp (bresp), .s_axil_bvalid (bvalid),
    .s_axil_bready (bready), .s_axil_araddr (araddr), .s_axil_arvalid (arvalid),
    .s_axil_arready (arready), .s_axil_rdata (rdata), .s_axil_rresp (rresp),
    .s_axil_rvalid (rvalid), .s_axil_rready (rready),
    .lbp_enable, .dt_enable,
    .frames (st[0]), .frame_errors (st[1]), .results (st[2]),
    .detections (st[3]), .dropped (st[4]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // data and address may arrive in different cycles; bready is late by delay
  task automatic wr(logic [4:0] a, logic [31:0] d, logic [3:0] s, int delay);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = s;
    @(negedge clk) wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    repeat (delay) begin
      @(negedge clk);
      check(bvalid, "bvalid dropped before bready");
    end
    bready = 1;
    while (!bvalid) @(negedge clk);
    check(bresp == 0, "bresp");
    @(negedge clk) bready = 0;
    check(!bvalid, "bvalid after handshake");
  endtask

  task automatic rd(logic [4:0] a, int delay, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    repeat (delay) begin
      d = rdata;
      @(negedge clk);
      check(rvalid && rdata == d, "read data not held");
    end
    rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    check(rresp == 0, "rresp");
    @(negedge clk) rready = 0;
  endtask

  logic [31:0] v;

  initial begin
    for (int i = 0; i < 5; i++) st[i] = 32'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(!lbp_enable && !dt_enable, "CTRL reset value");
    rd(5'h00, 0, v); check(v == 0, "CTRL reads 0 after reset");
    wr(5'h00, 32'h1, 4'hF, 2); check(lbp_enable && !dt_enable, "CTRL=1");
    wr(5'h00, 32'h2, 4'hF, 0); check(!lbp_enable && dt_enable, "CTRL=2");
    wr(5'h00, 32'h3, 4'hE, 1); check(!lbp_enable && dt_enable, "strobe without byte 0 ignored");
    wr(5'h00, 32'hFFFF_FFFF, 4'h1, 0); check(lbp_enable && dt_enable, "CTRL=3");
    rd(5'h00, 3, v); check(v == 3, $sformatf("CTRL readback %h", v));
    for (int i = 0; i < 5; i++) begin
      rd(5'(4 * (i + 1)), i % 3, v);
      check(v == st[i], $sformatf("status %0d = %h exp %h", i, v, st[i]));
    end
    wr(5'h0C, 32'h0, 4'hF, 0);
    rd(5'h0C, 0, v); check(v == st[2], "RO register written");
    rd(5'h18, 0, v); check(v == 0, "unmapped address");
    rd(5'h1C, 1, v); check(v == 0, "unmapped address");
    check(lbp_enable && dt_enable, "CTRL kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
