// tb_lbp_ulbp: checks the LBP code and uniform bin of the LBP stage against
// the reference models: the worked example of a neighbourhood whose four
// darker neighbours (2..5) give LBP 0b01111000 = 120, all 256 patterns
// produced from chosen windows, and random windows; also the one-cycle
// latency and the tag path.
module tb_lbp_ulbp;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [2:0][2:0][7:0] win;
  logic [7:0] in_tag, out_tag, lbp;
  logic [5:0] bin;
  int checks = 0, failures = 0;

  lbp_ulbp #(.TAG_W(8)) dut (.clk, .rst_n, .in_valid, .win, .in_tag, .out_valid, .lbp, .bin, .out_tag);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window whose neighbours 1..8 (clockwise from top-left) are set from code:
  // bit 1 -> darker than the centre (40 < 100), bit 0 -> brighter (160)
  function automatic logic [2:0][2:0][7:0] win_of(logic [7:0] code);
    logic [2:0][2:0][7:0] w;
    logic [7:0] v [8];
    for (int k = 0; k < 8; k++) v[k] = code[7 - k] ? ((k % 2) ? 8'd100 : 8'd40) : 8'd160;
    w[1][1] = 8'd100;
    w[0][0] = v[0]; w[0][1] = v[1]; w[0][2] = v[2]; w[1][2] = v[3];
    w[2][2] = v[4]; w[2][1] = v[5]; w[2][0] = v[6]; w[1][0] = v[7];
    return w;
  endfunction

  logic [7:0] exp_lbp [$];
  logic [7:0] exp_tag [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [7:0] e;
      logic [7:0] t;
      e = exp_lbp.pop_front();
      t = exp_tag.pop_front();
      checks++;
      if (lbp !== e || int'(bin) != ref_bin(e) || out_tag !== t) begin
        failures++;
        $display("lbp %h exp %h, bin %0d exp %0d", lbp, e, bin, ref_bin(e));
      end
    end
  end

  task automatic apply(logic [2:0][2:0][7:0] w, logic [7:0] e);
    @(negedge clk);
    in_valid = 1;
    win = w;
    in_tag = 8'($urandom);
    exp_lbp.push_back(e);
    exp_tag.push_back(in_tag);
  endtask

  int nuni;
  logic [2:0][2:0][7:0] ex;

  initial begin
    win = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // worked example: neighbours 2, 3, 4, 5 darker than the centre
    ex[0][0] = 8'd190; ex[0][1] = 8'd60;  ex[0][2] = 8'd50;
    ex[1][0] = 8'd210; ex[1][1] = 8'd100; ex[1][2] = 8'd40;
    ex[2][0] = 8'd220; ex[2][1] = 8'd190; ex[2][2] = 8'd30;
    apply(ex, 8'd120);
    for (int v = 0; v < 256; v++) apply(win_of(8'(v)), 8'(v));
    for (int n = 0; n < 500; n++) begin
      logic [2:0][2:0][7:0] w;
      logic [7:0] e;
      logic [7:0] nbv [8];
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) w[i][j] = 8'($urandom_range(0, 3) * 50);
      nbv = '{w[0][0], w[0][1], w[0][2], w[1][2], w[2][2], w[2][1], w[2][0], w[1][0]};
      for (int k = 0; k < 8; k++) e[7 - k] = !(nbv[k] > w[1][1]);
      apply(w, e);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    // 58 uniform patterns -> 59 bins
    nuni = 0;
    for (int v = 0; v < 256; v++) if (ref_bin(8'(v)) < 58) nuni++;
    checks++;
    if (nuni != 58 || exp_lbp.size() != 0) begin failures++; $display("uniform count %0d", nuni); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
