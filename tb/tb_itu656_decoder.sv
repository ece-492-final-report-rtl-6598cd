// tb_itu656_decoder: self-checking test of the ITU-R 656 decoder on a small
// raster (24 source pixels, 16 kept from offset 4, 6 of 8 active lines per
// field). Every output pixel is compared with the test pattern, including
// its field bit and the sof/eol marks, over four fields; the output rate is
// checked to be at most one pixel per two clocks.
module tb_itu656_decoder;
  import ar_pkg::*;
  import tb_video_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #18.5 clk = ~clk;
  logic [7:0] td;
  logic v, sof, eol, field, v_d = 1'b0;
  ycc422_t px;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int SRC = 24, W = 16, OFF = 4, FL = 6;
  itu656_source #(.SRC_PIXELS(SRC), .H_BLANK(10), .VBLANK(3), .ACTIVE(8)) src (.clk, .data(td));
  itu656_decoder #(.SRC_PIXELS(SRC), .H_ACTIVE(W), .H_OFFSET(OFF), .FIELD_LINES(FL)) dut (
    .clk, .rst_n, .td_data(td), .out_valid(v), .out_data(px), .out_sof(sof), .out_eol(eol), .out_field(field));

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0, started = 0, back_to_back = 0;
  int x = 0, line = 0, f = 0;
  always @(posedge clk) begin
    v_d <= v;
    if (v && v_d) back_to_back++;
    if (v) begin
      if (!started && sof) started = 1;
      if (started) begin
        logic [7:0] ey, ec;
        int sx;
        if (sof) begin x = 0; line = 0; f = int'(field); end
        sx = OFF + x;
        ey = pat_y(sx, line, f);
        ec = sx % 2 == 0 ? pat_cb(sx / 2, line, f) : pat_cr(sx / 2, line, f);
        check(px.y == ey && px.c == ec, $sformatf("pixel f%0d l%0d x%0d: %h %h vs %h %h", f, line, x, px.y, px.c, ey, ec));
        check(field == 1'(f), "field bit");
        check(sof == (x == 0 && line == 0), "sof mark");
        check(eol == (x == W - 1), "eol mark");
        n++;
        if (x == W - 1) begin x = 0; line++; end else x++;
      end
    end
  end
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (src.fields == 6);
    check(n >= 5 * FL * W && n <= 6 * FL * W, $sformatf("pixel count %0d", n));
    check(back_to_back == 0, "at most one pixel every two clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
