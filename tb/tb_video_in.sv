// tb_video_in: self-checking test of the whole capture path at a reduced
// size (40-pixel source lines, 32x16 frame, 16x8 result) so that a run
// takes a few frames of simulated time. An ITU-R 656 source model feeds the
// 27 MHz side, a memory model with random wait states takes the SRAM
// writes. Checks: every pixel of a captured frame against the reference
// conversion, writes only inside the frame, done/busy/frame count, a second
// capture at another base, and an overflow when the memory is held busy
// (the buffer fills and the overflow flag sets), then a clean capture after
// the memory is released.
module tb_video_in;
  import ar_pkg::*;
  import tb_video_pkg::*;
  localparam int SRC = 40, IW = 32, IH = 16, OW = IW / 2, OH = IH / 2;
  logic clk = 1'b0, clk27 = 1'b0, rst_n = 1'b0, rst27_n = 1'b0;
  always #10 clk = ~clk;
  always #18.5 clk27 = ~clk27;
  avm_req_t req = '0;
  avm_rsp_t rsp;
  sram_req_t mreq;
  sram_rsp_t mrsp;
  logic [7:0] td;
  logic fdone;
  logic [15:0] ovfc;
  logic [31:0] d;
  int busy_pct = 50, stalls = 0, fdones = 0;
  bit hold = 0;
  logic [15:0] mem [int];
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Avalon-MM master tasks: drive on the falling edge, the access is taken
  // at the rising edge where waitrequest is low.
  task automatic bus_write(input logic [24:0] a, input logic [31:0] d);
    @(negedge clk);
    req.address = a; req.writedata = d; req.byteenable = 4'hf; req.write = 1'b1;
    #1;
    while (rsp.waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    req.write = 1'b0;
  endtask

  task automatic bus_read(input logic [24:0] a, output logic [31:0] d);
    @(negedge clk);
    req.address = a; req.read = 1'b1;
    #1;
    while (rsp.waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    req.read = 1'b0;
    while (!rsp.readdatavalid) @(negedge clk);
    d = rsp.readdata;
  endtask

  itu656_source #(.SRC_PIXELS(SRC), .H_BLANK(20), .VBLANK(3), .ACTIVE(10)) src (.clk(clk27), .data(td));
  video_in #(.SRC_PIXELS(SRC), .IN_W(IW), .IN_H(IH), .BUF_DEPTH(16)) dut (
    .clk, .rst_n, .clk27, .rst27_n, .td_data(td), .avs_req(req), .avs_rsp(rsp),
    .m_req(mreq), .m_rsp(mrsp), .frame_done(fdone), .overflow_count(ovfc));

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: random wait states, or held busy
  logic wr_wait;
  always @(negedge clk) wr_wait <= hold || ($urandom_range(99) < busy_pct);
  assign mrsp = '{readdata: 16'h0, waitrequest: wr_wait, readdatavalid: 1'b0};
  always @(posedge clk) begin
    if (mreq.write && wr_wait) stalls++;
    if (mreq.write && !wr_wait) mem[int'(mreq.address)] = mreq.writedata;
    if (fdone) fdones++;
  end

  task automatic capture(input int base_w);
    bus_write(25'h4, 32'(base_w));
    bus_write(25'h0, 32'h1);
    bus_read(25'h0, d);
    check(d[0] == 1'b1 && d[1] == 1'b0, "busy and not done after start");
    do bus_read(25'h0, d); while (d[0]);
    check(d[1] == 1'b1, "done after capture");
  endtask

  task automatic check_frame(input int base_w, input string tag);
    int bad = 0, extra = 0;
    for (int y = 0; y < OH; y++)
      for (int x = 0; x < OW; x++)
        if (!mem.exists(base_w + y * OW + x) || mem[base_w + y * OW + x] != ref_capture(x, y, (SRC - IW) / 2)) begin
          if (bad < 4) $display("  %s pixel (%0d,%0d) got %h expected %h", tag, x, y,
                                mem.exists(base_w + y * OW + x) ? mem[base_w + y * OW + x] : 16'hxxxx,
                                ref_capture(x, y, (SRC - IW) / 2));
          bad++;
        end
    foreach (mem[k]) if (k < base_w || k >= base_w + OW * OH) extra++;
    check(bad == 0, $sformatf("%s: %0d pixels wrong", tag, bad));
    check(extra == 0, $sformatf("%s: %0d writes outside the frame", tag, extra));
  endtask

  initial begin
    int f0;
    repeat (4) @(posedge clk27);
    rst27_n = 1'b1;
    rst_n   = 1'b1;
    wait (src.fields >= 1);
    capture(100);
    check_frame(100, "capture 1");
    check(fdones == 1, "one frame_done pulse");
    check(stalls > 0, "memory wait states stalled the writer");
    mem.delete();
    capture(2000);
    check_frame(2000, "capture 2");
    bus_read(25'h8, d);
    check(d == 2, $sformatf("frame count %0d", d));
    bus_read(25'h4, d);
    check(d == 2000, "base register reads back");
    bus_read(25'h0, d);
    check(d[2] == 1'b0, "no overflow so far");
    check(ovfc == 0, "overflow counter 0");
    // overflow: the memory stays busy while a capture is pending
    hold = 1;
    bus_write(25'h0, 32'h1);
    f0 = src.fields;
    while (src.fields < f0 + 3) @(posedge clk);
    check(ovfc > 0, $sformatf("overflow counted (%0d)", ovfc));
    bus_read(25'h0, d);
    check(d[2] == 1'b1, "overflow flag set");
    hold = 0;
    do bus_read(25'h0, d); while (d[0]);
    mem.delete();
    capture(300);
    check_frame(300, "capture after overflow");
    bus_read(25'h8, d);
    check(d == 4, $sformatf("frame count %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
