// tb_audio_dac_fifo: self-checking test of the audio output path.
// The processor side writes 400 non-zero samples as fast as the bus allows
// (so the 256-word FIFO fills and writes stall); a codec model shifts in
// AUD_DACDAT on rising AUD_BCLK and collects one word per AUD_DACLRCK half.
// Checks the received words and their channel order, the LRCK period of
// 384 chip-clock cycles (48 kHz from 18.432 MHz), 16 BCLK periods per half,
// the stall, the status register and the underflow zeros after the data.
module tb_audio_dac_fifo;
  import ar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, aclk = 1'b0, arst_n = 1'b0;
  always #5 clk = ~clk;
  always #27 aclk = ~aclk;
  avm_req_t req = '0;
  avm_rsp_t rsp;
  logic xck, bclk, lrck, dat;
  logic [15:0] ufc;
  logic [31:0] d;
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

  audio_dac_fifo dut (.clk, .rst_n, .avs_req(req), .avs_rsp(rsp), .aud_clk(aclk), .aud_rst_n(arst_n),
    .AUD_XCK(xck), .AUD_BCLK(bclk), .AUD_DACLRCK(lrck), .AUD_DACDAT(dat), .underflow_count(ufc));

  // watchdog
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [24:0] B = MAP_AUDIO.base;
  localparam int N = 400;
  logic [15:0] sent [N];
  logic [15:0] got [$];
  logic        got_lr [$];
  logic [15:0] col = '0;
  int          nbits = 0, stalls = 0;
  // codec model
  always @(posedge bclk) begin col = {col[14:0], dat}; nbits++; end
  logic lr_d = 1'b0;
  longint t_last = 0, period_cycles = 0;
  int acnt = 0, lr_edges = 0, bad_period = 0, bad_bits = 0;
  always @(posedge aclk) acnt++;
  always @(lrck) begin
    lr_edges++;
    if (lr_edges > 1) begin
      got.push_back(col);
      got_lr.push_back(!lrck);    // channel of the word just finished
      if (lr_edges > 2 && nbits != 16) bad_bits++;
    end
    if (lrck) begin
      if (t_last != 0 && (acnt - t_last) != 384) bad_period++;
      t_last = acnt;
    end
    nbits = 0;
  end
  always @(posedge clk) if (req.write && rsp.waitrequest) stalls++;

  initial begin
    int first;
    for (int i = 0; i < N; i++) sent[i] = 16'($urandom) | 16'h0001;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    bus_read(B + 4, d); check(d[9:0] == 0 && !d[10], "status empty after reset");
    fork
      begin
        repeat (20) @(posedge clk);
        arst_n = 1'b1;
      end
      for (int i = 0; i < N; i++) bus_write(B, {16'h0, sent[i]});
    join
    check(stalls > 0, "writes stalled while the FIFO was full");
    // wait until all is played and a few underflows follow
    wait (got.size() > N + 24);
    repeat (400) @(posedge aclk);
    first = 0;
    while (first < got.size() && got[first] == 0) first++;
    check(got.size() >= first + N, "enough words received");
    for (int i = 0; i < N; i++) begin
      check(got[first + i] == sent[i], $sformatf("sample %0d: got %h sent %h", i, got[first + i], sent[i]));
      check(got_lr[first + i] == (i % 2 == 0), "left/right alternation");
    end
    check(got[first + N] == 16'h0, "zero after the last sample (underflow)");
    check(got_lr[first] == 1'b1, "first sample on the left channel");
    check(bad_period == 0, "LRCK period is 384 chip-clock cycles");
    check(bad_bits == 0, "16 bit clocks per channel");
    bus_read(B + 4, d); check(d[11], "underflow flag set");
    check(xck === aclk, "AUD_XCK is the chip clock");
    // resume after an underflow: a pair written just after a left edge must
    // wait for the next left edge instead of starting on the right channel
    begin
      int base_n, k;
      @(posedge lrck);
      bus_write(B, 32'h0000_A5A5);
      bus_write(B, 32'h0000_5A5B);
      base_n = got.size();
      repeat (3000) @(posedge aclk);
      k = base_n;
      while (k < got.size() && got[k] != 16'hA5A5) k++;
      check(k + 1 < got.size(), "resumed pair received");
      if (k + 1 < got.size()) begin
        check(got_lr[k] == 1'b1, "resumed pair starts on the left channel");
        check(got[k + 1] == 16'h5A5B && got_lr[k + 1] == 1'b0, "second word on the right channel");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
