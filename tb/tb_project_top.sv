// tb_project_top: end-to-end test of the automated-receptionist hardware at
// full size (the top has no parameters; every block runs with the numbers
// of the source system: 2^20-cycle reset delay, 20 kHz I2C, 48 kHz audio
// from 18.432 MHz, 720-pixel ITU-R 656 fields, 320x240 frame in SRAM).
//
// The testbench plays the processor through the top's bus port and models
// the board around the FPGA: an I2C target for the codec and TV decoder
// (refusing one transfer), an ITU-R 656 camera stream, the SRAM chip, a
// codec receiver on the audio serial lines, the IR sensor line, the latch,
// LEDs and SD card lines. The scenario follows the receptionist's job:
//   1. reset delay, then the I2C set-up runs in the background (checked at
//      the end: 22 register writes in order, one retry);
//   2. bus: an unmapped address (decode error), LEDs, latch on GPIO_0, the
//      SD card lines in both directions;
//   3. a guest breaks the IR beam: interrupt, edge register, clear;
//   4. the greeting is played: samples pushed until the FIFO stalls the
//      bus, the serial words are compared with the samples, the FIFO then
//      runs dry (underflow);
//   5. a photo is taken: capture into SRAM while the processor also uses
//      the SRAM (arbitration), then the whole 320x240 frame is read back
//      over the bus and compared with the reference conversion, and the
//      VGA frame buffer is checked to hold the same photo;
//   6. the system clock is slowed below the camera's pixel rate for a while:
//      the video-in buffer overflows and the flag is seen over the bus.
// Every mechanism (decode error, irq, bus stall, underflow, retry, SRAM
// contention, frame done, overflow) is counted; one that never happened is
// a failure.
module tb_project_top;
  import ar_pkg::*;
  import tb_video_pkg::*;

  logic clk50 = 1'b0, clk = 1'b0, clk27 = 1'b0, clka = 1'b0;
  realtime sys_half = 5.0;
  always #10 clk50 = ~clk50;
  always #(sys_half) clk = ~clk;
  always #18.518 clk27 = ~clk27;
  always #27.127 clka = ~clka;
  logic clkv = 1'b0;
  always #20 clkv = ~clkv;
  logic [9:0] vr, vg, vb; logic vhs, vvs, vblank, vsync, vck;

  logic [3:0]  KEY = 4'hF;
  initial #1 KEY = 4'hE;          // KEY[0] pressed at power-up
  avm_req_t    req = '0;
  avm_rsp_t    rsp;
  logic        irq;
  logic [7:0]  td;
  logic        scl, sda_oe, pull;
  wire         sda = !(sda_oe || pull);
  logic [35:0] gpio_i = '0, gpio_o, gpio_oe;
  logic        sd_dat_i = 1'b1, sd_dat_o, sd_dat_oe, sd_dat3_i = 1'b1, sd_dat3_o, sd_dat3_oe;
  logic        sd_cmd_i = 1'b1, sd_cmd_o, sd_cmd_oe, sd_clk;
  logic        xck, bclk, lrck, dacdat, adclrck;
  logic [17:0] sa; logic [15:0] sdo, sdi; logic sdoe, swe, soe, sce, sub, slb;
  logic [8:0]  ledg; logic [17:0] ledr;
  logic        td_reset;
  logic [31:0] d;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  project_top dut (
    .CLOCK_50(clk50), .clk_sys(clk), .CLOCK_27(clk27), .clk_audio(clka), .KEY,
    .cpu_req(req), .cpu_rsp(rsp), .cpu_irq(irq),
    .TD_DATA(td), .TD_HS(1'b0), .TD_VS(1'b0), .TD_RESET(td_reset),
    .I2C_SCLK(scl), .I2C_SDAT_i(sda), .I2C_SDAT_oe(sda_oe),
    .GPIO_0_i(gpio_i), .GPIO_0_o(gpio_o), .GPIO_0_oe(gpio_oe),
    .SD_DAT_i(sd_dat_i), .SD_DAT_o(sd_dat_o), .SD_DAT_oe(sd_dat_oe),
    .SD_DAT3_i(sd_dat3_i), .SD_DAT3_o(sd_dat3_o), .SD_DAT3_oe(sd_dat3_oe),
    .SD_CMD_i(sd_cmd_i), .SD_CMD_o(sd_cmd_o), .SD_CMD_oe(sd_cmd_oe), .SD_CLK(sd_clk),
    .AUD_XCK(xck), .AUD_BCLK(bclk), .AUD_DACLRCK(lrck), .AUD_DACDAT(dacdat), .AUD_ADCLRCK(adclrck),
    .AUD_ADCDAT(1'b0),
    .SRAM_ADDR(sa), .SRAM_DQ_o(sdo), .SRAM_DQ_oe(sdoe), .SRAM_DQ_i(sdi), .SRAM_WE_N(swe),
    .SRAM_OE_N(soe), .SRAM_CE_N(sce), .SRAM_UB_N(sub), .SRAM_LB_N(slb),
    .clk_vga(clkv), .VGA_R(vr), .VGA_G(vg), .VGA_B(vb), .VGA_HS(vhs), .VGA_VS(vvs), .VGA_BLANK_N(vblank),
    .VGA_SYNC_N(vsync), .VGA_CLK(vck),
    .LEDG(ledg), .LEDR(ledr)
  );

  i2c_slave_model #(.NACK_XFER(5)) i2c (.scl, .sda, .pull_low(pull));
  itu656_source cam (.clk(clk27), .data(td));
  sram_model sram (.addr(sa), .dq_o(sdo), .dq_oe(sdoe), .dq_i(sdi), .we_n(swe), .oe_n(soe), .ce_n(sce),
                   .ub_n(sub), .lb_n(slb));

  // watchdog
  initial begin
    repeat (15000000) @(posedge clk50);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_decode_err = 0, n_irq = 0, n_stall = 0, n_underflow = 0, n_retry = 0;
  int n_contention = 0, n_frame_done = 0, n_overflow = 0;
  logic irq_d = 1'b0;
  always @(posedge clk) begin
    if (dut.rst_n && irq && !irq_d) n_irq++;
    irq_d <= irq;
    if ((req.read || req.write) && rsp.waitrequest) n_stall++;
    if ((dut.cpu_sram_req.read || dut.cpu_sram_req.write) && dut.vid_sram_req.write) n_contention++;
    if (dut.frame_done) n_frame_done++;
  end

  // ---------------- bus master ----------------
  task automatic bus_write(input logic [24:0] a, input logic [31:0] v);
    @(negedge clk);
    req.address = a; req.writedata = v; req.byteenable = 4'hf; req.write = 1'b1;
    #1;
    while (rsp.waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    req.write = 1'b0;
  endtask

  task automatic bus_read(input logic [24:0] a, output logic [31:0] v);
    @(negedge clk);
    req.address = a; req.read = 1'b1;
    #1;
    while (rsp.waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    req.read = 1'b0;
    while (!rsp.readdatavalid) @(negedge clk);
    v = rsp.readdata;
  endtask

  function automatic logic [24:0] sram_byte(int word);
    return MAP_SRAM.base + 25'(word * 4);
  endfunction

  // ---------------- codec receiver ----------------
  logic [15:0] col = '0;
  logic [15:0] got [$];
  logic        got_left [$];
  int lr_edges = 0;
  always @(posedge bclk) col = {col[14:0], dacdat};
  always @(lrck) begin
    lr_edges++;
    if (lr_edges > 1) begin
      got.push_back(col);
      got_left.push_back(!lrck);   // LRCK high carries the left word
    end
  end

  // ---------------- expected I2C set-up ----------------
  localparam logic [23:0] EXP [22] = '{
    24'h34001A, 24'h34021A, 24'h34047B, 24'h34067B, 24'h3408F8, 24'h340A06, 24'h340C00, 24'h340E01,
    24'h341002, 24'h341201, 24'h400000, 24'h401500, 24'h401741, 24'h403A16, 24'h405004, 24'h40C305,
    24'h40C480, 24'h400E80, 24'h405020, 24'h405218, 24'h400E00, 24'h400402};

  localparam int NS = 600;        // audio words (300 stereo frames)
  localparam int W = 320, H = 240;
  localparam int SCRATCH = 200000; // processor's own SRAM words, away from the frame

  logic [15:0] sent [NS];
  bit cpu_done = 0;

  // ---------------- processor scenario ----------------
  initial begin
    int uf0, first, bad, f0;
    repeat (10) @(posedge clk50);
    KEY = 4'hF;                   // release the reset key
    wait (dut.rst_n === 1'b1);
    check(td_reset === 1'b1, "TV decoder out of reset");

    // 2. decode error, LEDs, latch, SD lines
    bus_read(25'h1109060, d);
    check(d == 0 && dut.decode_error, "unmapped address reads 0 and flags a decode error");
    if (dut.decode_error) n_decode_err++;
    bus_write(MAP_LED.base, 32'h1A5);
    bus_write(MAP_RED_LED.base, 32'h2_5A5A);
    check(ledg == 9'h1A5 && ledr == 18'h2_5A5A, "LEDs show the written values");
    bus_read(MAP_LED.base, d);
    check(d[8:0] == 9'h1A5, "LED register reads back");
    check(gpio_o[1] == 1'b0 && gpio_oe[1], "latch output driven and released after reset");
    bus_write(MAP_LATCH.base, 32'h1);
    check(gpio_o[1] == 1'b1, "latch pulled (door unlocked)");
    bus_write(MAP_LATCH.base, 32'h0);
    check(gpio_o[1] == 1'b0, "latch released");
    check(gpio_oe[35:2] == '0 && gpio_oe[0] == 1'b0, "other GPIO_0 pins not driven");
    bus_write(MAP_SD_CMD.base + 4, 32'h1);   // direction: output
    bus_write(MAP_SD_CMD.base, 32'h0);
    check(sd_cmd_oe && !sd_cmd_o, "SD command line driven low");
    bus_write(MAP_SD_CLK.base, 32'h1);
    check(sd_clk, "SD clock high");
    bus_write(MAP_SD_DAT3.base + 4, 32'h1);
    bus_write(MAP_SD_DAT3.base, 32'h0);
    check(sd_dat3_oe && !sd_dat3_o, "SD chip select low");
    sd_dat_i = 1'b0;
    repeat (4) @(posedge clk);
    bus_read(MAP_SD_DAT.base, d);
    check(!sd_dat_oe && d[0] == 1'b0, "SD data line read as input (0)");
    sd_dat_i = 1'b1;
    repeat (4) @(posedge clk);
    bus_read(MAP_SD_DAT.base, d);
    check(d[0] == 1'b1, "SD data line read as input (1)");

    // 3. a guest breaks the beam
    bus_write(MAP_SENSOR.base + 8, 32'h1);   // interrupt mask
    check(!irq, "no interrupt before the beam changes");
    gpio_i[0] = 1'b1;
    repeat (10) @(posedge clk);
    check(irq, "sensor edge raises the interrupt");
    bus_read(MAP_SENSOR.base + 12, d);
    check(d[0] == 1'b1, "edge-capture bit set");
    bus_read(MAP_SENSOR.base, d);
    check(d[0] == 1'b1, "sensor level reads 1");
    bus_write(MAP_SENSOR.base + 12, 32'h1);
    repeat (2) @(posedge clk);
    check(!irq, "interrupt cleared");
    gpio_i[0] = 1'b0;

    // 4. greeting
    for (int i = 0; i < NS; i++) sent[i] = {8'(i + 1), 8'(i * 37 + 5)};
    begin
      int st0;
      st0 = n_stall;
      for (int i = 0; i < NS; i++) bus_write(MAP_AUDIO.base, 32'(sent[i]));
      check(n_stall - st0 > 100, $sformatf("full FIFO stalled the bus (%0d cycles)", n_stall - st0));
    end
    bus_read(MAP_AUDIO.base + 4, d);
    check(d[9:0] > 0, "samples waiting in the FIFO");
    uf0 = dut.audio_underflows;
    wait (dut.u_audio.u_fifo.rd_empty);
    repeat (2000) @(posedge clk);
    n_underflow = dut.audio_underflows - uf0;
    check(n_underflow > 0, "FIFO ran dry after the greeting");
    first = 0;
    while (first < got.size() && got[first] != sent[0]) first++;
    check(first + NS <= got.size(), "whole greeting received");
    bad = 0;
    for (int i = 0; i < NS && first + i < got.size(); i++) if (got[first + i] != sent[i]) bad++;
    check(bad == 0, $sformatf("%0d audio words differ", bad));
    check(first < got.size() && got_left[first], "greeting starts on the left channel");
    if (first + NS < got.size()) check(got[first + NS] == 16'h0, "silence after the greeting");

    // 5. photo, with the processor using the SRAM at the same time
    bus_write(MAP_VIDEO.base + 4, 32'h0);    // frame base
    bus_write(MAP_VIDEO.base, 32'h1);
    bus_read(MAP_VIDEO.base, d);
    check(d[0] && !d[1], "capture busy");
    begin
      int k;
      k = 0;
      do begin
        bus_write(sram_byte(SCRATCH + (k % 4096)), 32'(k ^ 16'h3C3C));
        bus_read(sram_byte(SCRATCH + (k % 4096)), d);
        check(d[15:0] == 16'(k ^ 16'h3C3C), "processor SRAM data during the capture");
        k++;
        if (k % 64 == 0) begin
          bus_read(MAP_VIDEO.base, d);
        end else d[0] = 1'b1;
      end while (d[0]);
    end
    check(d[1], "capture done");
    check(n_contention > 0, $sformatf("processor and video contended for SRAM (%0d)", n_contention));
    bus_read(MAP_VIDEO.base + 8, d);
    check(d == 1, "one frame captured");
    bad = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bus_read(sram_byte(y * W + x), d);
        if (d[15:0] != ref_capture(x, y, 40)) begin
          if (bad < 5) $display("  pixel (%0d,%0d) %h expected %h", x, y, d[15:0], ref_capture(x, y, 40));
          bad++;
        end
      end
    check(bad == 0, $sformatf("%0d of 76800 photo pixels differ", bad));
    // the VGA frame buffer holds the photo at one bit per colour channel
    bad = 0;
    for (int i = 0; i < W * H; i += 7) begin
      logic [15:0] e;
      e = ref_capture(i % W, i / W, 40);
      if (dut.u_vga.fb[i] != {e[15], e[10], e[4]}) bad++;
    end
    check(bad == 0, $sformatf("%0d VGA frame-buffer pixels differ", bad));
    bus_read(MAP_VIDEO.base, d);
    check(!d[2], "no overflow at full speed");

    // 6. system clock too slow for the camera
    sys_half = 100.0;
    f0 = cam.fields;
    while (cam.fields < f0 + 1 && dut.video_overflows == 0) @(posedge clk27);
    repeat (20000) @(posedge clk27);
    sys_half = 5.0;
    n_overflow = dut.video_overflows;
    check(n_overflow > 0, $sformatf("video buffer overflowed (%0d pixels lost)", n_overflow));
    bus_read(MAP_VIDEO.base, d);
    check(d[2], "overflow flag seen on the bus");
    cpu_done = 1;
  end

  // ---------------- end ----------------
  initial begin
    wait (cpu_done);
    wait (dut.cfg_done);
    repeat (100) @(posedge clk50);
    check(i2c.n_xfers == 22, $sformatf("22 register writes (%0d)", i2c.n_xfers));
    for (int i = 0; i < 22; i++) check(i2c.xfers[i] == EXP[i], $sformatf("I2C write %0d = %h", i, i2c.xfers[i]));
    check(i2c.errors == 0, "no I2C protocol errors");
    n_retry = dut.cfg_retries;
    check(sram.conflicts == 0, "no SRAM data bus conflict");
    $display("mechanisms: decode_error=%0d irq=%0d stall=%0d underflow=%0d retry=%0d contention=%0d frame_done=%0d overflow=%0d",
             n_decode_err, n_irq, n_stall, n_underflow, n_retry, n_contention, n_frame_done, n_overflow);
    check(n_decode_err > 0, "mechanism: decode error");
    check(n_irq > 0, "mechanism: interrupt");
    check(n_stall > 0, "mechanism: bus stall");
    check(n_underflow > 0, "mechanism: audio underflow");
    check(n_retry > 0, "mechanism: I2C retry");
    check(n_contention > 0, "mechanism: SRAM contention");
    check(n_frame_done > 0, "mechanism: frame done");
    check(n_overflow > 0, "mechanism: video overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
