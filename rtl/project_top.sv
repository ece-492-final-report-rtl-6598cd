// project_top: FPGA side of the automated receptionist.
//
// A soft processor (outside this RTL; its data master and interrupt line are
// ports) runs the receptionist's software. Through the avalon_decoder it
// reaches:
//   * the IR sensor interface on GPIO_0[0], whose interrupt announces a guest,
//   * the solenoid latch output on GPIO_0[1] (through a Darlington driver),
//   * the audio DAC FIFO that plays greeting and answer messages on the codec,
//   * the SD-card PIOs (DAT, DAT3, CMD, CLK) used to read the .WAV files,
//   * the video-in core, which captures one 320x240 photo into the SRAM,
//   * the SRAM (through the arbiter it shares with the video-in core),
//   * green and red LED PIOs.
// Next to the bus, i2c_av_config sets up the audio codec and the TV decoder
// after reset, and reset_delay stretches the KEY[0] reset.
// Clocks: clk_sys is the 100 MHz system clock, CLOCK_50 the board clock
// (reset delay and I2C, which must run from 50 MHz), CLOCK_27 the TV-decoder
// byte clock and clk_audio the 18.432 MHz codec chip clock; the PLLs that
// make clk_sys and clk_audio are outside this RTL. The reset from reset_delay
// is synchronised into each clock domain.
// Bidirectional pads (I2C_SDAT, GPIO_0, SD lines, SRAM_DQ) are split into
// _i/_o/_oe signals; the pad tristate buffers belong to the board wrapper.
// The set of peripherals and clocks follows the source system; pin choices
// on GPIO_0, the split pads and the interrupt being a single line are this
// design's choices. TD_HS, TD_VS and AUD_ADCDAT are accepted and unused:
// the decoder takes its timing from the codes embedded in TD_DATA, and the
// design does not record audio.
// VGA: vga_adapter keeps a 320x240 copy of the last photo, one bit per
// colour channel (the top bit of each RGB565 channel), and shows it on the
// VGA output at 640x480 from the 25 MHz clk_vga, whose PLL is outside this
// RTL too.
module project_top
  import ar_pkg::*;
(
  input  logic        CLOCK_50,
  input  logic        clk_sys,
  input  logic        CLOCK_27,
  input  logic        clk_audio,
  input  logic [3:0]  KEY,

  input  avm_req_t    cpu_req,
  output avm_rsp_t    cpu_rsp,
  output logic        cpu_irq,

  input  logic [7:0]  TD_DATA,
  input  logic        TD_HS,
  input  logic        TD_VS,
  output logic        TD_RESET,

  output logic        I2C_SCLK,
  input  logic        I2C_SDAT_i,
  output logic        I2C_SDAT_oe,

  input  logic [35:0] GPIO_0_i,
  output logic [35:0] GPIO_0_o,
  output logic [35:0] GPIO_0_oe,

  input  logic        SD_DAT_i,
  output logic        SD_DAT_o,
  output logic        SD_DAT_oe,
  input  logic        SD_DAT3_i,
  output logic        SD_DAT3_o,
  output logic        SD_DAT3_oe,
  input  logic        SD_CMD_i,
  output logic        SD_CMD_o,
  output logic        SD_CMD_oe,
  output logic        SD_CLK,

  output logic        AUD_XCK,
  output logic        AUD_BCLK,
  output logic        AUD_DACLRCK,
  output logic        AUD_DACDAT,
  output logic        AUD_ADCLRCK,
  input  logic        AUD_ADCDAT,

  output logic [17:0] SRAM_ADDR,
  output logic [15:0] SRAM_DQ_o,
  output logic        SRAM_DQ_oe,
  input  logic [15:0] SRAM_DQ_i,
  output logic        SRAM_WE_N,
  output logic        SRAM_OE_N,
  output logic        SRAM_CE_N,
  output logic        SRAM_UB_N,
  output logic        SRAM_LB_N,

  input  logic        clk_vga,
  output logic [9:0]  VGA_R,
  output logic [9:0]  VGA_G,
  output logic [9:0]  VGA_B,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK_N,
  output logic        VGA_SYNC_N,
  output logic        VGA_CLK,

  output logic [8:0]  LEDG,
  output logic [17:0] LEDR
);

  // ---------------- resets ----------------
  logic rst50_n;
  logic [1:0] rs_sys, rs_aud, rs_27;
  logic [1:0] rs_vga;
  logic rst_n, rst_aud_n, rst27_n, rst_vga_n;

  reset_delay u_rst (.clk(CLOCK_50), .key_n(KEY[0]), .rst_n_out(rst50_n));

  // Each clock domain gets the reset asserted at once and released in step
  // with its own clock. rst50_n is thus an asynchronous reset here and a
  // synchronous one for i2c_av_config, which runs on CLOCK_50, the clock
  // rst50_n is made on; a lint warning about the mixed use stands for that.
  always_ff @(posedge clk_sys or negedge rst50_n)
    if (!rst50_n) rs_sys <= '0; else rs_sys <= {rs_sys[0], 1'b1};
  always_ff @(posedge clk_audio or negedge rst50_n)
    if (!rst50_n) rs_aud <= '0; else rs_aud <= {rs_aud[0], 1'b1};
  always_ff @(posedge CLOCK_27 or negedge rst50_n)
    if (!rst50_n) rs_27 <= '0; else rs_27 <= {rs_27[0], 1'b1};
  always_ff @(posedge clk_vga or negedge rst50_n)
    if (!rst50_n) rs_vga <= '0; else rs_vga <= {rs_vga[0], 1'b1};
  assign rst_vga_n = rs_vga[1];
  assign rst_n     = rs_sys[1];
  assign rst_aud_n = rs_aud[1];
  assign rst27_n   = rs_27[1];
  assign TD_RESET  = rst50_n;

  // ---------------- I2C set-up of codec and TV decoder ----------------
  logic       cfg_done;
  logic [5:0] cfg_entry;
  logic [7:0] cfg_retries;

  i2c_av_config u_cfg (
    .clk(CLOCK_50), .rst_n(rst50_n), .config_done(cfg_done), .entry(cfg_entry), .retries(cfg_retries),
    .scl(I2C_SCLK), .sda_oe(I2C_SDAT_oe), .sda_i(I2C_SDAT_i)
  );

  // ---------------- bus ----------------
  avm_req_t s_req [NUM_SLAVES];
  avm_rsp_t s_rsp [NUM_SLAVES];
  logic     decode_error;

  avalon_decoder u_bus (
    .clk(clk_sys), .rst_n, .m_req(cpu_req), .m_rsp(cpu_rsp), .s_req, .s_rsp, .decode_error
  );

  // ---------------- GPIO: sensor and latch ----------------
  logic latch_q;

  ir_sensor_interface #(.WIDTH(1)) u_sensor (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_SENSOR]), .avs_rsp(s_rsp[SL_SENSOR]),
    .pin_in(GPIO_0_i[0]), .irq(cpu_irq)
  );

  output_pio #(.WIDTH(1)) u_latch (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_LATCH]), .avs_rsp(s_rsp[SL_LATCH]), .pin_out(latch_q)
  );

  always_comb begin
    GPIO_0_o     = '0;
    GPIO_0_oe    = '0;
    GPIO_0_o[1]  = latch_q;
    GPIO_0_oe[1] = 1'b1;
  end

  // ---------------- LEDs ----------------
  output_pio #(.WIDTH(9)) u_led (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_LED]), .avs_rsp(s_rsp[SL_LED]), .pin_out(LEDG)
  );
  output_pio #(.WIDTH(18)) u_red_led (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_RED_LED]), .avs_rsp(s_rsp[SL_RED_LED]), .pin_out(LEDR)
  );

  // ---------------- SD card (software SPI) ----------------
  bidir_pio #(.WIDTH(1)) u_sd_dat (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_SD_DAT]), .avs_rsp(s_rsp[SL_SD_DAT]),
    .pin_i(SD_DAT_i), .pin_o(SD_DAT_o), .pin_oe(SD_DAT_oe)
  );
  bidir_pio #(.WIDTH(1)) u_sd_dat3 (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_SD_DAT3]), .avs_rsp(s_rsp[SL_SD_DAT3]),
    .pin_i(SD_DAT3_i), .pin_o(SD_DAT3_o), .pin_oe(SD_DAT3_oe)
  );
  bidir_pio #(.WIDTH(1)) u_sd_cmd (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_SD_CMD]), .avs_rsp(s_rsp[SL_SD_CMD]),
    .pin_i(SD_CMD_i), .pin_o(SD_CMD_o), .pin_oe(SD_CMD_oe)
  );
  output_pio #(.WIDTH(1)) u_sd_clk (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_SD_CLK]), .avs_rsp(s_rsp[SL_SD_CLK]), .pin_out(SD_CLK)
  );

  // ---------------- audio ----------------
  logic [15:0] audio_underflows;

  audio_dac_fifo u_audio (
    .clk(clk_sys), .rst_n, .avs_req(s_req[SL_AUDIO]), .avs_rsp(s_rsp[SL_AUDIO]),
    .aud_clk(clk_audio), .aud_rst_n(rst_aud_n),
    .AUD_XCK, .AUD_BCLK, .AUD_DACLRCK, .AUD_DACDAT, .underflow_count(audio_underflows)
  );
  assign AUD_ADCLRCK = AUD_DACLRCK;

  // ---------------- video in and SRAM ----------------
  sram_req_t   cpu_sram_req, vid_sram_req, sram_req;
  sram_rsp_t   cpu_sram_rsp, vid_sram_rsp, sram_rsp;
  logic        frame_done;
  logic [15:0] video_overflows;
  logic        pix_valid;
  logic [8:0]  pix_x;
  logic [7:0]  pix_y;
  rgb565_t     pix_rgb;

  video_in u_video (
    .clk(clk_sys), .rst_n, .clk27(CLOCK_27), .rst27_n, .td_data(TD_DATA),
    .avs_req(s_req[SL_VIDEO]), .avs_rsp(s_rsp[SL_VIDEO]),
    .m_req(vid_sram_req), .m_rsp(vid_sram_rsp),
    .frame_done, .pix_valid, .pix_x, .pix_y, .pix_rgb, .overflow_count(video_overflows)
  );

  // ---------------- VGA display of the photo ----------------

  vga_adapter #(.WIDTH(320), .HEIGHT(240), .BITS(1)) u_vga (
    .clk(clk_sys), .plot(pix_valid), .x(pix_x), .y(pix_y),
    .colour({pix_rgb.r[4], pix_rgb.g[5], pix_rgb.b[4]}),
    .vga_clk(clk_vga), .vga_rst_n(rst_vga_n),
    .VGA_R, .VGA_G, .VGA_B, .VGA_HS, .VGA_VS, .VGA_BLANK_N, .VGA_SYNC_N, .VGA_CLK
  );

  // The processor sees one SRAM word (zero-extended) per 32-bit bus word.
  always_comb begin
    cpu_sram_req.address    = s_req[SL_SRAM].address[19:2];
    cpu_sram_req.read       = s_req[SL_SRAM].read;
    cpu_sram_req.write      = s_req[SL_SRAM].write;
    cpu_sram_req.writedata  = s_req[SL_SRAM].writedata[15:0];
    cpu_sram_req.byteenable = s_req[SL_SRAM].byteenable[1:0];
    s_rsp[SL_SRAM].readdata      = {16'b0, cpu_sram_rsp.readdata};
    s_rsp[SL_SRAM].waitrequest   = cpu_sram_rsp.waitrequest;
    s_rsp[SL_SRAM].readdatavalid = cpu_sram_rsp.readdatavalid;
  end

  sram_arbiter u_arb (
    .clk(clk_sys), .rst_n,
    .m0_req(cpu_sram_req), .m0_rsp(cpu_sram_rsp),
    .m1_req(vid_sram_req), .m1_rsp(vid_sram_rsp),
    .s_req(sram_req), .s_rsp(sram_rsp)
  );

  sram_controller u_sram (
    .clk(clk_sys), .rst_n, .s_req(sram_req), .s_rsp(sram_rsp),
    .SRAM_ADDR, .SRAM_DQ_o, .SRAM_DQ_oe, .SRAM_DQ_i,
    .SRAM_WE_N, .SRAM_OE_N, .SRAM_CE_N, .SRAM_UB_N, .SRAM_LB_N
  );

endmodule
