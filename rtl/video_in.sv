// video_in: camera capture path, from the TV decoder's byte stream to an
// RGB photo of the guest in the SRAM.
//
// Chain: itu656_decoder (27 MHz) -> video-in buffer (dual-clock FIFO into the
// system clock) -> video_deinterlacer -> ycrcb422_to_444 -> video_resize ->
// ycrcb_to_rgb -> frame writer. The chain runs all the time; the writer
// throws frames away until the processor asks for a capture. It then waits
// for the next start of frame and writes that whole OUT_W x OUT_H frame, one
// RGB565 word per pixel at word address base + y*OUT_W + x, through its
// master port to the SRAM, and sets done. If the SRAM is busy the writer
// stalls the chain; if the buffer is full when the decoder has a pixel, the
// pixel is lost and the overflow flag is set.
// Control slave (system clock):
//   word 0  write bit 0: start a capture (clears done)
//           read: [0] busy, [1] done, [2] overflow seen
//   word 1  frame base, SRAM word address (read/write, reset 0)
//   word 2  read: number of frames captured
// pix_valid/pix_x/pix_y/pix_rgb repeat every pixel written to the SRAM with
// its position, so that a frame buffer display can show the photo too.
// Follows the source system: the component chain, the 640x480 to 320x240
// RGB result, a capture started by the web-server task on a page request,
// and the frame kept in SRAM for the processor to read. This design's
// choice: the control registers, RGB565 pixels and the buffer depth.
module video_in
  import ar_pkg::*;
#(
  parameter int unsigned SRC_PIXELS  = 720,
  parameter int unsigned IN_W        = 640,
  parameter int unsigned IN_H        = 480,
  parameter int unsigned BUF_DEPTH   = 512
) (
  input  logic        clk,          // system clock
  input  logic        rst_n,
  input  logic        clk27,
  input  logic        rst27_n,
  input  logic [7:0]  td_data,

  input  avm_req_t    avs_req,
  output avm_rsp_t    avs_rsp,

  output sram_req_t   m_req,
  input  sram_rsp_t   m_rsp,

  output logic        frame_done,   // one-cycle pulse per captured frame
  output logic        pix_valid,    // a captured pixel is written this cycle
  output logic [8:0]  pix_x,
  output logic [7:0]  pix_y,
  output rgb565_t     pix_rgb,
  output logic [15:0] overflow_count // clk27 domain, for monitoring
);

  localparam int unsigned OUT_W = IN_W / 2;
  localparam int unsigned OUT_H = IN_H / 2;
  localparam int unsigned OXW   = $clog2(OUT_W);
  localparam int unsigned OYW   = $clog2(OUT_H);
  localparam int unsigned FAW   = $clog2(OUT_W * OUT_H);

  typedef struct packed {
    logic    field;
    logic    sof;
    logic    eol;
    ycc422_t px;
  } vbuf_t;

  // ---------------- 27 MHz side ----------------
  logic    dec_valid, dec_sof, dec_eol, dec_field, buf_full;
  ycc422_t dec_data;
  logic    ovf_seen27;

  itu656_decoder #(.SRC_PIXELS(SRC_PIXELS), .H_ACTIVE(IN_W), .H_OFFSET((SRC_PIXELS - IN_W) / 2),
                   .FIELD_LINES(IN_H / 2)) u_dec (
    .clk(clk27), .rst_n(rst27_n), .td_data,
    .out_valid(dec_valid), .out_data(dec_data), .out_sof(dec_sof), .out_eol(dec_eol), .out_field(dec_field)
  );

  always_ff @(posedge clk27) begin
    if (!rst27_n) begin
      overflow_count <= '0;
      ovf_seen27     <= 1'b0;
    end else if (dec_valid && buf_full) begin
      overflow_count <= overflow_count + 1'b1;
      ovf_seen27     <= 1'b1;
    end
  end

  // ---------------- video-in buffer ----------------
  vbuf_t buf_in, buf_out;
  logic  buf_empty, di_ready;

  assign buf_in = '{field: dec_field, sof: dec_sof, eol: dec_eol, px: dec_data};

  dual_clock_fifo #(.WIDTH($bits(vbuf_t)), .DEPTH(BUF_DEPTH)) u_buf (
    .wr_clk(clk27), .wr_rst_n(rst27_n), .wr_en(dec_valid),
    .wr_data(buf_in),
    .wr_full(buf_full), .wr_used(),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(di_ready),
    .rd_data(buf_out), .rd_empty(buf_empty), .rd_used()
  );

  // ---------------- system-clock processing chain ----------------
  logic    s1_valid, s1_ready, s1_sof, s1_eol;
  ycc422_t s1_data;
  logic    s2_valid, s2_ready, s2_sof, s2_eol;
  ycc444_t s2_data;
  logic    s3_valid, s3_ready, s3_sof, s3_eol;
  ycc444_t s3_data;
  logic    s4_valid, s4_ready, s4_sof, s4_eol;
  rgb888_t s4_data;

  video_deinterlacer #(.WIDTH(IN_W)) u_deint (
    .clk, .rst_n,
    .in_valid(!buf_empty), .in_ready(di_ready), .in_data(buf_out.px),
    .in_sof(buf_out.sof), .in_eol(buf_out.eol), .in_field(buf_out.field),
    .out_valid(s1_valid), .out_ready(s1_ready), .out_data(s1_data), .out_sof(s1_sof), .out_eol(s1_eol)
  );

  ycrcb422_to_444 u_444 (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_ready(s1_ready), .in_data(s1_data), .in_sof(s1_sof), .in_eol(s1_eol),
    .out_valid(s2_valid), .out_ready(s2_ready), .out_data(s2_data), .out_sof(s2_sof), .out_eol(s2_eol)
  );

  video_resize #(.IN_W(IN_W), .IN_H(IN_H)) u_resize (
    .clk, .rst_n,
    .in_valid(s2_valid), .in_ready(s2_ready), .in_data(s2_data), .in_sof(s2_sof), .in_eol(s2_eol),
    .out_valid(s3_valid), .out_ready(s3_ready), .out_data(s3_data), .out_sof(s3_sof), .out_eol(s3_eol)
  );

  ycrcb_to_rgb u_rgb (
    .clk, .rst_n,
    .in_valid(s3_valid), .in_ready(s3_ready), .in_data(s3_data), .in_sof(s3_sof), .in_eol(s3_eol),
    .out_valid(s4_valid), .out_ready(s4_ready), .out_data(s4_data), .out_sof(s4_sof), .out_eol(s4_eol)
  );

  // ---------------- frame writer ----------------
  typedef enum logic [1:0] {W_IDLE, W_ARMED, W_CAPTURE} wstate_e;
  wstate_e       wstate;
  logic [OXW-1:0] wx, cx;
  logic [OYW-1:0] wy, cy;
  logic [FAW-1:0] pix_addr;
  logic [17:0]    base;
  logic           done_q;
  logic [15:0]    frames;
  logic           writing, last_px;

  assign cx      = s4_sof ? '0 : wx;
  assign cy      = s4_sof ? '0 : wy;
  assign writing = s4_valid && ((wstate == W_CAPTURE) || (wstate == W_ARMED && s4_sof));
  assign last_px = (cx == OXW'(OUT_W - 1)) && (cy == OYW'(OUT_H - 1));

  vga_address_translator #(.WIDTH(OUT_W), .HEIGHT(OUT_H), .AW(FAW)) u_xlat (
    .x(cx), .y(cy), .address(pix_addr)
  );

  always_comb begin
    m_req            = '0;
    m_req.write      = writing;
    m_req.address    = base + 18'(pix_addr);
    m_req.writedata  = to_rgb565(s4_data);
    m_req.byteenable = 2'b11;
  end
  assign s4_ready = writing ? !m_rsp.waitrequest : 1'b1;

  // Copy of each accepted frame write, for a display of the photo.
  assign pix_valid = writing && !m_rsp.waitrequest;
  assign pix_x     = 9'(cx);
  assign pix_y     = 8'(cy);
  assign pix_rgb   = to_rgb565(s4_data);

  logic capture_req;
  assign capture_req = avs_req.write && avs_req.address[3:2] == 2'd0 && avs_req.writedata[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstate     <= W_IDLE;
      wx         <= '0;
      wy         <= '0;
      done_q     <= 1'b0;
      frames     <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (s4_valid && s4_ready) begin
        wx <= s4_eol ? '0 : cx + 1'b1;
        wy <= s4_eol ? cy + 1'b1 : cy;
      end
      unique case (wstate)
        W_IDLE:    if (capture_req) begin
                     wstate <= W_ARMED;
                     done_q <= 1'b0;
                   end
        W_ARMED:   if (writing && !m_rsp.waitrequest) begin
                     wstate <= W_CAPTURE;
                   end
        W_CAPTURE: if (writing && !m_rsp.waitrequest && last_px) begin
                     wstate     <= W_IDLE;
                     done_q     <= 1'b1;
                     frames     <= frames + 1'b1;
                     frame_done <= 1'b1;
                   end
        default:   wstate <= W_IDLE;
      endcase
    end
  end

  // ---------------- control slave ----------------
  logic ovf_s1, ovf_s2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base    <= '0;
      ovf_s1  <= 1'b0;
      ovf_s2  <= 1'b0;
      avs_rsp <= AVM_RSP_IDLE;
    end else begin
      ovf_s1 <= ovf_seen27;
      ovf_s2 <= ovf_s1;
      if (avs_req.write && avs_req.address[3:2] == 2'd1) base <= avs_req.writedata[17:0];
      avs_rsp.readdatavalid <= avs_req.read;
      unique case (avs_req.address[3:2])
        2'd0:    avs_rsp.readdata <= {29'b0, ovf_s2, done_q, wstate != W_IDLE};
        2'd1:    avs_rsp.readdata <= {14'b0, base};
        2'd2:    avs_rsp.readdata <= {16'b0, frames};
        default: avs_rsp.readdata <= '0;
      endcase
    end
  end

endmodule
