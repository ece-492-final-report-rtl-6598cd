// audio_dac_fifo: processor-fed audio output to the WM8731 codec DAC.
//
// The audio task reads 16-bit stereo PCM (.WAV, 48 kHz) from the SD card and
// writes the samples, left and right alternately, to this slave. They wait in
// a 16-bit x 256-word dual-clock FIFO and are shifted out to the codec in the
// codec's own clock domain (aud_clk, the 18.432 MHz chip clock that also goes
// out as AUD_XCK). The serial format is left-justified, MSB first, 16 bits
// per channel: AUD_DACLRCK is high for the left and low for the right sample,
// AUD_BCLK runs at 32 x 48 kHz, AUD_DACDAT changes on its falling edge and the
// codec samples it on the rising edge. One FIFO word is taken at every
// LRCK edge; if the FIFO is empty a zero sample is sent and counted as an
// underflow, and playback resumes on the next left-channel edge, so that a
// late sample can never swap the two channels. When the FIFO is full a write is stalled with waitrequest, which
// throttles the processor to the playback rate.
//   word 0  write: push writedata[15:0]
//   word 1  read: [9:0] words in FIFO, [10] full, [11] underflow seen
// What follows the source system: the 16 x 256 FIFO, 48 kHz two-channel
// 16-bit playback, the 18.4 MHz codec clock, the processor filling the FIFO.
// This design's choice: the register layout, left-justified format (matching
// the codec format word written by i2c_av_config), bit clock of 32 fs and
// zero-fill on underflow.
module audio_dac_fifo
  import ar_pkg::*;
#(
  parameter int unsigned XCK_HZ      = 18_432_000,
  parameter int unsigned SAMPLE_RATE = 48_000,
  parameter int unsigned SAMPLE_BITS = 16,
  parameter int unsigned FIFO_DEPTH  = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  avm_req_t    avs_req,
  output avm_rsp_t    avs_rsp,

  input  logic        aud_clk,
  input  logic        aud_rst_n,
  output logic        AUD_XCK,
  output logic        AUD_BCLK,
  output logic        AUD_DACLRCK,
  output logic        AUD_DACDAT,
  output logic [15:0] underflow_count   // aud_clk domain, for monitoring
);

  localparam int unsigned BCLK_HALF = XCK_HZ / (SAMPLE_RATE * SAMPLE_BITS * 2 * 2);
  localparam int unsigned BCW       = $clog2(2 * BCLK_HALF);
  localparam int unsigned BITW      = $clog2(SAMPLE_BITS);
  localparam int unsigned UW        = $clog2(FIFO_DEPTH) + 1;

  initial begin
    if (BCLK_HALF < 1) $error("audio clock too slow for the sample format");
  end

  // ---------------- bus side ----------------
  logic          push, full, word_is0, word_is1;
  logic [UW-1:0] used;
  logic          uf_sync1, uf_sync2, uf_seen;

  assign word_is0 = avs_req.address[3:2] == 2'd0;
  assign word_is1 = avs_req.address[3:2] == 2'd1;
  assign push     = avs_req.write && word_is0 && !full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      avs_rsp.readdatavalid <= 1'b0;
      avs_rsp.readdata      <= '0;
      uf_sync1              <= 1'b0;
      uf_sync2              <= 1'b0;
    end else begin
      uf_sync1              <= uf_seen;
      uf_sync2              <= uf_sync1;
      avs_rsp.readdatavalid <= avs_req.read;
      avs_rsp.readdata      <= '0;
      if (word_is1) avs_rsp.readdata[11:0] <= {uf_sync2, full, 10'(used)};
    end
  end
  assign avs_rsp.waitrequest = avs_req.write && word_is0 && full;

  // ---------------- FIFO ----------------
  logic        pop, empty;
  logic [15:0] head;

  dual_clock_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk (clk),     .wr_rst_n (rst_n),     .wr_en (push), .wr_data (avs_req.writedata[15:0]),
    .wr_full(full),    .wr_used  (used),
    .rd_clk (aud_clk), .rd_rst_n (aud_rst_n), .rd_en (pop),  .rd_data (head),
    .rd_empty(empty),  .rd_used  ()
  );

  // ---------------- serialiser (aud_clk domain) ----------------
  logic [BCW-1:0]         bclk_cnt;
  logic [BITW-1:0]        bit_cnt;
  logic                   lr;
  logic [SAMPLE_BITS-1:0] shift;
  logic                   frame_edge;
  logic                   in_step;          // playing, left/right pairing established
  logic                   may_pop;

  assign frame_edge = (bclk_cnt == BCW'(2 * BCLK_HALF - 1)) && (bit_cnt == BITW'(SAMPLE_BITS - 1));
  // After reset or an underflow, playback restarts only on a left-channel
  // edge so that the words keep their left/right order.
  assign may_pop    = !empty && (in_step || !lr);
  assign pop        = frame_edge && may_pop;

  always_ff @(posedge aud_clk) begin
    if (!aud_rst_n) begin
      bclk_cnt        <= '0;
      bit_cnt         <= '0;
      lr              <= 1'b0;
      shift           <= '0;
      uf_seen         <= 1'b0;
      underflow_count <= '0;
      in_step         <= 1'b0;
    end else if (bclk_cnt == BCW'(2 * BCLK_HALF - 1)) begin
      bclk_cnt <= '0;
      if (frame_edge) begin
        bit_cnt <= '0;
        lr      <= ~lr;
        if (may_pop) begin
          shift   <= SAMPLE_BITS'(head);
          in_step <= 1'b1;
        end else begin
          shift           <= '0;
          in_step         <= 1'b0;
          uf_seen         <= 1'b1;
          underflow_count <= underflow_count + 1'b1;
        end
      end else begin
        bit_cnt <= bit_cnt + 1'b1;
        shift   <= shift << 1;
      end
    end else begin
      bclk_cnt <= bclk_cnt + 1'b1;
    end
  end

  assign AUD_XCK     = aud_clk;
  assign AUD_BCLK    = (bclk_cnt >= BCW'(BCLK_HALF));
  assign AUD_DACLRCK = lr;
  assign AUD_DACDAT  = shift[SAMPLE_BITS-1];

endmodule
