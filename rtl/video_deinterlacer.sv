// video_deinterlacer: makes progressive frames out of interlaced NTSC fields.
//
// Of the two fields of each interlaced frame, the one whose field bit equals
// KEEP_FIELD is kept and the other is dropped. Each kept line is sent on and
// at the same time written into a one-line buffer, then sent a second time
// from the buffer ("line doubling"), so one field of FIELD_LINES lines
// becomes a progressive frame of 2 x FIELD_LINES lines at the same width.
// While the copy is replayed the input is held off (in_ready low).
// Stream ports: valid/ready handshake, a word moves when both are high; sof
// marks the first pixel of a frame and eol the last pixel of each line. The
// output is registered. Producing a progressive frame from NTSC fields
// follows the source system; the field-drop-and-line-double method is this
// design's choice, needing one line of storage instead of a field store.
module video_deinterlacer
  import ar_pkg::*;
#(
  parameter int unsigned WIDTH      = 640,
  parameter logic        KEEP_FIELD = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ycc422_t in_data,
  input  logic    in_sof,
  input  logic    in_eol,
  input  logic    in_field,
  output logic    out_valid,
  input  logic    out_ready,
  output ycc422_t out_data,
  output logic    out_sof,
  output logic    out_eol
);

  localparam int unsigned XW = $clog2(WIDTH);

  ycc422_t        line_buf [WIDTH];
  logic           replay;
  logic [XW-1:0]  wx, rx;
  logic           adv, keep, take;
  logic [XW-1:0]  wx_cur;

  assign wx_cur   = in_sof ? '0 : wx;

  assign adv      = !out_valid || out_ready;
  assign keep     = (in_field == KEEP_FIELD);
  assign in_ready = !replay && (adv || !keep);
  assign take     = in_valid && in_ready && keep;

  always_ff @(posedge clk) begin
    if (take) line_buf[wx_cur] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      replay    <= 1'b0;
      wx        <= '0;
      rx        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
    end else if (replay) begin
      if (adv) begin
        out_valid <= 1'b1;
        out_data  <= line_buf[rx];
        out_sof   <= 1'b0;
        out_eol   <= (rx == XW'(WIDTH - 1));
        if (rx == XW'(WIDTH - 1)) begin
          replay <= 1'b0;
          rx     <= '0;
        end else begin
          rx <= rx + 1'b1;
        end
      end
    end else begin
      if (take) begin
        out_valid <= 1'b1;
        out_data  <= in_data;
        out_sof   <= in_sof;
        out_eol   <= in_eol;
        if (in_eol) begin
          wx     <= '0;
          replay <= 1'b1;
        end else begin
          wx <= wx_cur + 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
