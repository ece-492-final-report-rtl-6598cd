// itu656_decoder: extracts active video from the TV decoder's ITU-R 656 stream.
//
// The TV decoder chip sends one byte per 27 MHz clock: per line a timing
// reference code FF 00 00 XY at the end (EAV) and start (SAV) of active video,
// and in between Cb Y Cr Y ... bytes, two bytes per pixel. In XY, bit 6 is the
// field (F), bit 5 vertical blanking (V) and bit 4 tells EAV (1) from SAV (0).
// The decoder counts the active lines of each field from the end of vertical
// blanking and, on the first FIELD_LINES active lines, emits pixels
// H_OFFSET .. H_OFFSET+H_ACTIVE-1 of the SRC_PIXELS in the line: one pixel per
// Y byte, paired with the chroma byte just before it (Cb for even, Cr for odd
// pixels; H_OFFSET must be even). Each output pixel carries the field bit,
// sof (first pixel of the field) and eol (last pixel of a line).
// Timing: out_valid is a one-cycle strobe, at most every second clock; there
// is no back-pressure, the video-in buffer absorbs the rate change.
// The 656-to-YCrCb 4:2:2 function and the 640-pixel active width follow the
// source system; the centred crop of the 720-pixel line and the 240 lines per
// field are this design's reading of its 640x480 input.
module itu656_decoder
  import ar_pkg::*;
#(
  parameter int unsigned SRC_PIXELS  = 720,
  parameter int unsigned H_ACTIVE    = 640,
  parameter int unsigned H_OFFSET    = 40,
  parameter int unsigned FIELD_LINES = 240
) (
  input  logic    clk,          // 27 MHz
  input  logic    rst_n,
  input  logic [7:0] td_data,
  output logic    out_valid,
  output ycc422_t out_data,
  output logic    out_sof,
  output logic    out_eol,
  output logic    out_field
);

  localparam int unsigned BW = $clog2(2 * SRC_PIXELS + 1);
  localparam int unsigned LW = $clog2(FIELD_LINES + 1);

  logic [7:0]    d1, d2, d3;       // previous three bytes
  logic          timing_code;
  logic          active;
  logic [BW-1:0] bcnt;             // byte position in the active line
  logic [LW-1:0] line;             // active lines started in this field
  logic [LW-1:0] cur_line;
  logic          field;
  logic [7:0]    chroma;
  logic [BW-2:0] px;

  assign timing_code = (d3 == 8'hFF) && (d2 == 8'h00) && (d1 == 8'h00);
  assign px          = bcnt[BW-1:1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d1        <= '0;
      d2        <= '0;
      d3        <= '0;
      active    <= 1'b0;
      bcnt      <= '0;
      line      <= '0;
      cur_line  <= '0;
      field     <= 1'b0;
      chroma    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
      out_field <= 1'b0;
    end else begin
      d1        <= td_data;
      d2        <= d1;
      d3        <= d2;
      out_valid <= 1'b0;
      if (timing_code) begin
        // td_data is XY
        field <= td_data[6];
        if (td_data[5]) begin
          line   <= '0;                       // vertical blanking
          active <= 1'b0;
        end else if (!td_data[4]) begin       // SAV of an active line
          active   <= (line < LW'(FIELD_LINES));
          cur_line <= line;
          bcnt     <= '0;
          if (line != LW'(FIELD_LINES)) line <= line + 1'b1;
        end else begin                        // EAV
          active <= 1'b0;
        end
      end else if (active) begin
        bcnt <= bcnt + 1'b1;
        if (bcnt == BW'(2 * SRC_PIXELS - 1)) active <= 1'b0;
        if (!bcnt[0]) begin
          chroma <= td_data;
        end else if (px >= (BW-1)'(H_OFFSET) && px < (BW-1)'(H_OFFSET + H_ACTIVE)) begin
          out_valid <= 1'b1;
          out_data  <= '{y: td_data, c: chroma};
          out_sof   <= (cur_line == '0) && (px == (BW-1)'(H_OFFSET));
          out_eol   <= (px == (BW-1)'(H_OFFSET + H_ACTIVE - 1));
          out_field <= field;
        end
      end
    end
  end

endmodule
