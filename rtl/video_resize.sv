// video_resize: halves a frame in both directions (640x480 to 320x240).
//
// Pixel (x, y) of the input frame is kept when both x and y are even and
// dropped otherwise, so every 2x2 block of the input gives one output pixel.
// Positions are counted from sof and eol of the input; the output gets its
// own sof (first kept pixel) and eol (last kept pixel of a kept line,
// input x = IN_W-2). Stream ports: valid/ready handshake, registered output;
// dropped pixels are accepted without waiting. Halving 640x480 to 320x240
// follows the source system; plain decimation rather than averaging is this
// design's choice (after the line-doubling deinterlacer, averaging the two
// lines of a block would give the same rows anyway).
module video_resize
  import ar_pkg::*;
#(
  parameter int unsigned IN_W = 640,
  parameter int unsigned IN_H = 480
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ycc444_t in_data,
  input  logic    in_sof,
  input  logic    in_eol,
  output logic    out_valid,
  input  logic    out_ready,
  output ycc444_t out_data,
  output logic    out_sof,
  output logic    out_eol
);

  localparam int unsigned XW = $clog2(IN_W);
  localparam int unsigned YW = $clog2(IN_H);

  logic [XW-1:0] x, cx;
  logic [YW-1:0] y, cy;
  logic          keep, adv, acc;

  assign cx       = in_sof ? '0 : x;
  assign cy       = in_sof ? '0 : y;
  assign keep     = !cx[0] && !cy[0];
  assign adv      = !out_valid || out_ready;
  assign in_ready = adv || !keep;
  assign acc      = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
    end else begin
      if (acc) begin
        x <= in_eol ? '0 : cx + 1'b1;
        y <= in_eol ? cy + 1'b1 : cy;
      end
      if (acc && keep) begin
        out_valid <= 1'b1;
        out_data  <= in_data;
        out_sof   <= in_sof;
        out_eol   <= (cx == XW'(IN_W - 2));
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
