// ycrcb422_to_444: gives each pixel its own chroma pair.
//
// In 4:2:2 video two neighbouring pixels share one Cb and one Cr sample: the
// even pixel of a pair carries Cb, the odd one Cr. The converter holds the
// even pixel until the odd one arrives and then emits both with the pair's
// (Cb, Cr), one per cycle; while the second is pending the input waits.
// Pairs restart at every sof and after every eol, so lines must have an even
// number of pixels. Stream ports: valid/ready handshake, registered output;
// sof/eol travel with their pixels. The function follows the source system;
// chroma repetition (no interpolation) is this design's choice.
module ycrcb422_to_444
  import ar_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ycc422_t in_data,
  input  logic    in_sof,
  input  logic    in_eol,
  output logic    out_valid,
  input  logic    out_ready,
  output ycc444_t out_data,
  output logic    out_sof,
  output logic    out_eol
);

  logic       odd;          // next accepted pixel is the odd one of a pair
  logic [7:0] y0, cb;
  logic       sof0;
  logic       pend;         // second pixel of a pair waiting to go out
  ycc444_t    p1;
  logic       p1_eol;
  logic       adv, acc, is_odd;

  assign adv      = !out_valid || out_ready;
  assign in_ready = !pend && adv;
  assign acc      = in_valid && in_ready;
  assign is_odd   = odd && !in_sof;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      odd       <= 1'b0;
      y0        <= '0;
      cb        <= '0;
      sof0      <= 1'b0;
      pend      <= 1'b0;
      p1        <= '0;
      p1_eol    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
    end else begin
      if (pend && adv) begin
        out_valid <= 1'b1;
        out_data  <= p1;
        out_sof   <= 1'b0;
        out_eol   <= p1_eol;
        pend      <= 1'b0;
      end else if (acc && is_odd) begin
        out_valid <= 1'b1;
        out_data  <= '{y: y0, cb: cb, cr: in_data.c};
        out_sof   <= sof0;
        out_eol   <= 1'b0;
        p1        <= '{y: in_data.y, cb: cb, cr: in_data.c};
        p1_eol    <= in_eol;
        pend      <= 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      if (acc) begin
        if (!is_odd) begin
          y0   <= in_data.y;
          cb   <= in_data.c;
          sof0 <= in_sof;
        end
        odd <= !is_odd && !in_eol;
      end
    end
  end

endmodule
