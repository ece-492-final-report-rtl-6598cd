// ycrcb_to_rgb: converts studio-range YCbCr 4:4:4 pixels to 8-bit RGB.
//
// The ITU-R BT.601 equations in 8.8 fixed point:
//   R = 1.164 (Y-16)                 + 1.596 (Cr-128)
//   G = 1.164 (Y-16) - 0.391 (Cb-128) - 0.813 (Cr-128)
//   B = 1.164 (Y-16) + 2.018 (Cb-128)
// with coefficients 298, 100, 208, 409, 516 (/256), rounding by adding 128
// before the shift, and each result clamped to 0..255. One pipeline stage:
// a pixel accepted in one cycle is on the output the next (valid/ready
// handshake, sof/eol carried along). The YCrCb-to-RGB function follows the
// source system; the BT.601 coefficients are this design's choice.
module ycrcb_to_rgb
  import ar_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ycc444_t in_data,
  input  logic    in_sof,
  input  logic    in_eol,
  output logic    out_valid,
  input  logic    out_ready,
  output rgb888_t out_data,
  output logic    out_sof,
  output logic    out_eol
);

  function automatic logic [7:0] clamp8(logic signed [19:0] v);
    if (v < 0)         return 8'd0;
    else if (v > 255)  return 8'd255;
    else               return v[7:0];
  endfunction

  logic signed [19:0] yv, cbv, crv, r, g, b;
  rgb888_t            rgb;

  always_comb begin
    yv  = 20'(signed'({1'b0, in_data.y}))  - 20'sd16;
    cbv = 20'(signed'({1'b0, in_data.cb})) - 20'sd128;
    crv = 20'(signed'({1'b0, in_data.cr})) - 20'sd128;
    r   = (298 * yv + 409 * crv + 128) >>> 8;
    g   = (298 * yv - 100 * cbv - 208 * crv + 128) >>> 8;
    b   = (298 * yv + 516 * cbv + 128) >>> 8;
    rgb = '{r: clamp8(r), g: clamp8(g), b: clamp8(b)};
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= rgb;
        out_sof  <= in_sof;
        out_eol  <= in_eol;
      end
    end
  end

endmodule
