// vga_address_translator: (x, y) of a WIDTH x HEIGHT image to a linear address.
//
// Pixels are stored row after row, so the address is y * WIDTH + x. For the
// default 320-pixel width this is (y << 8) + (y << 6) + x, two shifts and an
// add; other widths use a constant multiply. Purely combinational. The
// function follows the source system; row-major order is this design's choice.
module vga_address_translator #(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240,
  parameter int unsigned AW     = $clog2(WIDTH * HEIGHT)
) (
  input  logic [$clog2(WIDTH)-1:0]  x,
  input  logic [$clog2(HEIGHT)-1:0] y,
  output logic [AW-1:0]             address
);

  always_comb begin
    if (WIDTH == 320) address = AW'({y, 8'b0}) + AW'({y, 6'b0}) + AW'(x);
    else              address = AW'(y) * AW'(WIDTH) + AW'(x);
  end

endmodule
