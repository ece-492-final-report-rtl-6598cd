// vga_adapter: 320x240 frame buffer with VGA output.
//
// The writer (any logic on the system clock) stores a pixel by presenting
// x, y and colour with plot high for one clock; pixels outside the picture
// are ignored. The frame buffer is a two-clock memory: written on clk,
// read on the 25 MHz vga_clk by vga_controller, which scans it out to a
// 640x480 screen with every stored pixel doubled in both directions.
// Interface: clk, plot, x[8:0], y[7:0], colour {r, g, b} with BITS bits per
// channel; vga_clk and the VGA_* pins of the board's video DAC.
// Follows the source system: a VGA adapter at 320x240 instead of the full
// 640x480, an address translator and a line-by-line controller, a 25 MHz
// VGA clock made from 50 MHz. This design's choice: one bit per colour
// channel by default (8 colours, 230,400 memory bits, so that it fits the
// on-chip memory) and the plot interface.
module vga_adapter #(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240,
  parameter int unsigned BITS   = 1
) (
  input  logic                      clk,
  input  logic                      plot,
  input  logic [$clog2(WIDTH)-1:0]  x,
  input  logic [$clog2(HEIGHT)-1:0] y,
  input  logic [3*BITS-1:0]         colour,
  input  logic                      vga_clk,
  input  logic                      vga_rst_n,
  output logic [9:0]                VGA_R,
  output logic [9:0]                VGA_G,
  output logic [9:0]                VGA_B,
  output logic                      VGA_HS,
  output logic                      VGA_VS,
  output logic                      VGA_BLANK_N,
  output logic                      VGA_SYNC_N,
  output logic                      VGA_CLK
);

  localparam int unsigned AW = $clog2(WIDTH * HEIGHT);

  logic [3*BITS-1:0] fb [WIDTH * HEIGHT];
  logic [AW-1:0]     wr_addr, rd_addr;
  logic [3*BITS-1:0] rd_data;

  vga_address_translator #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .AW(AW)) u_wr_xlat (
    .x, .y, .address(wr_addr)
  );

  always_ff @(posedge clk) begin
    if (plot && 32'(x) < WIDTH && 32'(y) < HEIGHT) fb[wr_addr] <= colour;
  end

  always_ff @(posedge vga_clk) rd_data <= fb[rd_addr];

  vga_controller #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .BITS(BITS), .AW(AW)) u_ctrl (
    .vga_clk, .rst_n(vga_rst_n), .rd_addr, .rd_data,
    .VGA_R, .VGA_G, .VGA_B, .VGA_HS, .VGA_VS, .VGA_BLANK_N, .VGA_SYNC_N, .VGA_CLK
  );

endmodule
