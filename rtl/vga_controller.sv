// vga_controller: 640x480, 60 Hz VGA timing and frame-buffer scan-out.
//
// Runs on the 25 MHz pixel clock. Horizontal and vertical counters produce
// the standard 640x480 timing (800 clocks per line: 640 visible, 16 front
// porch, 96 sync, 48 back porch; 525 lines per frame: 480 visible, 10 front
// porch, 2 sync, 33 back porch; both syncs active low). During the visible
// area it reads the frame buffer line by line, each stored pixel covering
// SCALE x SCALE screen pixels (320x240 stored, doubled to 640x480), using
// vga_address_translator for the address. The memory answers one clock after
// the address, so syncs and blank are delayed one clock to line up with the
// colour. Colour channels of BITS bits are widened to the 10-bit DAC inputs
// by repeating their bits.
// Interface: rd_addr/rd_data to a synchronous-read memory; VGA_* pins.
// Follows the source system: scan-out of a 320x240 image line by line from
// memory to a 640x480 screen with a 25 MHz pixel clock. This design's
// choice: the timing constants (the usual 640x480 industry values), the
// one-clock read latency and the colour widening.
module vga_controller #(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240,
  parameter int unsigned BITS   = 1,       // bits per colour channel
  parameter int unsigned AW     = $clog2(WIDTH * HEIGHT),
  parameter int unsigned H_VIS  = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_VIS  = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33
) (
  input  logic                vga_clk,
  input  logic                rst_n,
  output logic [AW-1:0]       rd_addr,
  input  logic [3*BITS-1:0]   rd_data,      // {r, g, b}, one clock after rd_addr
  output logic [9:0]          VGA_R,
  output logic [9:0]          VGA_G,
  output logic [9:0]          VGA_B,
  output logic                VGA_HS,
  output logic                VGA_VS,
  output logic                VGA_BLANK_N,
  output logic                VGA_SYNC_N,
  output logic                VGA_CLK
);

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int unsigned SCALE = H_VIS / WIDTH;
  localparam int unsigned HW    = $clog2(H_TOT);
  localparam int unsigned VW    = $clog2(V_TOT);

  logic [HW-1:0] hc;
  logic [VW-1:0] vc;
  logic          vis, hs, vs;
  logic [$clog2(WIDTH)-1:0]  px;
  logic [$clog2(HEIGHT)-1:0] py;

  always_ff @(posedge vga_clk) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == HW'(H_TOT - 1)) begin
      hc <= '0;
      vc <= (vc == VW'(V_TOT - 1)) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  assign vis = (hc < HW'(H_VIS)) && (vc < VW'(V_VIS));
  assign hs  = !((hc >= HW'(H_VIS + H_FP)) && (hc < HW'(H_VIS + H_FP + H_SYNC)));
  assign vs  = !((vc >= VW'(V_VIS + V_FP)) && (vc < VW'(V_VIS + V_FP + V_SYNC)));
  assign px  = ($clog2(WIDTH))'(hc / HW'(SCALE));
  assign py  = ($clog2(HEIGHT))'(vc / VW'(SCALE));

  vga_address_translator #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .AW(AW)) u_xlat (
    .x(px), .y(py), .address(rd_addr)
  );

  function automatic logic [9:0] widen(logic [BITS-1:0] c);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[9 - i] = c[BITS - 1 - (i % BITS)];
    return r;
  endfunction

  logic vis_q;
  always_ff @(posedge vga_clk) begin
    if (!rst_n) begin
      vis_q       <= 1'b0;
      VGA_HS      <= 1'b1;
      VGA_VS      <= 1'b1;
    end else begin
      vis_q  <= vis;
      VGA_HS <= hs;
      VGA_VS <= vs;
    end
  end

  assign VGA_BLANK_N = vis_q;
  assign VGA_SYNC_N  = 1'b0;      // no sync on green
  assign VGA_CLK     = vga_clk;
  assign VGA_R = vis_q ? widen(rd_data[3*BITS-1 -: BITS]) : '0;
  assign VGA_G = vis_q ? widen(rd_data[2*BITS-1 -: BITS]) : '0;
  assign VGA_B = vis_q ? widen(rd_data[BITS-1 -: BITS])   : '0;

endmodule
