// dual_clock_fifo: first-in first-out buffer between two clock domains.
//
// Used twice in this system: as the 16-bit x 256-word audio sample FIFO
// (written at the system clock, read at the audio codec clock) and as the
// video-in buffer (written at the 27 MHz TV-decoder clock, read at the system
// clock). The storage is a DEPTH-word array. Each side keeps a binary pointer
// one bit wider than the address and a Gray-coded copy of it; the Gray copy
// is passed to the other side through two flip-flops, so only one bit changes
// per step and the other side always sees a valid, possibly late, pointer.
// Full and empty are therefore pessimistic by a few cycles, never wrong.
// The read side is show-ahead: rd_data is the oldest word whenever rd_empty
// is low, and rd_en removes it. A write while full and a read while empty are
// ignored. Each side has its own active-low reset; both should be applied
// together. The dual-clock function follows the source system; the
// Gray-pointer construction is this design's.
module dual_clock_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 256     // power of two
) (
  input  logic                   wr_clk,
  input  logic                   wr_rst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  output logic                   wr_full,
  output logic [$clog2(DEPTH):0] wr_used,

  input  logic                   rd_clk,
  input  logic                   rd_rst_n,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       rd_data,
  output logic                   rd_empty,
  output logic [$clog2(DEPTH):0] rd_used
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  assign rbin_w  = gray2bin(rgray_w2);
  assign wr_used = wbin - rbin_w;
  assign wr_full = (wr_used == (AW+1)'(DEPTH));

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read side ----------------
  assign wbin_r   = gray2bin(wgray_r2);
  assign rd_used  = wbin_r - rbin;
  assign rd_empty = (rd_used == '0);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
