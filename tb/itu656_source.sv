// itu656_source: behavioural model of the TV decoder chip's ITU-R 656 output.
//
// Sends fields forever, one byte per clock rising edge: per line EAV
// (FF 00 00 XY with H=1), H_BLANK blanking bytes (80 10 ...), SAV (H=0) and
// 2*SRC_PIXELS bytes (Cb Y Cr Y ... from tb_video_pkg, or blanking in
// vertical blanking). Each field has VBLANK lines with V=1 and ACTIVE lines
// with V=0; the F bit alternates from field to field, starting at 0.
// fields counts the fields sent.
module itu656_source
  import tb_video_pkg::*;
#(
  parameter int SRC_PIXELS = 720,
  parameter int H_BLANK    = 268,
  parameter int VBLANK     = 19,
  parameter int ACTIVE     = 244
) (
  input  logic       clk,
  output logic [7:0] data
);

  int fields = 0;

  function automatic logic [7:0] xy(bit f, bit v, bit h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

  task automatic put(input logic [7:0] b);
    @(posedge clk);
    data <= b;
  endtask

  task automatic code(input bit f, input bit v, input bit h);
    put(8'hFF); put(8'h00); put(8'h00); put(xy(f, v, h));
  endtask

  initial begin
    data = 8'h10;
    forever begin
      for (int f = 0; f < 2; f++) begin
        for (int l = 0; l < VBLANK + ACTIVE; l++) begin
          bit v;
          int al;
          v  = (l < VBLANK);
          al = l - VBLANK;
          code(1'(f), v, 1'b1);
          for (int i = 0; i < H_BLANK; i++) put(i[0] ? 8'h10 : 8'h80);
          code(1'(f), v, 1'b0);
          for (int p = 0; p < SRC_PIXELS; p++) begin
            if (v) begin
              put(8'h80); put(8'h10);
            end else begin
              put(p[0] ? pat_cr(p / 2, al, f) : pat_cb(p / 2, al, f));
              put(pat_y(p, al, f));
            end
          end
        end
        fields++;
      end
    end
  end

endmodule
