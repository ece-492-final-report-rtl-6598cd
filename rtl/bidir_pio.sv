// bidir_pio: bidirectional one-pin-per-bit PIO for the SD card lines.
//
// The SD card is driven in SPI mode entirely by software, which toggles the
// card's lines through PIOs (SD_DAT, SD_CMD, SD_DAT3 here; SD_CLK uses an
// output PIO). Each bit has an output register and a direction bit; a pin
// whose direction bit is 1 is driven from the output register, otherwise it
// is released and only read. The pin is returned through a two-flop
// synchroniser. Register layout (this design's choice):
//   word 0  data      (read: synchronised pin level; write: output register)
//   word 1  direction (read/write, 1 = drive)
// Direction resets to 0 (released). Bus timing: never stalls, read data one
// cycle after the read.
module bidir_pio
  import ar_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  avm_req_t         avs_req,
  output avm_rsp_t         avs_rsp,
  input  logic [WIDTH-1:0] pin_i,
  output logic [WIDTH-1:0] pin_o,
  output logic [WIDTH-1:0] pin_oe
);

  logic [WIDTH-1:0] out_q, dir_q, sync1, sync2;
  logic [1:0]       word;

  assign word = avs_req.address[3:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_q <= '0;
      dir_q <= '0;
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= pin_i;
      sync2 <= sync1;
      if (avs_req.write && word == 2'd0) out_q <= avs_req.writedata[WIDTH-1:0];
      if (avs_req.write && word == 2'd1) dir_q <= avs_req.writedata[WIDTH-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      avs_rsp <= AVM_RSP_IDLE;
    end else begin
      avs_rsp.readdatavalid <= avs_req.read;
      avs_rsp.readdata      <= '0;
      if (word == 2'd0) avs_rsp.readdata[WIDTH-1:0] <= sync2;
      if (word == 2'd1) avs_rsp.readdata[WIDTH-1:0] <= dir_q;
    end
  end

  assign pin_o  = out_q;
  assign pin_oe = dir_q;

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(avs_req.read && avs_req.write));

endmodule
