// output_pio: output PIO used for the solenoid latch, the LEDs and SD_CLK.
//
// A register the processor writes; its bits drive output pins. For the latch,
// bit 0 goes out on a GPIO_0 pin to the base resistor of a Darlington pair
// that switches the 12 V solenoid: writing 1 unlocks the door, 0 locks it.
// Besides a plain write, single bits can be set or cleared without a
// read-modify-write, so that two software tasks never undo each other:
//   word 0  data   (read/write)
//   word 4  outset   (write: data |= value)
//   word 5  outclear (write: data &= ~value)
// The latch output and its software control follow the source system, as does
// its 32-byte address span (room for six words); the register layout and the
// reset value (0, latch not actuated) are this design's choice.
// Bus timing: never stalls, read data returns one cycle after the read.
module output_pio
  import ar_pkg::*;
#(
  parameter int unsigned     WIDTH      = 1,
  parameter logic [31:0]     RESET_VAL  = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  avm_req_t         avs_req,
  output avm_rsp_t         avs_rsp,
  output logic [WIDTH-1:0] pin_out
);

  logic [WIDTH-1:0] data_q;
  logic [2:0]       word;

  assign word = avs_req.address[4:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_q <= RESET_VAL[WIDTH-1:0];
    end else if (avs_req.write) begin
      unique case (word)
        3'd0: data_q <= avs_req.writedata[WIDTH-1:0];
        3'd4: data_q <= data_q | avs_req.writedata[WIDTH-1:0];
        3'd5: data_q <= data_q & ~avs_req.writedata[WIDTH-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      avs_rsp <= AVM_RSP_IDLE;
    end else begin
      avs_rsp.readdatavalid <= avs_req.read;
      avs_rsp.readdata      <= '0;
      if (word == 3'd0) avs_rsp.readdata[WIDTH-1:0] <= data_q;
    end
  end

  assign pin_out = data_q;

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(avs_req.read && avs_req.write));

endmodule
