// i2c_slave_model: behavioural I2C target for testbenches.
//
// Watches SCL and the wired-AND SDA line, recognises START and STOP, shifts
// in bytes on SCL rising edges and acknowledges each byte by pulling SDA low
// for the ninth clock, except for the transfer numbered NACK_XFER (counting
// from 0), whose first byte it does not acknowledge, once. Every complete
// acknowledged 3-byte transfer is stored in xfers[] and counted in n_xfers;
// protocol errors (STOP or START in the middle of a byte) are counted in
// errors.
module i2c_slave_model #(
  parameter int NACK_XFER = -1
) (
  input  logic scl,
  input  logic sda,        // resolved line level
  output logic pull_low    // 1: this model drives SDA low
);

  logic [23:0] xfers [64];
  int          n_xfers = 0;
  int          n_starts = 0;
  int          n_stops = 0;
  int          errors = 0;
  int          xfer_no = 0;

  logic [7:0]  sh;
  int          bitn;
  int          bytes;
  logic [23:0] cur;
  logic        in_xfer = 1'b0;
  logic        nacked = 1'b0;
  logic        nack_this;

  initial pull_low = 1'b0;

  // START / STOP: SDA changes while SCL is high
  always @(negedge sda) if (scl) begin
    n_starts++;
    in_xfer   = 1'b1;
    bitn      = 0;
    bytes     = 0;
    nack_this = (xfer_no == NACK_XFER) && !nacked;
  end
  always @(posedge sda) if (scl) begin
    n_stops++;
    if (in_xfer && bitn > 1) errors++;   // the STOP's own SCL rise counts as one
    if (in_xfer && bytes == 3 && !nack_this) begin
      xfers[n_xfers % 64] = cur;
      n_xfers++;
    end
    if (in_xfer) xfer_no++;
    if (nack_this) nacked = 1'b1;
    in_xfer = 1'b0;
  end

  always @(posedge scl) if (in_xfer) begin
    if (bitn < 8) begin
      sh = {sh[6:0], sda};
      bitn++;
    end else begin
      bitn = 0;  // ack clock
    end
  end

  always @(negedge scl) if (in_xfer) begin
    if (bitn == 8) begin
      cur   = {cur[15:0], sh};
      bytes++;
      pull_low = !(nack_this && bytes == 1);
    end else begin
      pull_low = 1'b0;
    end
  end

endmodule
