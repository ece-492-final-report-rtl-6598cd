// tb_i2c_controller: self-checking test of one I2C write transfer.
// A slave model receives the three bytes; the test checks them, START and
// STOP, the SCL high time of 2 quarter periods, the done pulse, and that a
// missing acknowledge is reported as ack_err.
module tb_i2c_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;                    // 50 MHz
  logic start = 1'b0, busy, done, ack_err, scl, sda_oe, pull;
  logic [23:0] data = '0;
  wire sda = !(sda_oe || pull);
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int QDIV = 50_000_000 / (4 * 400_000);
  i2c_controller #(.CLK_HZ(50_000_000), .I2C_HZ(400_000)) dut (.clk, .rst_n, .start, .data, .busy, .done,
    .ack_err, .scl, .sda_oe, .sda_i(sda));
  i2c_slave_model #(.NACK_XFER(2)) slave (.scl, .sda, .pull_low(pull));

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int high_cnt = 0, good_high = 0;
  always @(posedge clk) begin
    if (scl) high_cnt++;
    else begin
      if (high_cnt == 2 * QDIV) good_high++;
      high_cnt = 0;
    end
  end
  task automatic xfer(input logic [23:0] v, output logic err);
    @(negedge clk); data = v; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    err = ack_err;
    repeat (10) @(negedge clk);
  endtask
  initial begin
    logic err;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    check(scl && sda, "bus idle high after reset");
    xfer(24'h34_0E_01, err);
    check(!err, "acknowledged transfer has no error");
    check(slave.n_xfers == 1 && slave.xfers[0] == 24'h340E01, "bytes received");
    xfer(24'h40_A5_5A, err);
    check(!err && slave.xfers[1] == 24'h40A55A, "second transfer");
    xfer(24'h40_12_34, err);
    check(err, "missing acknowledge reported");
    xfer(24'h40_12_34, err);
    check(!err && slave.xfers[2] == 24'h401234, "retry accepted");
    check(slave.n_starts == 4 && slave.n_stops == 4, "START and STOP per transfer");
    check(slave.errors == 0, "no protocol errors");
    check(good_high == 4 * 27, $sformatf("SCL high for two quarter periods in each of 108 bits (%0d)", good_high));
    check(!busy && scl && sda, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
