// tb_i2c_av_config: self-checking test of the start-up configuration.
// Runs the sequencer against a slave model that refuses one transfer, and
// checks that every table entry arrives in order (the refused one repeated),
// that one retry is counted and that config_done is set.
module tb_i2c_av_config;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;
  logic done, scl, sda_oe, pull;
  logic [5:0] entry;
  logic [7:0] retries;
  wire sda = !(sda_oe || pull);
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  i2c_av_config #(.CLK_HZ(50_000_000), .I2C_HZ(1_000_000)) dut (.clk, .rst_n, .config_done(done), .entry,
    .retries, .scl, .sda_oe, .sda_i(sda));
  i2c_slave_model #(.NACK_XFER(3)) slave (.scl, .sda, .pull_low(pull));

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected register writes: WM8731 at 0x34 then ADV7181 at 0x40
  localparam logic [23:0] EXP [22] = '{
    24'h34001A, 24'h34021A, 24'h34047B, 24'h34067B, 24'h3408F8, 24'h340A06, 24'h340C00, 24'h340E01,
    24'h341002, 24'h341201, 24'h400000, 24'h401500, 24'h401741, 24'h403A16, 24'h405004, 24'h40C305,
    24'h40C480, 24'h400E80, 24'h405020, 24'h405218, 24'h400E00, 24'h400402};
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (100) @(posedge clk);
    check(slave.n_xfers == 22, $sformatf("22 acknowledged transfers (%0d)", slave.n_xfers));
    for (int i = 0; i < 22; i++) check(slave.xfers[i] == EXP[i], $sformatf("entry %0d = %h", i, slave.xfers[i]));
    check(retries == 8'd1, "one retry after the refused transfer");
    check(slave.n_starts == 23, "23 transfers on the bus");
    check(slave.errors == 0, "no protocol errors");
    repeat (2000) @(posedge clk);
    check(slave.n_starts == 23, "bus quiet after configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
