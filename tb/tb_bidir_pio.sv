// tb_bidir_pio: self-checking test of the bidirectional SD-card PIO.
// Checks that the pin is released after reset, driven once the direction bit
// is set, and that the input is read through the synchroniser.
module tb_bidir_pio;
  import ar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  avm_req_t req = '0;
  avm_rsp_t rsp;
  logic pin_i = 1'b0, pin_o, pin_oe;
  logic [31:0] d;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Avalon-MM master tasks: drive on the falling edge, the access is taken
  // at the rising edge where waitrequest is low.
  task automatic bus_write(input logic [24:0] a, input logic [31:0] d);
    @(negedge clk);
    req.address = a; req.writedata = d; req.byteenable = 4'hf; req.write = 1'b1;
    #1;
    while (rsp.waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    req.write = 1'b0;
  endtask

  task automatic bus_read(input logic [24:0] a, output logic [31:0] d);
    @(negedge clk);
    req.address = a; req.read = 1'b1;
    #1;
    while (rsp.waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    req.read = 1'b0;
    while (!rsp.readdatavalid) @(negedge clk);
    d = rsp.readdata;
  endtask

  bidir_pio dut (.clk, .rst_n, .avs_req(req), .avs_rsp(rsp), .pin_i, .pin_o, .pin_oe);

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [24:0] B = MAP_SD_CMD.base;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!pin_oe, "released after reset");
    bus_write(B + 0, 1);
    check(!pin_oe, "data write does not drive");
    bus_write(B + 4, 1);
    check(pin_oe && pin_o, "drives 1 once direction set");
    bus_read(B + 4, d); check(d == 1, "direction reads back");
    bus_write(B + 0, 0);
    check(pin_oe && !pin_o, "drives 0");
    bus_write(B + 4, 0);
    check(!pin_oe, "released again");
    pin_i = 1'b1;
    repeat (3) @(posedge clk);
    bus_read(B + 0, d); check(d == 1, "reads pin high");
    pin_i = 1'b0;
    repeat (3) @(posedge clk);
    bus_read(B + 0, d); check(d == 0, "reads pin low");
    // input sampled through two flops: one cycle after change not yet seen
    @(negedge clk); pin_i = 1'b1;
    @(posedge clk); #1 check(dut.sync2 == 1'b0, "not seen after one cycle");
    @(posedge clk); #1 check(dut.sync2 == 1'b1, "seen after two cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
