// tb_ir_sensor_interface: self-checking test of the IR sensor input PIO.
// Drives the sensor pin, checks the synchronised data register, rising-edge
// capture, the interrupt mask, write-one-to-clear and the two-cycle input
// latency.
module tb_ir_sensor_interface;
  import ar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  avm_req_t req = '0;
  avm_rsp_t rsp;
  logic pin = 1'b0, irq;
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

  ir_sensor_interface dut (.clk, .rst_n, .avs_req(req), .avs_rsp(rsp), .pin_in(pin), .irq);

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [24:0] B = MAP_SENSOR.base;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bus_read(B + 0, d);  check(d == 0, "data reads 0 with pin low");
    bus_read(B + 12, d); check(d == 0, "no edge after reset");
    check(!irq, "no irq after reset");
    bus_write(B + 8, 1);               // unmask
    bus_read(B + 8, d);  check(d == 1, "mask reads back");
    // rising edge: irq 3 cycles later (2 sync + edge register)
    @(negedge clk); pin = 1'b1;
    @(posedge clk); #1 check(!irq, "irq not before synchroniser (1)");
    @(posedge clk); #1 check(!irq, "irq not before synchroniser (2)");
    @(posedge clk); #1 check(irq,  "irq 3 cycles after rising edge");
    bus_read(B + 0, d);  check(d == 1, "data reads 1 with pin high");
    bus_read(B + 12, d); check(d == 1, "edge captured");
    // level staying high does not re-capture after a clear
    bus_write(B + 12, 1);
    repeat (3) @(posedge clk);
    check(!irq, "irq cleared by write-one");
    bus_read(B + 12, d); check(d == 0, "edge capture cleared");
    // falling edge does not capture
    @(negedge clk); pin = 1'b0;
    repeat (5) @(posedge clk);
    bus_read(B + 12, d); check(d == 0, "falling edge not captured");
    // masked edge: captured, no irq
    bus_write(B + 8, 0);
    @(negedge clk); pin = 1'b1;
    repeat (5) @(posedge clk);
    check(!irq, "masked edge gives no irq");
    bus_read(B + 12, d); check(d == 1, "masked edge still captured");
    bus_write(B + 8, 1);
    @(posedge clk); #1 check(irq, "unmasking a pending edge raises irq");
    // writing 0 to edge capture does not clear it
    bus_write(B + 12, 0);
    bus_read(B + 12, d); check(d == 1, "write of 0 leaves capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
