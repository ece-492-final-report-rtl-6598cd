// tb_output_pio: self-checking test of the output PIO (solenoid latch).
// Checks reset value, direct write, set and clear masks, read-back and that
// the pin follows the register one cycle after the write.
module tb_output_pio;
  import ar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  avm_req_t req = '0;
  avm_rsp_t rsp;
  logic [7:0] pin;
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

  output_pio #(.WIDTH(8)) dut (.clk, .rst_n, .avs_req(req), .avs_rsp(rsp), .pin_out(pin));

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [24:0] B = MAP_LATCH.base;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pin == 8'h00, "latch off after reset");
    bus_write(B + 0, 32'h01);
    check(pin == 8'h01, "latch actuated by writing 1");
    bus_read(B + 0, d);  check(d == 32'h01, "data reads back");
    bus_write(B + 16, 32'h84);                 // outset
    check(pin == 8'h85, "outset sets bits");
    bus_write(B + 20, 32'h05);                 // outclear
    check(pin == 8'h80, "outclear clears bits");
    bus_write(B + 0, 32'h1_5A);
    check(pin == 8'h5A, "width truncation");
    bus_read(B + 4, d);  check(d == 0, "unused word reads 0");
    bus_write(B + 0, 32'h00);
    check(pin == 8'h00, "latch released by writing 0");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      bus_write(B + 0, {24'h0, v});
      bus_read(B + 0, d);
      check(pin == v && d[7:0] == v, "random write/read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
