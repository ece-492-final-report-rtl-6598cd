// tb_reset_delay: self-checking test of the reset stretcher with a short
// delay: the output must rise exactly DELAY+2 cycles after the key is
// released, and fall again (within 3 cycles) when the key is pressed.
module tb_reset_delay;
  logic clk = 1'b0, key_n = 1'b0, rst_n_out;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int D = 100;
  reset_delay #(.DELAY_CYCLES(D)) dut (.clk, .key_n, .rst_n_out);

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (10) @(posedge clk);
    check(!rst_n_out, "held while key pressed");
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk); key_n = 1'b1;
      n = 0;
      while (!rst_n_out) begin @(posedge clk); #1 n++; end
      check(n == D + 3, $sformatf("release after %0d cycles", n));
      repeat (20) @(posedge clk);
      check(rst_n_out, "stays released");
      @(negedge clk); key_n = 1'b0;
      repeat (3) @(posedge clk); #1
      check(!rst_n_out, "pressing the key resets again");
      // short glitch-free press restarts the count
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
