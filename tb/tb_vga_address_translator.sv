// tb_vga_address_translator: exhaustive check of y*320+x over the 320x240
// image, plus a non-320 width through the general path.
module tb_vga_address_translator;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [8:0] x; logic [7:0] y; logic [16:0] a;
  logic [3:0] x2; logic [2:0] y2; logic [6:0] a2;
  vga_address_translator dut (.x, .y, .address(a));
  vga_address_translator #(.WIDTH(10), .HEIGHT(6)) dut2 (.x(x2), .y(y2), .address(a2));
  initial begin
    int bad = 0;
    for (int yy = 0; yy < 240; yy++)
      for (int xx = 0; xx < 320; xx++) begin
        x = 9'(xx); y = 8'(yy); #1;
        if (a != 17'(yy * 320 + xx)) bad++;
        checks++;
      end
    failures += bad;
    for (int yy = 0; yy < 6; yy++)
      for (int xx = 0; xx < 10; xx++) begin
        x2 = 4'(xx); y2 = 3'(yy); #1;
        check(a2 == 7'(yy * 10 + xx), "width 10");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
