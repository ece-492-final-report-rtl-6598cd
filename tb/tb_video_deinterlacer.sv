// tb_video_deinterlacer: self-checking test of the deinterlacer: field-1 lines are dropped, every field-0 line comes out twice.
// Input words come with random gaps and the output sees random
// back-pressure; every output word and its sof/eol marks are compared with
// a reference computed in the testbench.
module tb_video_deinterlacer;
  import ar_pkg::*;
  import tb_video_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int W = 8, H = 4;
  logic in_valid = 1'b0, in_ready, in_sof = 1'b0, in_eol = 1'b0, in_field = 1'b0;
  ycc422_t in_data = '0;
  logic out_valid, out_ready = 1'b0, out_sof, out_eol;
  ycc422_t out_data;
  typedef struct packed { logic sof; logic eol; ycc422_t d; } exp_t;
  exp_t exp_q[$];
  int n_out = 0, n_stall = 0;
  video_deinterlacer #(.WIDTH(W)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_sof, .in_eol, .in_field,
    .out_valid, .out_ready, .out_data, .out_sof, .out_eol);

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom_range(99) < 45);
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (out_valid && out_ready) begin
      exp_t e;
      n_out++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        e = exp_q.pop_front();
        checks++;
        if (out_data !== e.d || out_sof !== e.sof || out_eol !== e.eol) begin
          failures++;
          $display("FAIL: out %0d: %h s%0d e%0d expected %h s%0d e%0d", n_out, out_data, out_sof, out_eol, e.d, e.sof, e.eol);
        end
      end
    end
  end
  task automatic send(input ycc422_t d, input logic s, input logic e, input logic fl);
    @(negedge clk);
    while ($urandom_range(99) < 30) @(negedge clk);
    in_valid = 1'b1; in_data = d; in_sof = s; in_eol = e; in_field = fl;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 1'b0;
  endtask
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 3; fr++)
      for (int fl = 0; fl < 2; fl++)
        for (int y = 0; y < H; y++) begin
          ycc422_t line_px [W];
          for (int x = 0; x < W; x++) begin
            line_px[x] = ycc422_t'($urandom);
            if (fl == 0) exp_q.push_back('{sof: (x == 0 && y == 0), eol: (x == W - 1), d: line_px[x]});
            send(line_px[x], x == 0 && y == 0, x == W - 1, 1'(fl));
          end
          if (fl == 0)
            for (int x = 0; x < W; x++) exp_q.push_back('{sof: 1'b0, eol: (x == W - 1), d: line_px[x]});
        end

    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("all expected words came out (%0d left)", exp_q.size()));
    check(n_stall > 0, "input was held off at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
