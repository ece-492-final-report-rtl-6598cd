// tb_sram_controller: self-checking test of the SRAM controller against
// the behavioural SRAM model: random word and byte-lane writes and reads
// against a reference array, read latency of two cycles after acceptance,
// three cycles per access, and no bus conflict.
module tb_sram_controller;
  import ar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  sram_req_t sreq = '0;
  sram_rsp_t srsp;
  logic [17:0] A; logic [15:0] DQo, DQi; logic DQoe, WE, OE, CE, UB, LB;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic sram_write(input logic [17:0] a, input logic [15:0] d, input logic [1:0] be);
    @(negedge clk);
    sreq.address = a; sreq.writedata = d; sreq.byteenable = be; sreq.write = 1'b1;
    #1;
    while (srsp.waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    sreq.write = 1'b0;
  endtask
  task automatic sram_read(input logic [17:0] a, output logic [15:0] d, output int lat);
    @(negedge clk);
    sreq.address = a; sreq.read = 1'b1;
    #1;
    while (srsp.waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    sreq.read = 1'b0;
    lat = 1;
    while (!srsp.readdatavalid) begin @(negedge clk); lat++; end
    d = srsp.readdata;
  endtask

  sram_controller dut (.clk, .rst_n, .s_req(sreq), .s_rsp(srsp), .SRAM_ADDR(A), .SRAM_DQ_o(DQo),
    .SRAM_DQ_oe(DQoe), .SRAM_DQ_i(DQi), .SRAM_WE_N(WE), .SRAM_OE_N(OE), .SRAM_CE_N(CE), .SRAM_UB_N(UB), .SRAM_LB_N(LB));
  sram_model mem (.addr(A), .dq_o(DQo), .dq_oe(DQoe), .dq_i(DQi), .we_n(WE), .oe_n(OE), .ce_n(CE), .ub_n(UB), .lb_n(LB));

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] refm [logic [17:0]];
  initial begin
    logic [15:0] d; int lat; logic [17:0] a;
    int t0, t1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      a = (i < 32) ? 18'(i) : 18'($urandom);
      d = 16'($urandom);
      sram_write(a, d, 2'b11);
      refm[a] = d;
    end
    // byte lanes
    sram_write(18'h3, 16'hAB_CD, 2'b10);
    refm[18'h3] = {8'hAB, refm[18'h3][7:0]};
    sram_write(18'h4, 16'h12_34, 2'b01);
    refm[18'h4] = {refm[18'h4][15:8], 8'h34};
    foreach (refm[k]) begin
      sram_read(k, d, lat);
      check(d == refm[k], $sformatf("read %h: %h expected %h", k, d, refm[k]));
      check(lat == 2, $sformatf("read latency %0d", lat));
    end
    // throughput: back-to-back requests are taken every three cycles
    @(negedge clk);
    sreq.address = 18'h10; sreq.read = 1'b1;
    t0 = 0; t1 = 0;
    for (int c = 0; c < 30; c++) begin
      #1;
      if (!srsp.waitrequest) t0++;
      @(negedge clk);
    end
    sreq.read = 1'b0;
    check(t0 == 10, $sformatf("10 accesses in 30 cycles (%0d)", t0));
    check(mem.conflicts == 0, "no data bus conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
