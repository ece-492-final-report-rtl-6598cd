// tb_sram_arbiter: self-checking test of the two-master SRAM arbiter with
// a controller and SRAM model behind it. Master 0 does random reads and
// writes, master 1 writes a block continuously; checks data integrity,
// that read data goes only to its owner, and that when both ask all the
// time the grants alternate.
module tb_sram_arbiter;
  import ar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  sram_req_t sreq = '0, m1 = '0, sr;
  sram_rsp_t srsp, m1r, ss;
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

  sram_arbiter dut (.clk, .rst_n, .m0_req(sreq), .m0_rsp(srsp), .m1_req(m1), .m1_rsp(m1r), .s_req(sr), .s_rsp(ss));
  sram_controller ctl (.clk, .rst_n, .s_req(sr), .s_rsp(ss), .SRAM_ADDR(A), .SRAM_DQ_o(DQo),
    .SRAM_DQ_oe(DQoe), .SRAM_DQ_i(DQi), .SRAM_WE_N(WE), .SRAM_OE_N(OE), .SRAM_CE_N(CE), .SRAM_UB_N(UB), .SRAM_LB_N(LB));
  sram_model mem (.addr(A), .dq_o(DQo), .dq_oe(DQoe), .dq_i(DQi), .we_n(WE), .oe_n(OE), .ce_n(CE), .ub_n(UB), .lb_n(LB));

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m1_done = 0, m1_rvalid = 0, g0 = 0, g1 = 0, alternations = 0, both = 0;
  logic last_g = 1'b0;
  // master 1: writes words 0x1000.. with value ~address
  initial begin
    @(posedge rst_n);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      m1.address = 18'h1000 + 18'(i); m1.writedata = ~16'(i); m1.byteenable = 2'b11; m1.write = 1'b1;
      #1;
      while (m1r.waitrequest) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    m1.write = 1'b0;
    m1_done = 1;
  end
  always @(posedge clk) begin
    if (m1r.readdatavalid) m1_rvalid++;
    if (rst_n && !ss.waitrequest && (sr.read || sr.write)) begin
      logic g;
      g = (sr.address >= 18'h1000 && sr.address < 18'h1100 && sr.write && m1.write && sr.address == m1.address);
      if (sreq.read || sreq.write) if (m1.write) begin
        both++;
        if (g != last_g) alternations++;
      end
      last_g = g;
    end
  end
  logic [15:0] refm [int];
  initial begin
    logic [15:0] d; int lat;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      d = 16'($urandom);
      sram_write(18'(i), d, 2'b11);
      refm[i] = d;
      sram_read(18'($urandom_range(i)), d, lat);
    end
    foreach (refm[k]) begin
      sram_read(18'(k), d, lat);
      check(d == refm[k], $sformatf("master 0 read %0d", k));
    end
    wait (m1_done);
    for (int i = 0; i < 200; i++) begin
      sram_read(18'h1000 + 18'(i), d, lat);
      check(d == ~16'(i), $sformatf("master 1 data at %0d", i));
    end
    check(m1_rvalid == 0, "no read data routed to the writing master");
    check(both > 20, $sformatf("both masters competed (%0d)", both));
    check(alternations * 10 >= both * 8, $sformatf("grants alternate under contention (%0d of %0d)", alternations, both));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
