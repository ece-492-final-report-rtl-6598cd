// tb_avalon_decoder: self-checking test of the address decoder with a
// scoreboard slave model on every port. Each slave answers reads with its
// own number and the offset, some with extra wait states and read latency.
// Checks that every access of the address map reaches only its slave, that
// reads return the right slave's data at the offset from its base, that unmapped accesses finish with 0
// and set decode_error, and the boundaries of the ranges.
module tb_avalon_decoder;
  import ar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  avm_req_t req = '0;
  avm_rsp_t rsp;
  avm_req_t s_req [NUM_SLAVES];
  avm_rsp_t s_rsp [NUM_SLAVES];
  logic derr;
  logic [31:0] d;
  int hits [NUM_SLAVES];
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

  avalon_decoder dut (.clk, .rst_n, .m_req(req), .m_rsp(rsp), .s_req, .s_rsp, .decode_error(derr));

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave models: slave i stalls i%3 cycles and answers after 1 + i%2 cycles
  for (genvar i = 0; i < NUM_SLAVES; i++) begin : g_sl
    int wait_n = 0;
    logic [31:0] pipe [2];
    logic [1:0]  vpipe = '0;
    always_comb begin
      s_rsp[i].waitrequest   = (s_req[i].read || s_req[i].write) && (wait_n < i % 3);
      s_rsp[i].readdatavalid = (i % 2 == 0) ? vpipe[0] : vpipe[1];
      s_rsp[i].readdata      = (i % 2 == 0) ? pipe[0] : pipe[1];
    end
    always @(posedge clk) begin
      vpipe[1] <= vpipe[0];
      pipe[1]  <= pipe[0];
      vpipe[0] <= 1'b0;
      if (s_req[i].read || s_req[i].write) begin
        if (wait_n < i % 3) wait_n <= wait_n + 1;
        else begin
          wait_n <= 0;
          hits[i]++;
          if (s_req[i].read) begin
            vpipe[0] <= 1'b1;
            pipe[0]  <= {8'(i), 24'(s_req[i].address)};
          end
        end
      end
    end
  end

  function automatic logic [24:0] base_of(int sl);
    case (sl)
      SL_LATCH: return MAP_LATCH.base;     SL_SENSOR: return MAP_SENSOR.base;
      SL_LED: return MAP_LED.base;         SL_RED_LED: return MAP_RED_LED.base;
      SL_SD_DAT: return MAP_SD_DAT.base;   SL_SD_CMD: return MAP_SD_CMD.base;
      SL_SD_CLK: return MAP_SD_CLK.base;   SL_AUDIO: return MAP_AUDIO.base;
      SL_VIDEO: return MAP_VIDEO.base;     SL_SRAM: return MAP_SRAM.base;
      SL_SD_DAT3: return MAP_SD_DAT3.base; default: return '0;
    endcase
  endfunction

  task automatic probe(input logic [24:0] a, input int exp_sl);
    int prev [NUM_SLAVES];
    for (int i = 0; i < NUM_SLAVES; i++) prev[i] = hits[i];
    bus_read(a, d);
    if (exp_sl < 0) check(d == 0, $sformatf("unmapped %h reads 0", a));
    else check(d == {8'(exp_sl), 24'(a - base_of(exp_sl))}, $sformatf("read %h from slave %0d got %h", a, exp_sl, d));
    bus_write(a, 32'h1234);
    for (int i = 0; i < NUM_SLAVES; i++)
      check(hits[i] - prev[i] == (i == exp_sl ? 2 : 0), $sformatf("only slave %0d hit at %h", exp_sl, a));
  endtask

  initial begin
    for (int i = 0; i < NUM_SLAVES; i++) hits[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    probe(25'h1109040, SL_LATCH);   probe(25'h110905c, SL_LATCH);
    probe(25'h1109080, SL_SENSOR);  probe(25'h110908c, SL_SENSOR);
    probe(25'h1109070, SL_LED);     probe(25'h110907c, SL_LED);
    probe(MAP_RED_LED.base, SL_RED_LED);
    probe(MAP_SD_DAT.base, SL_SD_DAT);  probe(MAP_SD_DAT.base + 4, SL_SD_DAT);
    probe(MAP_SD_CMD.base, SL_SD_CMD);  probe(MAP_SD_CLK.base, SL_SD_CLK);
    probe(MAP_SD_DAT3.base, SL_SD_DAT3);
    probe(MAP_AUDIO.base, SL_AUDIO);    probe(MAP_AUDIO.base + 4, SL_AUDIO);
    probe(MAP_VIDEO.base, SL_VIDEO);    probe(MAP_VIDEO.base + 8, SL_VIDEO);
    probe(MAP_SRAM.base, SL_SRAM);      probe(MAP_SRAM.last - 3, SL_SRAM);
    check(!derr, "no decode error yet");
    probe(25'h1109060, -1);              // LCD: not in this decoder
    check(derr, "decode error flagged");
    probe(25'h110903c, -1);
    probe(25'h1109090, -1);
    probe(25'h0800000, -1);              // SDRAM window
    probe(MAP_SRAM.last + 1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
