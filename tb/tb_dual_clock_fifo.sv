// tb_dual_clock_fifo: self-checking test of the dual-clock FIFO.
// Write clock 10 ns, read clock 7 ns, random write and read enables; every
// word read is compared with a reference queue. Also checks that the FIFO
// reports full at DEPTH words and never loses or duplicates a word.
module tb_dual_clock_fifo;
  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;
  localparam int DEPTH = 16;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [11:0] wdata = '0, rdata;
  logic [4:0] wused, rused;
  logic [11:0] q[$];
  int n_written = 0, n_read = 0, saw_full = 0, saw_empty = 0;
  int rd_pct = 50;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  dual_clock_fifo #(.WIDTH(12), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data(wdata), .wr_full(full), .wr_used(wused),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data(rdata), .rd_empty(empty), .rd_used(rused));

  // watchdog
  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wclk) if (wrst_n) begin
    if (wr_en && !full) begin q.push_back(wdata); n_written++; end
    if (full) saw_full++;
    if (wused > 5'(DEPTH)) begin failures++; $display("FAIL: used above depth"); end
  end
  always @(negedge wclk) begin
    wr_en <= wrst_n && (n_written < 3000) && ($urandom_range(99) < 60);
    wdata <= 12'($urandom);
  end
  // reader
  always @(posedge rclk) if (rrst_n) begin
    if (rd_en && !empty) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: read from empty reference"); end
      else begin
        logic [11:0] e;
        e = q.pop_front();
        if (e !== rdata) begin failures++; $display("FAIL: got %h expected %h", rdata, e); end
      end
      n_read++;
    end
    if (empty) saw_empty++;
  end
  always @(negedge rclk) rd_en <= rrst_n && ($urandom_range(99) < rd_pct);

  initial begin
    repeat (4) @(posedge wclk);
    wrst_n = 1'b1; rrst_n = 1'b1;
    // phase 1: slow reader, FIFO fills
    rd_pct = 10;
    repeat (3000) @(posedge wclk);
    // phase 2: fast reader, drains
    rd_pct = 90;
    wait (n_written == 3000);
    repeat (200) @(posedge wclk);
    check(n_read == 3000, $sformatf("all words read (%0d)", n_read));
    check(q.size() == 0, "reference empty");
    check(saw_full > 0, "FIFO became full");
    check(saw_empty > 0, "FIFO became empty");
    check(empty, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
