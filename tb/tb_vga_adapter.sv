// tb_vga_adapter: self-checking test of the 320x240 VGA adapter.
// Fills the frame buffer with a pattern through the plot port on a 50 MHz
// clock, then watches two whole frames of the VGA outputs on the 25 MHz
// pixel clock: line length 800 clocks with a 96-clock sync 16 clocks after
// the visible part, frame length 525 lines with a 2-line sync, 640x480
// visible pixels, every one showing the stored pixel (x/2, y/2), black
// outside. Between the two frames a pixel outside the picture is plotted;
// the second frame must be unchanged.
module tb_vga_adapter;
  logic clk = 1'b0, vclk = 1'b0, vrst_n = 1'b0;
  always #10 clk = ~clk;
  always #20 vclk = ~vclk;
  logic plot = 1'b0;
  logic [8:0] x; logic [7:0] y; logic [2:0] colour;
  logic [9:0] R, G, B; logic HS, VS, BLK, SYN, VCK;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  vga_adapter dut (.clk, .plot, .x, .y, .colour, .vga_clk(vclk), .vga_rst_n(vrst_n),
    .VGA_R(R), .VGA_G(G), .VGA_B(B), .VGA_HS(HS), .VGA_VS(VS), .VGA_BLANK_N(BLK), .VGA_SYNC_N(SYN), .VGA_CLK(VCK));

  // watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] pat(int px, int py);
    return 3'((px * 3 + py * 5 + (px / 7)) % 8);
  endfunction

  int frames = 0, sx = 0, sy = 0, bad_px = 0, bad_blank = 0, vis = 0;
  int hc = 0, hs_low = 0, h_period_bad = 0, hs_width_bad = 0, since_blank = 0, fp_bad = 0;
  int vs_clk = 0, vs_low = 0, v_period_bad = 0, vs_width_bad = 0;
  logic hs_d = 1'b1, vs_d = 1'b1, blk_d = 1'b0;
  always @(posedge vclk) if (vrst_n) begin
    // horizontal
    hc++;
    since_blank++;
    if (!HS) hs_low++;
    if (!HS && hs_d) begin
      if (frames > 0 && hc != 800) h_period_bad++;
      if (frames > 0 && since_blank < 800 && since_blank != 16) begin
        if (fp_bad < 3) $display("  front porch %0d", since_blank);
        fp_bad++;
      end
      hc = 0;
    end
    if (HS && !hs_d) begin
      if (frames > 0 && hs_low != 96) hs_width_bad++;
      hs_low = 0;
    end
    if (!BLK && blk_d) since_blank = 0;
    // vertical
    vs_clk++;
    if (!VS) vs_low++;
    if (!VS && vs_d) begin
      if (frames > 0 && vs_clk != 525 * 800) v_period_bad++;
      if (frames > 0 && vis != 640 * 480) bad_blank++;
      frames++;
      vs_clk = 0; vis = 0; sy = 0; sx = 0;
    end
    if (VS && !vs_d) begin
      if (vs_low != 2 * 800) vs_width_bad++;
      vs_low = 0;
    end
    // picture
    if (frames > 0) begin
      if (BLK) begin
        logic [2:0] e;
        vis++;
        e = pat(sx / 2, sy / 2);
        if (R != {10{e[2]}} || G != {10{e[1]}} || B != {10{e[0]}}) begin
          if (bad_px < 4) $display("  pixel (%0d,%0d) rgb %h %h %h expected %b", sx, sy, R, G, B, e);
          bad_px++;
        end
        sx++;
      end else begin
        if (R != 0 || G != 0 || B != 0) bad_blank++;
        if (blk_d) begin sx = 0; sy++; end
      end
    end
    hs_d = HS; vs_d = VS; blk_d = BLK;
  end

  initial begin
    repeat (4) @(posedge vclk);
    for (int j = 0; j < 240; j++)
      for (int i = 0; i < 320; i++) begin
        @(negedge clk);
        plot = 1'b1; x = 9'(i); y = 8'(j); colour = pat(i, j);
      end
    @(negedge clk);
    plot = 1'b0;
    vrst_n = 1'b1;
    wait (frames == 2);
    check(bad_px == 0, $sformatf("frame 1: %0d pixels wrong", bad_px));
    @(negedge clk);
    plot = 1'b1; x = 9'd320; y = 8'd0; colour = ~pat(0, 1);
    @(negedge clk);
    plot = 1'b0;
    wait (frames == 3);
    check(bad_px == 0, $sformatf("frame 2: %0d pixels wrong (outside plot must be ignored)", bad_px));
    check(bad_blank == 0, "blank area black and 640x480 visible pixels per frame");
    check(h_period_bad == 0, "800 clocks per line");
    check(hs_width_bad == 0, "96-clock horizontal sync");
    check(fp_bad == 0, "16-clock front porch");
    check(v_period_bad == 0, "525 lines per frame");
    check(vs_width_bad == 0, "2-line vertical sync");
    check(!SYN && VCK === vclk, "sync-on-green off, pixel clock out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
