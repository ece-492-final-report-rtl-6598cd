// reset_delay: power-on / push-button reset stretcher.
//
// The board's reset button (KEY[0], active low) asserts the reset at once;
// its release is synchronised to the clock and the reset output is held for DELAY_CYCLES more
// cycles so that PLLs and the external chips have settled before the system
// starts. Pressing the button again restarts the count. The module's role and
// its use of KEY[0] follow the source system; the delay length (2^20 cycles,
// about 21 ms at 50 MHz) is this design's choice.
// Timing: rst_n_out rises DELAY_CYCLES + 2 clock cycles after key_n rises.
module reset_delay #(
  parameter int unsigned DELAY_CYCLES = 1 << 20
) (
  input  logic clk,
  input  logic key_n,       // asynchronous, active low
  output logic rst_n_out
);

  localparam int unsigned CW = $clog2(DELAY_CYCLES + 1);

  logic          k1, k2;
  logic [CW-1:0] count;

  // The button asserts the reset at once (asynchronously); its release is
  // synchronised by k1/k2 before the count starts.
  always_ff @(posedge clk or negedge key_n) begin
    if (!key_n) begin
      k1 <= 1'b0;
      k2 <= 1'b0;
    end else begin
      k1 <= 1'b1;
      k2 <= k1;
    end
  end

  always_ff @(posedge clk or negedge key_n) begin
    if (!key_n) begin
      count     <= '0;
      rst_n_out <= 1'b0;
    end else if (!k2) begin
      count     <= '0;
      rst_n_out <= 1'b0;
    end else if (count != CW'(DELAY_CYCLES)) begin
      count     <= count + 1'b1;
      rst_n_out <= 1'b0;
    end else begin
      rst_n_out <= 1'b1;
    end
  end

endmodule
