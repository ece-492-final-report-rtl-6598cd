// i2c_av_config: writes the start-up register settings of the audio codec
// and the TV decoder over I2C.
//
// After reset the sequencer walks a table of NUM_ENTRIES 24-bit entries
// {device address, register byte, data byte}. For each one it starts the
// i2c_controller, waits for done, and moves on; an entry whose transfer was
// not acknowledged is sent again (retries are counted). When the table is
// finished config_done stays high. The bus clock is made from CLK_HZ, which
// the source system requires to be the 50 MHz board clock.
//
// The source system names this module and says that it holds the device
// addresses and register values and that its audio settings give 48 kHz
// playback, but does not list the values. The table below is this design's:
// the WM8731 (I2C address 0x34) is set for line-out playback, 16-bit
// left-justified slave format, 48 kHz with an 18.432 MHz chip clock; the
// ADV7181 (address 0x40) entries are common composite-input NTSC settings,
// ending with its ITU-R 656 output enabled. The entries of each device
// should be checked against its data sheet before use on a board.
module i2c_av_config #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned I2C_HZ = 20_000
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       config_done,
  output logic [5:0] entry,
  output logic [7:0] retries,
  output logic       scl,
  output logic       sda_oe,
  input  logic       sda_i
);

  localparam int unsigned NUM_ENTRIES = 22;

  function automatic logic [23:0] table_entry(logic [5:0] i);
    unique case (i)
      // WM8731 audio codec: {7-bit register, 9-bit value} per write
      6'd0:  return {8'h34, 16'h001A};  // left line in volume
      6'd1:  return {8'h34, 16'h021A};  // right line in volume
      6'd2:  return {8'h34, 16'h047B};  // left headphone out volume
      6'd3:  return {8'h34, 16'h067B};  // right headphone out volume
      6'd4:  return {8'h34, 16'h08F8};  // analogue path: DAC selected
      6'd5:  return {8'h34, 16'h0A06};  // digital path: de-emphasis 48 kHz
      6'd6:  return {8'h34, 16'h0C00};  // power down control: all on
      6'd7:  return {8'h34, 16'h0E01};  // format: left-justified, 16 bit, slave
      6'd8:  return {8'h34, 16'h1002};  // sampling: 48 kHz from 18.432 MHz
      6'd9:  return {8'h34, 16'h1201};  // activate digital interface
      // ADV7181 TV decoder: {register, value}
      6'd10: return {8'h40, 16'h0000};  // input: composite, autodetect standard
      6'd11: return {8'h40, 16'h1500};
      6'd12: return {8'h40, 16'h1741};  // shaping filter
      6'd13: return {8'h40, 16'h3A16};
      6'd14: return {8'h40, 16'h5004};
      6'd15: return {8'h40, 16'hC305};
      6'd16: return {8'h40, 16'hC480};
      6'd17: return {8'h40, 16'h0E80};
      6'd18: return {8'h40, 16'h5020};
      6'd19: return {8'h40, 16'h5218};
      6'd20: return {8'h40, 16'h0E00};
      6'd21: return {8'h40, 16'h0402};  // ITU-R 656 output with timing codes
      default: return 24'h0;
    endcase
  endfunction

  typedef enum logic [1:0] {C_START, C_WAIT, C_DONE} cstate_e;
  cstate_e state;

  logic start, busy, done, ack_err;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= C_START;
      entry       <= '0;
      retries     <= '0;
      config_done <= 1'b0;
    end else begin
      unique case (state)
        C_START: if (!busy) state <= C_WAIT;
        C_WAIT: if (done) begin
          if (ack_err) begin
            retries <= retries + 1'b1;
            state   <= C_START;
          end else if (entry == 6'(NUM_ENTRIES - 1)) begin
            state       <= C_DONE;
            config_done <= 1'b1;
          end else begin
            entry <= entry + 1'b1;
            state <= C_START;
          end
        end
        C_DONE: ;
        default: state <= C_DONE;
      endcase
    end
  end

  assign start = (state == C_START) && !busy;

  i2c_controller #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) u_i2c (
    .clk, .rst_n, .start, .data(table_entry(entry)), .busy, .done, .ack_err,
    .scl, .sda_oe, .sda_i
  );

endmodule
