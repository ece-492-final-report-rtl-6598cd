// i2c_controller: single-master I2C writer of one 24-bit transfer.
//
// A transfer is START, three bytes MSB first (device address with the write
// bit, then two bytes that the device reads as register address and data),
// each followed by an acknowledge slot, and STOP. The audio codec and the TV
// decoder are both set up with transfers of this shape. The bus is cut into
// quarter periods of the I2C clock, I2C_HZ, derived from CLK_HZ: in each bit
// SCL is low for two quarters (SDA changes in the first) and high for two
// (the acknowledge is sampled at the end of the third). SCL is driven push-
// pull; SDA is open drain (sda_oe = 1 pulls the line low, 0 releases it).
// start is taken when busy is low; done pulses for one cycle at the end, with
// ack_err set if any of the three acknowledges was missing.
// What follows the source system: 24-bit address/register/data writes from a
// 50 MHz clock. The 20 kHz bus clock and the quarter-period sequencing are
// this design's choice.
module i2c_controller #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned I2C_HZ = 20_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [23:0] data,
  output logic        busy,
  output logic        done,
  output logic        ack_err,
  output logic        scl,
  output logic        sda_oe,
  input  logic        sda_i
);

  localparam int unsigned QDIV = (CLK_HZ / (4 * I2C_HZ)) < 1 ? 1 : CLK_HZ / (4 * I2C_HZ);
  localparam int unsigned QW   = $clog2(QDIV + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_STOP, S_DONE} state_e;

  state_e      state;
  logic [QW-1:0] qcnt;
  logic        qtick;
  logic [1:0]  quarter;
  logic [4:0]  slot;       // 0..26: 3 x (8 data + 1 ack)
  logic [23:0] sh;
  logic        err;

  assign qtick = (qcnt == QW'(QDIV - 1));

  logic [3:0] pos;
  assign pos = 4'(slot % 9);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      qcnt    <= '0;
      quarter <= '0;
      slot    <= '0;
      sh      <= '0;
      err     <= 1'b0;
      scl     <= 1'b1;
      sda_oe  <= 1'b0;
      done    <= 1'b0;
      ack_err <= 1'b0;
    end else begin
      done <= 1'b0;
      qcnt <= (state == S_IDLE || qtick) ? '0 : qcnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          scl    <= 1'b1;
          sda_oe <= 1'b0;
          if (start) begin
            sh      <= data;
            err     <= 1'b0;
            quarter <= '0;
            state   <= S_START;
          end
        end
        S_START: if (qtick) begin
          // q0: SDA falls with SCL high, q1: SCL falls
          quarter <= quarter + 1'b1;
          if (quarter == 2'd0) sda_oe <= 1'b1;
          if (quarter == 2'd1) begin
            scl     <= 1'b0;
            quarter <= '0;
            slot    <= '0;
            state   <= S_BIT;
          end
        end
        S_BIT: if (qtick) begin
          quarter <= quarter + 1'b1;
          unique case (quarter)
            2'd0: begin
              if (pos == 4'd8) sda_oe <= 1'b0;            // release for ACK
              else begin
                sda_oe <= ~sh[23];
                sh     <= {sh[22:0], 1'b0};
              end
            end
            2'd1: scl <= 1'b1;
            2'd2: if (pos == 4'd8 && sda_i) err <= 1'b1;  // no ACK
            2'd3: begin
              scl <= 1'b0;
              if (slot == 5'd26) state <= S_STOP;
              else slot <= slot + 1'b1;
            end
          endcase
        end
        S_STOP: if (qtick) begin
          // q0: SDA low, q1: SCL high, q2: SDA released (STOP)
          quarter <= quarter + 1'b1;
          if (quarter == 2'd0) sda_oe <= 1'b1;
          if (quarter == 2'd1) scl    <= 1'b1;
          if (quarter == 2'd2) begin
            sda_oe <= 1'b0;
            state  <= S_DONE;
          end
        end
        S_DONE: begin
          done    <= 1'b1;
          ack_err <= err;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
