// sram_controller: word port to the board's asynchronous 256K x 16 SRAM.
//
// The SRAM holds the 320x240 photograph of the guest: the video-in core
// writes it and the processor reads it back to serve it as a bitmap. Each
// access takes three clock cycles: in ACT the address, chip enable, byte
// lanes and (for a write) the data are driven with WE_N or OE_N low; at the
// end of ACT read data is sampled; in END WE_N returns high with address and
// data still held, which ends a write cleanly; then the controller is idle.
// The port accepts a request whenever waitrequest is low (only while idle)
// and returns read data with readdatavalid two cycles after acceptance.
// The data bus is split into dq_o / dq_oe / dq_i for the pad's tristate
// buffer. That the frame is stored in the SRAM through a controller of this
// name follows the source system; the cycle timing (sized for a 10 ns part
// at 100 MHz) is this design's choice.
module sram_controller
  import ar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sram_req_t   s_req,
  output sram_rsp_t   s_rsp,

  output logic [17:0] SRAM_ADDR,
  output logic [15:0] SRAM_DQ_o,
  output logic        SRAM_DQ_oe,
  input  logic [15:0] SRAM_DQ_i,
  output logic        SRAM_WE_N,
  output logic        SRAM_OE_N,
  output logic        SRAM_CE_N,
  output logic        SRAM_UB_N,
  output logic        SRAM_LB_N
);

  typedef enum logic [1:0] {S_IDLE, S_ACT, S_END} state_e;
  state_e state;
  logic   is_read;

  assign s_rsp.waitrequest = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state               <= S_IDLE;
      is_read             <= 1'b0;
      SRAM_ADDR           <= '0;
      SRAM_DQ_o           <= '0;
      SRAM_DQ_oe          <= 1'b0;
      SRAM_WE_N           <= 1'b1;
      SRAM_OE_N           <= 1'b1;
      SRAM_CE_N           <= 1'b1;
      SRAM_UB_N           <= 1'b1;
      SRAM_LB_N           <= 1'b1;
      s_rsp.readdata      <= '0;
      s_rsp.readdatavalid <= 1'b0;
    end else begin
      s_rsp.readdatavalid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          SRAM_CE_N  <= 1'b1;
          SRAM_OE_N  <= 1'b1;
          SRAM_DQ_oe <= 1'b0;
          if (s_req.read || s_req.write) begin
            state      <= S_ACT;
            is_read    <= s_req.read;
            SRAM_ADDR  <= s_req.address;
            SRAM_DQ_o  <= s_req.writedata;
            SRAM_DQ_oe <= s_req.write;
            SRAM_WE_N  <= !s_req.write;
            SRAM_OE_N  <= !s_req.read;
            SRAM_CE_N  <= 1'b0;
            SRAM_UB_N  <= s_req.read ? 1'b0 : !s_req.byteenable[1];
            SRAM_LB_N  <= s_req.read ? 1'b0 : !s_req.byteenable[0];
          end
        end
        S_ACT: begin
          state     <= S_END;
          SRAM_WE_N <= 1'b1;
          if (is_read) begin
            s_rsp.readdata      <= SRAM_DQ_i;
            s_rsp.readdatavalid <= 1'b1;
          end
        end
        S_END: begin
          state     <= S_IDLE;
          SRAM_OE_N <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(s_req.read && s_req.write));
  // WE_N and OE_N are never low together
  a_we_oe: assert property (@(posedge clk) disable iff (!rst_n) SRAM_WE_N || SRAM_OE_N);

endmodule
