// ir_sensor_interface: input PIO for the infrared proximity sensor.
//
// The sensor's output line arrives on a GPIO_0 pin. It is brought into the
// system clock domain through a two-flop synchroniser, and a rising edge
// (a guest walking into the monitored area) sets a bit of the edge-capture
// register. While that bit and its interrupt-mask bit are both set, irq is
// high; the processor's interrupt handler clears it by writing a one to the
// bit. Rising-edge capture and an interrupt towards the processor follow the
// source system (its sensor PIO is an interrupt sender and the sensor's rising
// output "triggers the ISR"); the register layout is that of a common
// parallel-I/O core and is this design's choice:
//   word 0  data       (read: synchronised input level)
//   word 2  irq mask   (read/write)
//   word 3  edge capture (read; write 1 to clear)
// Bus timing: never stalls, read data returns one cycle after the read.
module ir_sensor_interface
  import ar_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  avm_req_t         avs_req,
  output avm_rsp_t         avs_rsp,
  input  logic [WIDTH-1:0] pin_in,
  output logic             irq
);

  logic [WIDTH-1:0] sync1, sync2, prev;
  logic [WIDTH-1:0] irq_mask, edge_cap;
  logic [1:0]       word;

  assign word = avs_req.address[3:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync1    <= '0;
      sync2    <= '0;
      prev     <= '0;
      irq_mask <= '0;
      edge_cap <= '0;
    end else begin
      sync1 <= pin_in;
      sync2 <= sync1;
      prev  <= sync2;
      if (avs_req.write && word == 2'd2) irq_mask <= avs_req.writedata[WIDTH-1:0];
      // a new edge wins over a clear in the same cycle
      edge_cap <= (edge_cap & ~((avs_req.write && word == 2'd3) ? avs_req.writedata[WIDTH-1:0] : '0))
                  | (sync2 & ~prev);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      avs_rsp <= AVM_RSP_IDLE;
    end else begin
      avs_rsp.readdatavalid <= avs_req.read;
      avs_rsp.readdata      <= '0;
      unique case (word)
        2'd0: avs_rsp.readdata[WIDTH-1:0] <= sync2;
        2'd2: avs_rsp.readdata[WIDTH-1:0] <= irq_mask;
        2'd3: avs_rsp.readdata[WIDTH-1:0] <= edge_cap;
        default: ;
      endcase
    end
  end

  assign irq = |(edge_cap & irq_mask);

  // The bus never asks for a read and a write at once.
  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(avs_req.read && avs_req.write));

endmodule
