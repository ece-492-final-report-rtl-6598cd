// sram_arbiter: shares the SRAM controller between two bus masters.
//
// Master 0 is the processor (reading the photograph, or testing memory),
// master 1 the video-in frame writer. A request is passed to the controller
// when the controller is idle; if both masters ask in the same cycle, the one
// that was not served last goes first (round robin), so neither can lock the
// other out. The master that is not passed on sees waitrequest. The owner of
// an accepted read is remembered and only it gets readdatavalid; the
// controller has at most one read in flight. Grant logic is combinational:
// a request is accepted in the cycle it appears if the controller is idle.
// That both the processor and the video-in core reach the SRAM follows the
// source system; the round-robin scheme is this design's choice.
module sram_arbiter
  import ar_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  sram_req_t m0_req,
  output sram_rsp_t m0_rsp,
  input  sram_req_t m1_req,
  output sram_rsp_t m1_rsp,
  output sram_req_t s_req,
  input  sram_rsp_t s_rsp
);

  logic want0, want1, grant1, last1, rd_owner1, accept;

  assign want0  = m0_req.read || m0_req.write;
  assign want1  = m1_req.read || m1_req.write;
  assign grant1 = want1 && (!want0 || !last1);
  assign s_req  = grant1 ? m1_req : m0_req;
  assign accept = (want0 || want1) && !s_rsp.waitrequest;

  always_comb begin
    m0_rsp               = s_rsp;
    m1_rsp               = s_rsp;
    m0_rsp.waitrequest   = s_rsp.waitrequest || grant1;
    m1_rsp.waitrequest   = s_rsp.waitrequest || !grant1;
    m0_rsp.readdatavalid = s_rsp.readdatavalid && !rd_owner1;
    m1_rsp.readdatavalid = s_rsp.readdatavalid && rd_owner1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last1     <= 1'b0;
      rd_owner1 <= 1'b0;
    end else if (accept) begin
      last1 <= grant1;
      if (s_req.read) rd_owner1 <= grant1;
    end
  end

endmodule
