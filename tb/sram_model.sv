// sram_model: behavioural model of the board's asynchronous 256K x 16 SRAM.
//
// Reads are combinational: while CE_N and OE_N are low the addressed word
// appears on dq_i (byte lanes selected by UB_N/LB_N, unselected lanes read
// 0). A write is stored at the rising edge of WE_N with CE_N low, with the
// address and data present at that moment, per byte lane. conflicts counts
// cycles where the controller drives the bus while the SRAM outputs.
module sram_model (
  input  logic [17:0] addr,
  input  logic [15:0] dq_o,
  input  logic        dq_oe,
  output logic [15:0] dq_i,
  input  logic        we_n,
  input  logic        oe_n,
  input  logic        ce_n,
  input  logic        ub_n,
  input  logic        lb_n
);

  logic [15:0] mem [1 << 18];
  int          writes = 0;
  int          conflicts = 0;

  always_comb begin
    dq_i = '0;
    if (!ce_n && !oe_n && we_n) begin
      if (!ub_n) dq_i[15:8] = mem[addr][15:8];
      if (!lb_n) dq_i[7:0]  = mem[addr][7:0];
    end
  end

  always @(posedge we_n) if (!ce_n) begin
    if (!ub_n) mem[addr][15:8] = dq_o[15:8];
    if (!lb_n) mem[addr][7:0]  = dq_o[7:0];
    if (!dq_oe) conflicts++;
    writes++;
  end

  always @(dq_oe or oe_n or ce_n) if (dq_oe && !oe_n && !ce_n) conflicts++;

endmodule
