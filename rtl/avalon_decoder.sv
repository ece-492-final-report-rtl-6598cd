// avalon_decoder: connects the processor's data master to the peripherals.
//
// The byte address of each access is compared with the address map of
// ar_pkg and the access is passed to the one slave whose range holds it,
// with the address made relative to that slave's base (so a slave decodes
// its registers from offset 0 whatever its alignment); the other slaves see
// no read or write. Read data and
// readdatavalid come back from the slave that took the read. To keep the
// return path simple the decoder allows one read in flight: while it waits
// for read data it holds the master off with waitrequest. An access to an
// address that no slave claims is completed at once (reads return 0) and
// sets the sticky decode_error flag. Stalls of the selected slave are passed
// to the master. The base and end addresses of latch, sensor and LED PIOs
// follow the source system; the other ranges and the single-read rule are
// this design's choice.
module avalon_decoder
  import ar_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  avm_req_t m_req,
  output avm_rsp_t m_rsp,
  output avm_req_t s_req [NUM_SLAVES],
  input  avm_rsp_t s_rsp [NUM_SLAVES],
  output logic     decode_error
);

  function automatic logic in_range(logic [AV_AW-1:0] a, addr_range_t r);
    return (a >= r.base) && (a <= r.last);
  endfunction

  function automatic slave_e decode(logic [AV_AW-1:0] a);
    if (in_range(a, MAP_LATCH))   return SL_LATCH;
    if (in_range(a, MAP_SENSOR))  return SL_SENSOR;
    if (in_range(a, MAP_LED))     return SL_LED;
    if (in_range(a, MAP_RED_LED)) return SL_RED_LED;
    if (in_range(a, MAP_SD_DAT))  return SL_SD_DAT;
    if (in_range(a, MAP_SD_CMD))  return SL_SD_CMD;
    if (in_range(a, MAP_SD_CLK))  return SL_SD_CLK;
    if (in_range(a, MAP_AUDIO))   return SL_AUDIO;
    if (in_range(a, MAP_VIDEO))   return SL_VIDEO;
    if (in_range(a, MAP_SRAM))    return SL_SRAM;
    if (in_range(a, MAP_SD_DAT3)) return SL_SD_DAT3;
    return SL_NONE;
  endfunction

  function automatic logic [AV_AW-1:0] base_of(int i);
    unique case (slave_e'(i))
      SL_LATCH:   return MAP_LATCH.base;
      SL_SENSOR:  return MAP_SENSOR.base;
      SL_LED:     return MAP_LED.base;
      SL_RED_LED: return MAP_RED_LED.base;
      SL_SD_DAT:  return MAP_SD_DAT.base;
      SL_SD_CMD:  return MAP_SD_CMD.base;
      SL_SD_CLK:  return MAP_SD_CLK.base;
      SL_AUDIO:   return MAP_AUDIO.base;
      SL_VIDEO:   return MAP_VIDEO.base;
      SL_SRAM:    return MAP_SRAM.base;
      SL_SD_DAT3: return MAP_SD_DAT3.base;
      default:    return '0;
    endcase
  endfunction

  slave_e sel, rd_sel;
  logic   rd_pending, none_rvalid, sel_wait, taken;

  assign sel      = decode(m_req.address);
  assign sel_wait = (sel != SL_NONE) && s_rsp[sel].waitrequest;
  assign taken    = (m_req.read || m_req.write) && !rd_pending && !sel_wait;

  always_comb begin
    for (int i = 0; i < int'(NUM_SLAVES); i++) begin
      s_req[i]         = m_req;
      s_req[i].address = m_req.address - base_of(i);
      if (rd_pending || sel != slave_e'(i)) begin
        s_req[i].read  = 1'b0;
        s_req[i].write = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_pending   <= 1'b0;
      rd_sel       <= SL_NONE;
      none_rvalid  <= 1'b0;
      decode_error <= 1'b0;
    end else begin
      none_rvalid <= 1'b0;
      if (taken && m_req.read) begin
        rd_pending <= 1'b1;
        rd_sel     <= sel;
      end else if (rd_pending && (rd_sel == SL_NONE ? none_rvalid : s_rsp[rd_sel].readdatavalid)) begin
        rd_pending <= 1'b0;
      end
      if (taken && sel == SL_NONE) begin
        decode_error <= 1'b1;
        none_rvalid  <= m_req.read;
      end
    end
  end

  always_comb begin
    m_rsp.waitrequest = (m_req.read || m_req.write) && !taken;
    if (rd_sel == SL_NONE) begin
      m_rsp.readdata      = '0;
      m_rsp.readdatavalid = rd_pending && none_rvalid;
    end else begin
      m_rsp.readdata      = s_rsp[rd_sel].readdata;
      m_rsp.readdatavalid = rd_pending && s_rsp[rd_sel].readdatavalid;
    end
  end

endmodule
