// pe_bus: the data-bus interconnect of one processing element.
//
// Decodes the processor's 16-bit word address and steers the Avalon-MM
// request to one of four slaves; the selected slave's readdata and
// waitrequest go back to the processor. Purely combinational.
//   0x0000-0x3FFF  local data memory   (slave 0)
//   0x4000-0x4FFF  timer               (slave 1)
//   0x5000-0x5FFF  system ID           (slave 2)
//   0x8000-0x8FFF  network interface   (slave 3, 12-bit offset)
// Accesses elsewhere complete at once and read zero. In the source system
// this interconnect is generated by the FPGA tools; the memory map here is
// this design's own.
module pe_bus
  import mc_pkg::*;
(
  input  avmm_req_t m_req,
  output avmm_rsp_t m_rsp,
  output avmm_req_t s_req [4],
  input  avmm_rsp_t s_rsp [4]
);
  logic [3:0] sel;

  always_comb begin
    sel = 4'b0000;
    if (m_req.address[15:14] == 2'b00)      sel[0] = 1'b1;
    else if (m_req.address[15:12] == 4'h4)  sel[1] = 1'b1;
    else if (m_req.address[15:12] == 4'h5)  sel[2] = 1'b1;
    else if (m_req.address[15:12] == 4'h8)  sel[3] = 1'b1;
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s_req[i]       = m_req;
      s_req[i].read  = m_req.read  && sel[i];
      s_req[i].write = m_req.write && sel[i];
    end
  end

  always_comb begin
    m_rsp = '{readdata: '0, waitrequest: 1'b0};
    for (int i = 0; i < 4; i++)
      if (sel[i]) m_rsp = s_rsp[i];
  end
endmodule
