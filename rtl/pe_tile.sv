// pe_tile: one processing-element subsystem, everything around a processor.
//
// The processor itself is external: its Avalon-MM data master enters on
// `cpu_req`/`cpu_rsp`. pe_bus decodes the address and reaches
//   - the local data memory (local_mem, MEM_DEPTH words),
//   - the timer that gives the periodic system tick (pe_timer),
//   - the system ID register, which reads back the tile's identity MY_ID so
//     that software can tell the PEs apart,
//   - the network interface (net_if), whose global-router and
//     neighbourhood-network sides are brought out.
// The same tile, with IS_CTRL set and MY_ID 0, serves the controller, which
// has no neighbourhood links. Timing is that of the slaves: memory reads take
// two cycles, timer and system ID one, network accesses wait on the network.
// The set of peripherals per processor follows the source description; the
// memory map (see pe_bus) and the sizes are this design's own.
module pe_tile
  import mc_pkg::*;
#(
  parameter bit                 IS_CTRL      = 1'b0,
  parameter logic [FIELD_W-1:0] MY_ID        = 11'd1,
  parameter int                 MEM_DEPTH    = 4096,
  parameter int unsigned        TIMER_PERIOD = 49999
) (
  input  logic              clk,
  input  logic              rst_n,
  input  avmm_req_t         cpu_req,
  output avmm_rsp_t         cpu_rsp,
  output logic              timer_irq,
  output logic              timer_tick,
  // global router side
  output gr_req_t           gr_req,
  input  logic              gr_ack,
  input  logic [DATA_W-1:0] gr_rdata,
  input  gr_dlv_t           gr_dlv,
  output logic              mbox_full,
  // neighbourhood network side
  output nb_req_t           nb_req,
  input  logic              nb_ack,
  input  logic [DATA_W-1:0] nb_rdata
);
  avmm_req_t s_req [4];
  avmm_rsp_t s_rsp [4];
  avmm_rsp_t mem_rsp, tim_rsp, sid_rsp, ni_rsp;

  assign s_rsp = '{mem_rsp, tim_rsp, sid_rsp, ni_rsp};

  pe_bus u_bus (
    .m_req(cpu_req), .m_rsp(cpu_rsp), .s_req(s_req), .s_rsp(s_rsp)
  );

  local_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n, .s_req(s_req[0]), .s_rsp(mem_rsp)
  );

  pe_timer #(.DEFAULT_PERIOD(TIMER_PERIOD)) u_timer (
    .clk, .rst_n, .s_req(s_req[1]), .s_rsp(tim_rsp),
    .tick(timer_tick), .irq(timer_irq)
  );

  // System ID peripheral: word 0 is the identity, word 1 the grid role.
  always_comb begin
    sid_rsp.waitrequest = 1'b0;
    sid_rsp.readdata    = s_req[2].address[0] ? DATA_W'(IS_CTRL)
                                              : DATA_W'(MY_ID);
  end

  net_if #(.IS_CTRL(IS_CTRL), .MY_ID(MY_ID)) u_ni (
    .clk, .rst_n,
    .s_req(s_req[3]), .s_rsp(ni_rsp),
    .gr_req, .gr_ack, .gr_rdata, .gr_dlv, .mbox_full,
    .nb_req, .nb_ack, .nb_rdata
  );
endmodule
