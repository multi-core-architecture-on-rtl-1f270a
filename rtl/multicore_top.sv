// multicore_top: a ROWS x COLS array of processing elements with a
// controller, joined by a neighbourhood network and a global router.
//
// Each PE is a pe_tile (local memory, timer, system ID, network interface)
// whose processor is external: the data masters of the PEs enter on
// `pe_req[i]`/`pe_rsp[i]` (PE index i = row*COLS + col, identity i+1) and
// that of the controller on `ctrl_req`/`ctrl_rsp`. Software reaches the
// networks through the network interface at bus word address 0x8000 + a
// 12-bit offset:
//   0x8000 | 0x800 | id   global router: SEND (write) / RECEIVE (read)
//   0x8000 | dir          neighbourhood network, dir 0..7
//   controller write 0x8800 sets the router mode (PE_PE, PE_CTRL, PE_IO,
//   CTRL_IO = 0..3)
// The I/O peripheral, which is not part of this design, hangs off the router:
// its slave bus is `io_req`/`io_rsp` and words it sends to a PE or the
// controller enter on `io_in`/`io_in_ack`. The number of PEs, set by ROWS
// and COLS before synthesis, and the two networks follow the source
// description; the default 3 x 3 grid (the smallest with a PE that has all
// eight neighbours) and the sizes are this design's own.
module multicore_top
  import mc_pkg::*;
#(
  parameter int          ROWS         = 3,
  parameter int          COLS         = 3,
  parameter int          MEM_DEPTH    = 4096,
  parameter int unsigned TIMER_PERIOD = 49999
) (
  input  logic              clk,
  input  logic              rst_n,
  input  avmm_req_t         pe_req   [ROWS*COLS],
  output avmm_rsp_t         pe_rsp   [ROWS*COLS],
  output logic              pe_irq   [ROWS*COLS],
  output logic              pe_tick  [ROWS*COLS],
  input  avmm_req_t         ctrl_req,
  output avmm_rsp_t         ctrl_rsp,
  output logic              ctrl_irq,
  output logic              ctrl_tick,
  output avmm_req_t         io_req,
  input  avmm_rsp_t         io_rsp,
  input  gr_req_t           io_in,
  output logic              io_in_ack,
  output gr_mode_e          mode
);
  localparam int N_PE = ROWS * COLS;

  gr_req_t           gr_req   [N_PE+1];
  logic              gr_ack   [N_PE+1];
  logic              mbox_full[N_PE+1];
  logic [DATA_W-1:0] gr_rdata;
  gr_dlv_t           gr_dlv;
  nb_req_t           nb_req   [N_PE];
  logic              nb_ack   [N_PE];
  logic [DATA_W-1:0] nb_rdata [N_PE];

  // The controller has no neighbours: its interface never raises this
  // request (IS_CTRL), so it is left unconnected.
  nb_req_t           ctrl_nb_req;

  pe_tile #(
    .IS_CTRL(1'b1), .MY_ID(CTRL_ID),
    .MEM_DEPTH(MEM_DEPTH), .TIMER_PERIOD(TIMER_PERIOD)
  ) u_ctrl (
    .clk, .rst_n,
    .cpu_req(ctrl_req), .cpu_rsp(ctrl_rsp),
    .timer_irq(ctrl_irq), .timer_tick(ctrl_tick),
    .gr_req(gr_req[0]), .gr_ack(gr_ack[0]), .gr_rdata, .gr_dlv,
    .mbox_full(mbox_full[0]),
    .nb_req(ctrl_nb_req), .nb_ack(1'b0), .nb_rdata('0)
  );

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    pe_tile #(
      .IS_CTRL(1'b0), .MY_ID(FIELD_W'(i + 1)),
      .MEM_DEPTH(MEM_DEPTH), .TIMER_PERIOD(TIMER_PERIOD)
    ) u_pe (
      .clk, .rst_n,
      .cpu_req(pe_req[i]), .cpu_rsp(pe_rsp[i]),
      .timer_irq(pe_irq[i]), .timer_tick(pe_tick[i]),
      .gr_req(gr_req[i+1]), .gr_ack(gr_ack[i+1]), .gr_rdata, .gr_dlv,
      .mbox_full(mbox_full[i+1]),
      .nb_req(nb_req[i]), .nb_ack(nb_ack[i]), .nb_rdata(nb_rdata[i])
    );
  end

  global_router #(.N_PE(N_PE)) u_router (
    .clk, .rst_n,
    .ni_req(gr_req), .ni_ack(gr_ack), .mbox_full,
    .io_in, .io_in_ack,
    .rdata(gr_rdata), .dlv(gr_dlv),
    .io_req, .io_rsp, .mode
  );

  neighbour_network #(.ROWS(ROWS), .COLS(COLS)) u_nbnet (
    .clk, .rst_n, .req(nb_req), .ack(nb_ack), .rdata(nb_rdata)
  );
endmodule
