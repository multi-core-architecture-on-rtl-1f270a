// global_router: shared router between the PEs, the controller and the I/O
// peripheral, working in one communication mode at a time.
//
// Source i of ni_req is the network interface with identity i: 0 is the
// controller, 1..N_PE the PEs. A further source, io_in, lets the I/O
// peripheral send words to a PE or to the controller. The mode register is
// written by the controller (write with field 0, i.e. address 0x800) and
// decides which transfers may proceed:
//   PE_PE    PE write to identity 1..N_PE          -> that PE's mailbox
//   PE_CTRL  PE write to field 0                   -> controller's mailbox
//            controller write to identity 1..N_PE  -> that PE's mailbox
//   PE_IO    PE write/read at field                -> I/O peripheral
//            io_in to identity 1..N_PE             -> that PE's mailbox
//   CTRL_IO  controller write/read at field != 0   -> I/O peripheral
//            io_in to field 0                      -> controller's mailbox
// A request the current mode does not allow waits, stalling its processor,
// until the controller selects a mode that allows it. A write to an identity
// above N_PE has no receiver and is acknowledged and dropped. One transfer
// completes per cycle: among the requests that can complete, a round-robin
// pointer picks one, and the pointer moves past it. A mailbox transfer
// completes in the cycle it is granted if the destination mailbox is empty
// (the word is broadcast on `dlv` and taken by the interface whose identity
// matches). An I/O transfer holds the grant until the peripheral drops
// waitrequest; the read data is returned on `rdata` with the acknowledge.
// The modes and the address fields follow the source description; the
// single shared transfer per cycle, round-robin arbitration, waiting on a
// disallowed mode and the numeric mode codes are this design's own choices.
module global_router
  import mc_pkg::*;
#(
  parameter int N_PE = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  gr_req_t           ni_req   [N_PE+1],
  output logic              ni_ack   [N_PE+1],
  input  logic              mbox_full[N_PE+1],
  input  gr_req_t           io_in,
  output logic              io_in_ack,
  output logic [DATA_W-1:0] rdata,
  output gr_dlv_t           dlv,
  output avmm_req_t         io_req,
  input  avmm_rsp_t         io_rsp,
  output gr_mode_e          mode
);
  localparam int NS = N_PE + 2;  // sources: identities 0..N_PE, then io_in
  localparam int IO_SRC = N_PE + 1;
  localparam int PW = $clog2(NS);
  localparam int IW = $clog2(N_PE + 1);  // bits to index a mailbox

  typedef enum logic [2:0] { K_WAIT, K_MODE, K_MBOX, K_IO, K_DROP } kind_e;

  gr_req_t            src    [NS];
  kind_e              kind   [NS];
  logic [FIELD_W-1:0] dest   [NS];
  logic               elig   [NS];
  gr_mode_e           mode_q;
  logic [PW-1:0]      rr_q, lock_idx_q, grant;
  logic               lock_q, any_grant, done;

  always_comb begin
    for (int s = 0; s <= N_PE; s++) src[s] = ni_req[s];
    src[IO_SRC] = io_in;
  end

  // What each source's request would do in the current mode.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      logic pe_dest, no_dest;
      pe_dest = src[s].field != CTRL_ID && src[s].field <= FIELD_W'(N_PE);
      no_dest = src[s].field > FIELD_W'(N_PE);
      kind[s] = K_WAIT;
      dest[s] = src[s].field;
      if (s == 0) begin
        if (src[s].write && src[s].field == CTRL_ID)
          kind[s] = K_MODE;
        else if (mode_q == MODE_PE_CTRL && src[s].write)
          kind[s] = pe_dest ? K_MBOX : (no_dest ? K_DROP : K_WAIT);
        else if (mode_q == MODE_CTRL_IO && src[s].field != CTRL_ID)
          kind[s] = K_IO;
      end else if (s == IO_SRC) begin
        if (mode_q == MODE_PE_IO && src[s].write)
          kind[s] = pe_dest ? K_MBOX : (no_dest ? K_DROP : K_WAIT);
        else if (mode_q == MODE_CTRL_IO && src[s].write && src[s].field == CTRL_ID)
          kind[s] = K_MBOX;
      end else begin
        if (mode_q == MODE_PE_PE && src[s].write)
          kind[s] = pe_dest ? K_MBOX : (no_dest ? K_DROP : K_WAIT);
        else if (mode_q == MODE_PE_CTRL && src[s].write && src[s].field == CTRL_ID)
          kind[s] = K_MBOX;
        else if (mode_q == MODE_PE_IO)
          kind[s] = K_IO;
      end
      elig[s] = src[s].valid && kind[s] != K_WAIT &&
                !(kind[s] == K_MBOX && mbox_full[dest[s][IW-1:0]]);
    end
  end

  // Round-robin choice, or the source holding an unfinished I/O transfer.
  always_comb begin
    any_grant = 1'b0;
    grant     = '0;
    if (lock_q) begin
      any_grant = 1'b1;
      grant     = lock_idx_q;
    end else begin
      // Scan from the farthest source back to the pointer, so the last hit
      // is the first eligible source at or after the pointer.
      for (int i = NS - 1; i >= 0; i--) begin
        if (elig[(int'(rr_q) + i) % NS]) begin
          any_grant = 1'b1;
          grant     = PW'((int'(rr_q) + i) % NS);
        end
      end
    end
  end

  always_comb begin
    io_req           = '0;
    io_req.address   = BUS_ADDR_W'(src[grant].field);
    io_req.writedata = src[grant].data;
    done             = 1'b0;
    if (any_grant) begin
      if (kind[grant] == K_IO) begin
        io_req.read  = !src[grant].write;
        io_req.write = src[grant].write;
        done         = !io_rsp.waitrequest;
      end else begin
        done = 1'b1;
      end
    end
    for (int s = 0; s <= N_PE; s++) ni_ack[s] = done && grant == PW'(s);
    io_in_ack = done && grant == PW'(IO_SRC);
    rdata     = io_rsp.readdata;
    dlv.valid = done && kind[grant] == K_MBOX;
    dlv.dest  = dest[grant];
    dlv.data  = src[grant].data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q     <= MODE_PE_PE;
      rr_q       <= '0;
      lock_q     <= 1'b0;
      lock_idx_q <= '0;
    end else begin
      if (done) begin
        rr_q   <= (int'(grant) == NS - 1) ? '0 : grant + PW'(1);
        lock_q <= 1'b0;
        if (kind[grant] == K_MODE) mode_q <= gr_mode_e'(src[grant].data[1:0]);
      end else if (any_grant && kind[grant] == K_IO) begin
        lock_q     <= 1'b1;
        lock_idx_q <= grant;
      end
    end
  end

  assign mode = mode_q;

  a_one_delivery: assert property (@(posedge clk) disable iff (!rst_n)
    dlv.valid |-> !mbox_full[dlv.dest[IW-1:0]])
    else $error("global_router: delivery into a full mailbox");
endmodule
