// net_if: network interface wrapper between a processor and the two networks.
//
// The processor sees an Avalon-MM slave with a 12-bit word address. Bit 11
// picks the network, as the source description specifies:
//   bit 11 = 1  global router. The 11-bit field is a PE identity, 0 for the
//               controller, or an I/O peripheral address.
//               write             -> SEND (or MODE, for the controller at 0x800)
//               read, field == ID -> RECEIVE: pop this interface's mailbox
//               read, other field -> read the I/O peripheral through the router
//   bit 11 = 0  neighbourhood network; field[2:0] is the direction 0..7
//               (N, E, W, S, NE, NW, SE, SW). A write sends a word to that
//               neighbour, a read takes the word that neighbour sent.
// Every access is blocking: waitrequest stays high until the network accepts
// the word (a SEND into a full buffer stalls) or a word is there to return
// (a RECEIVE from an empty buffer stalls). The global router writes incoming
// words into the one-word mailbox only when its `dest` equals MY_ID, so the
// interface accepts data by its identity number. The interface itself is
// combinational apart from the mailbox; waitrequest depends combinationally
// on the request. The controller's interface (IS_CTRL) has no neighbours:
// its neighbourhood accesses complete at once and read zero.
// The blocking hand-over, the single-word mailbox and the read-by-own-identity
// rule are this design's reading of the SEND/RECEIVE operations of the source
// description.
module net_if
  import mc_pkg::*;
#(
  parameter bit                IS_CTRL = 1'b0,
  parameter logic [FIELD_W-1:0] MY_ID  = 11'd1
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave (processor side)
  input  avmm_req_t         s_req,
  output avmm_rsp_t         s_rsp,
  // global router
  output gr_req_t           gr_req,
  input  logic              gr_ack,
  input  logic [DATA_W-1:0] gr_rdata,
  input  gr_dlv_t           gr_dlv,
  output logic              mbox_full,
  // neighbourhood network
  output nb_req_t           nb_req,
  input  logic              nb_ack,
  input  logic [DATA_W-1:0] nb_rdata
);
  logic               access, is_global, own_field, pop;
  logic [FIELD_W-1:0] field;
  logic [DATA_W-1:0]  mbox_data_q;
  logic               mbox_full_q;

  assign access    = s_req.read || s_req.write;
  assign is_global = s_req.address[NI_ADDR_W-1];
  assign field     = s_req.address[FIELD_W-1:0];
  assign own_field = field == MY_ID;
  assign pop       = s_req.read && is_global && own_field && mbox_full_q;

  always_comb begin
    gr_req.valid = access && is_global && !(s_req.read && own_field);
    gr_req.write = s_req.write;
    gr_req.field = field;
    gr_req.data  = s_req.writedata;

    nb_req.valid = access && !is_global && !IS_CTRL;
    nb_req.write = s_req.write;
    nb_req.dir   = dir_e'(field[2:0]);
    nb_req.data  = s_req.writedata;

    s_rsp.readdata    = '0;
    s_rsp.waitrequest = 1'b0;
    if (access) begin
      if (is_global) begin
        if (s_req.read && own_field) begin
          s_rsp.readdata    = mbox_data_q;
          s_rsp.waitrequest = !mbox_full_q;
        end else begin
          s_rsp.readdata    = gr_rdata;
          s_rsp.waitrequest = !gr_ack;
        end
      end else if (!IS_CTRL) begin
        s_rsp.readdata    = nb_rdata;
        s_rsp.waitrequest = !nb_ack;
      end
    end
  end

  // One-word mailbox for words the global router delivers to this identity.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mbox_full_q <= 1'b0;
      mbox_data_q <= '0;
    end else if (gr_dlv.valid && gr_dlv.dest == MY_ID && !mbox_full_q) begin
      mbox_full_q <= 1'b1;
      mbox_data_q <= gr_dlv.data;
    end else if (pop) begin
      mbox_full_q <= 1'b0;
    end
  end

  assign mbox_full = mbox_full_q;

  // Avalon rule: a master may not drop or change a request it is stalled on.
  property p_hold_request;
    @(posedge clk) disable iff (!rst_n)
      (access && s_rsp.waitrequest) |=> ($stable(s_req) && (s_req.read || s_req.write));
  endproperty
  a_hold_request: assert property (p_hold_request)
    else $error("net_if: request changed while waitrequest was high");

  // The router never delivers into a full mailbox.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(gr_dlv.valid && gr_dlv.dest == MY_ID && mbox_full_q))
    else $error("net_if: delivery into a full mailbox");
endmodule
