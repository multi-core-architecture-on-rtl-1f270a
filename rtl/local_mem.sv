// local_mem: the local data memory of one processor.
//
// A single-port RAM of DEPTH 32-bit words on an Avalon-MM slave port. A
// write takes one cycle. A read is registered: the first cycle of a read
// raises waitrequest while the array is read, and the next cycle returns the
// word with waitrequest low, so a read completes after two cycles. The word
// address is taken from the low bits of the bus address. The source description only
// names a local data memory; its size and timing here are this design's own.
module local_mem
  import mc_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  avmm_req_t s_req,
  output avmm_rsp_t s_rsp
);
  localparam int AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] rdata_q;
  logic              rd_done_q;  // read data for the pending read is in rdata_q
  logic [AW-1:0]     waddr;

  assign waddr = s_req.address[AW-1:0];

  always_ff @(posedge clk) begin
    if (s_req.write) mem[waddr] <= s_req.writedata;
    rdata_q <= mem[waddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            rd_done_q <= 1'b0;
    else if (rd_done_q)    rd_done_q <= 1'b0;
    else                   rd_done_q <= s_req.read;
  end

  always_comb begin
    s_rsp.readdata    = rdata_q;
    s_rsp.waitrequest = s_req.read && !rd_done_q;
  end
endmodule
