// avmm_bfm: behavioural Avalon-MM master standing in for a processor's data
// master in the testbenches.
//
// A transfer is driven on the falling clock edge and held until a falling
// edge after which waitrequest is seen low; the slave takes it on the next
// rising edge, where readdata is captured. `cycles` returns the number of
// clock cycles the transfer occupied (1 = no wait state). Transfers issued
// from one instance are serialised by a semaphore.
module avmm_bfm
  import mc_pkg::*;
(
  input  logic      clk,
  output avmm_req_t req,
  input  avmm_rsp_t rsp
);
  semaphore lock = new(1);

  initial req = '0;

  task automatic xfer(input bit wr, input logic [15:0] addr,
                      input logic [31:0] wdata, output logic [31:0] rdata,
                      output int cycles);
    lock.get(1);
    @(negedge clk);
    req.read      = !wr;
    req.write     = wr;
    req.address   = addr;
    req.writedata = wdata;
    cycles        = 0;
    forever begin
      #1;
      cycles++;
      if (!rsp.waitrequest) begin
        rdata = rsp.readdata;
        break;
      end
      @(negedge clk);
    end
    @(posedge clk);
    #1;
    req = '0;
    lock.put(1);
  endtask

  task automatic write(input logic [15:0] addr, input logic [31:0] wdata);
    logic [31:0] unused_rd;
    int          unused_cy;
    xfer(1'b1, addr, wdata, unused_rd, unused_cy);
  endtask

  task automatic read(input logic [15:0] addr, output logic [31:0] rdata);
    int unused_cy;
    xfer(1'b0, addr, '0, rdata, unused_cy);
  endtask
endmodule
