// tb_local_mem: checks the local data memory against a reference array.
// Random words are written to random addresses, then every written address
// is read back; each write must take one cycle and each read two.
module tb_local_mem;
  import mc_pkg::*;
  localparam int DEPTH = 4096;

  logic      clk = 1'b0, rst_n = 1'b0;
  avmm_req_t req;
  avmm_rsp_t rsp;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  local_mem #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp));
  avmm_bfm bfm (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [int];
  initial begin
    logic [31:0] rd, d;
    logic [15:0] a;
    int cy;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      a = 16'($urandom_range(DEPTH - 1));
      d = $urandom;
      bfm.xfer(1'b1, a, d, rd, cy);
      ref_mem[int'(a)] = d;
      check(cy == 1, $sformatf("write took %0d cycles", cy));
    end
    // last address of the array and a neighbour
    bfm.write(16'(DEPTH - 1), 32'hCAFE_0001);
    ref_mem[DEPTH - 1] = 32'hCAFE_0001;
    foreach (ref_mem[k]) begin
      bfm.xfer(1'b0, 16'(k), '0, rd, cy);
      check(rd == ref_mem[k], $sformatf("addr %0d read %h expected %h", k, rd, ref_mem[k]));
      check(cy == 2, $sformatf("read took %0d cycles", cy));
    end
    // back-to-back write then read of the same word
    bfm.write(16'd7, 32'h1234_5678);
    bfm.read(16'd7, rd);
    check(rd == 32'h1234_5678, "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
