// tb_neighbour_network: checks the eight-neighbour links of a 3 x 4 grid.
// Every PE sends a tagged word in each direction, all PEs at once; then
// every PE receives from each direction. The expected word comes from an
// independent table of compass offsets: the neighbour's tag, or zero at
// the grid's edge. A second send into a full buffer must wait until the
// receiver takes the first word, and a receive from an empty buffer must
// wait for the send.
module tb_neighbour_network;
  import mc_pkg::*;
  localparam int ROWS = 3, COLS = 4, N = ROWS * COLS;

  logic        clk = 1'b0, rst_n = 1'b0;
  nb_req_t     req  [N];
  logic        ack  [N];
  logic [31:0] rdata[N];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  neighbour_network #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .req, .ack, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compass offsets {drow, dcol} by direction number 0..7: N E W S NE NW SE SW
  int off_r [8] = '{-1, 0, 0, 1, -1, -1, 1, 1};
  int off_c [8] = '{ 0, 1, -1, 0, 1, -1, 1, -1};

  function automatic int nbr(int p, int d);
    int r, c;
    r = p / COLS + off_r[d];
    c = p % COLS + off_c[d];
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return -1;
    return r * COLS + c;
  endfunction

  function automatic logic [31:0] tag(int p, int d);
    return 32'h1000_0000 | 32'(p << 8) | 32'(d);
  endfunction

  // every PE performs one access; wait until all are acknowledged
  task automatic all_do(input bit wr, input int d, output logic [31:0] got[N]);
    logic done[N];
    int   left = N;
    for (int p = 0; p < N; p++) begin
      req[p]  = '{valid: 1'b1, write: wr, dir: dir_e'(d), data: tag(p, d)};
      done[p] = 1'b0;
    end
    while (left > 0) begin
      #1;
      for (int p = 0; p < N; p++)
        if (!done[p] && ack[p]) begin
          got[p]  = rdata[p];
          done[p] = 1'b1;
          left--;
        end
      @(posedge clk);
      #1;
      for (int p = 0; p < N; p++)
        if (done[p]) req[p] = '0;
      @(negedge clk);
    end
  endtask

  initial begin
    logic [31:0] got [N];
    for (int p = 0; p < N; p++) req[p] = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 8; d++) all_do(1'b1, d, got);
    for (int d = 0; d < 8; d++) begin
      all_do(1'b0, d, got);
      for (int p = 0; p < N; p++) begin
        int s, od;
        logic [31:0] exp;
        // the word PE p receives from direction d was sent by its neighbour
        // s in the opposite direction
        s   = nbr(p, d);
        od  = (d == 0) ? 3 : (d == 1) ? 2 : (d == 2) ? 1 : (d == 3) ? 0 :
              (d == 4) ? 7 : (d == 5) ? 6 : (d == 6) ? 5 : 4;
        exp = (s < 0) ? 32'h0 : tag(s, od);
        check(got[p] == exp, $sformatf("PE %0d dir %0d got %h expected %h", p, d, got[p], exp));
      end
    end

    // back-pressure: PE 5 sends east twice, PE 6 reads from west later
    req[5] = '{valid: 1'b1, write: 1'b1, dir: DIR_E, data: 32'hAAAA};
    #1 check(ack[5], "first send accepted");
    @(posedge clk); @(negedge clk);
    req[5].data = 32'hBBBB;
    for (int c = 0; c < 4; c++) begin
      #1 check(!ack[5], "second send waits on full buffer");
      @(posedge clk); @(negedge clk);
    end
    req[6] = '{valid: 1'b1, write: 1'b0, dir: DIR_W, data: 32'h0};
    #1 check(ack[6] && rdata[6] == 32'hAAAA && !ack[5], "receive first word");
    @(posedge clk); @(negedge clk);
    req[6] = '0;
    #1 check(ack[5], "second send accepted after receive");
    @(posedge clk); @(negedge clk);
    req[5] = '0;
    // receive waits for data: PE 1 reads from south (PE 5) before it sends
    req[1] = '{valid: 1'b1, write: 1'b0, dir: DIR_S, data: 32'h0};
    for (int c = 0; c < 3; c++) begin
      #1 check(!ack[1], "receive waits on empty buffer");
      @(posedge clk); @(negedge clk);
    end
    req[5] = '{valid: 1'b1, write: 1'b1, dir: DIR_N, data: 32'hCCCC};
    #1 check(ack[5] && !ack[1], "send north accepted");
    @(posedge clk); @(negedge clk);
    req[5] = '0;
    #1 check(ack[1] && rdata[1] == 32'hCCCC, "receive after send");
    @(posedge clk); @(negedge clk);
    req[1] = '0;
    req[6] = '{valid: 1'b1, write: 1'b0, dir: DIR_W, data: 32'h0};
    #1 check(ack[6] && rdata[6] == 32'hBBBB, "second word");
    @(posedge clk); @(negedge clk);
    req[6] = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
