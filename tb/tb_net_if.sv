// tb_net_if: checks the network interface of a PE (identity 5) and of the
// controller. The testbench plays both networks: it answers global-router
// and neighbourhood requests after random delays and checks that each
// processor access reaches the right network with the right field, that
// the processor is stalled until the network answers, that the mailbox
// takes only words addressed to its own identity, and that a RECEIVE on an
// empty mailbox waits for the word.
module tb_net_if;
  import mc_pkg::*;
  localparam logic [10:0] ID = 11'd5;

  logic              clk = 1'b0, rst_n = 1'b0;
  avmm_req_t         req, creq;
  avmm_rsp_t         rsp, crsp;
  gr_req_t           gr_req, cgr_req;
  logic              gr_ack = 1'b0;
  logic [31:0]       gr_rdata = '0;
  gr_dlv_t           dlv = '0;
  logic              mbox_full, cmbox_full;
  nb_req_t           nb_req, cnb_req;
  logic              nb_ack = 1'b0;
  logic [31:0]       nb_rdata = '0;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  net_if #(.IS_CTRL(1'b0), .MY_ID(ID)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp),
    .gr_req, .gr_ack, .gr_rdata, .gr_dlv(dlv), .mbox_full,
    .nb_req, .nb_ack, .nb_rdata);

  net_if #(.IS_CTRL(1'b1), .MY_ID(CTRL_ID)) dut_ctrl (
    .clk, .rst_n, .s_req(creq), .s_rsp(crsp),
    .gr_req(cgr_req), .gr_ack(cgr_req.valid), .gr_rdata('0), .gr_dlv(dlv), .mbox_full(cmbox_full),
    .nb_req(cnb_req), .nb_ack(1'b0), .nb_rdata('0));

  avmm_bfm bfm  (.clk, .req, .rsp);
  avmm_bfm cbfm (.clk, .req(creq), .rsp(crsp));

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

  // Network models: answer a pending request after `delay` cycles.
  int gr_delay = 0, nb_delay = 0;
  int gr_seen = 0, nb_seen = 0;
  gr_req_t gr_last;
  nb_req_t nb_last;
  always @(negedge clk) begin
    gr_ack = 1'b0;
    nb_ack = 1'b0;
    if (gr_req.valid) begin
      if (gr_delay == 0) begin gr_ack = 1'b1; gr_last = gr_req; gr_seen++; end
      else gr_delay--;
    end
    if (nb_req.valid) begin
      if (nb_delay == 0) begin nb_ack = 1'b1; nb_last = nb_req; nb_seen++; end
      else nb_delay--;
    end
  end

  initial begin
    logic [31:0] rd, d;
    int cy;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Global SEND to PE 7 with three wait cycles.
    gr_delay = 3; d = $urandom;
    bfm.xfer(1'b1, 16'h0800 | 16'd7, d, rd, cy);
    check(cy == 4, $sformatf("global send took %0d cycles", cy));
    check(gr_last.write && gr_last.field == 11'd7 && gr_last.data == d, "global send fields");
    check(nb_seen == 0, "global send leaked to neighbourhood");

    // Global read of an I/O address goes to the router.
    gr_delay = 1; gr_rdata = 32'hFEED_0042;
    bfm.xfer(1'b0, 16'h0800 | 16'h123, '0, rd, cy);
    check(!gr_last.write && gr_last.field == 11'h123, "I/O read fields");
    check(rd == 32'hFEED_0042 && cy == 2, $sformatf("I/O read data %h cycles %0d", rd, cy));

    // Neighbourhood sends and receives in all directions.
    for (int dir = 0; dir < 8; dir++) begin
      nb_delay = dir % 3; d = $urandom;
      bfm.xfer(1'b1, 16'(dir), d, rd, cy);
      check(nb_last.write && nb_last.dir == dir_e'(dir) && nb_last.data == d,
            $sformatf("neighbour send dir %0d", dir));
      check(cy == dir % 3 + 1, $sformatf("neighbour send cycles %0d", cy));
      nb_delay = 2; nb_rdata = 32'h100 + 32'(dir);
      bfm.xfer(1'b0, 16'(dir), '0, rd, cy);
      check(!nb_last.write && nb_last.dir == dir_e'(dir) && rd == 32'h100 + 32'(dir) && cy == 3,
            $sformatf("neighbour receive dir %0d", dir));
    end
    check(gr_seen == 2, "neighbour traffic leaked to router");

    // RECEIVE on own identity: waits until a word for this identity arrives;
    // words for other identities are ignored.
    fork
      bfm.xfer(1'b0, 16'h0800 | 16'(ID), '0, rd, cy);
      begin
        repeat (3) @(negedge clk);
        dlv = '{valid: 1'b1, dest: 11'd6, data: 32'hBAD0_0006};
        @(negedge clk);
        dlv = '0;
        repeat (2) @(negedge clk);
        check(!mbox_full, "mailbox took word for another identity");
        dlv = '{valid: 1'b1, dest: ID, data: 32'h600D_0005};
        @(negedge clk);
        dlv = '0;
      end
    join
    check(rd == 32'h600D_0005, $sformatf("receive data %h", rd));
    check(cy >= 6, $sformatf("receive returned after %0d cycles, before the word", cy));
    check(!mbox_full, "mailbox not emptied by RECEIVE");
    check(gr_seen == 2, "RECEIVE of own identity went to router");

    // A word already waiting is returned at once.
    @(negedge clk);
    dlv = '{valid: 1'b1, dest: ID, data: 32'h1111_2222};
    @(negedge clk);
    dlv = '0;
    check(mbox_full, "mailbox full after delivery");
    bfm.xfer(1'b0, 16'h0800 | 16'(ID), '0, rd, cy);
    check(rd == 32'h1111_2222 && cy == 1, "receive of waiting word");

    // Controller: MODE write goes to the router as a write with field 0
    // (here the router accepts at once); neighbourhood accesses finish at
    // once and read zero.
    cbfm.xfer(1'b1, 16'h0800, 32'd2, rd, cy);
    check(cy == 1, "controller MODE write");
    fork
      cbfm.xfer(1'b1, 16'h0800, 32'd2, rd, cy);
      begin
        @(negedge clk); #2;
        check(cgr_req.valid && cgr_req.write && cgr_req.field == 11'd0 && cgr_req.data == 32'd2,
              "controller MODE write fields");
      end
    join
    for (int dir = 0; dir < 8; dir++) begin
      cbfm.xfer(1'b0, 16'(dir), '0, rd, cy);
      check(rd == 0 && cy == 1, "controller neighbourhood read");
    end
    fork
      cbfm.xfer(1'b1, 16'd3, 32'h55, rd, cy);
      begin
        @(negedge clk); #2;
        check(!cnb_req.valid, "controller raised a neighbourhood request");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
