// tb_global_router: checks the global router with four PEs. Requests are
// set up between clock edges and the router's acknowledges, deliveries and
// I/O bus are compared with what each mode allows: transfers the mode does
// not allow must wait, a full mailbox must hold its sender back, words to
// a missing identity are dropped, I/O transfers wait for the peripheral,
// the controller's write to field 0 switches the mode, and two PEs sending
// at once are served one per cycle in round-robin order.
module tb_global_router;
  import mc_pkg::*;
  localparam int N_PE = 4;

  logic        clk = 1'b0, rst_n = 1'b0;
  gr_req_t     ni_req   [N_PE+1];
  logic        ni_ack   [N_PE+1];
  logic        mbox_full[N_PE+1];
  gr_req_t     io_in;
  logic        io_in_ack;
  logic [31:0] rdata;
  gr_dlv_t     dlv;
  avmm_req_t   io_req;
  avmm_rsp_t   io_rsp;
  gr_mode_e    mode;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  global_router #(.N_PE(N_PE)) dut (
    .clk, .rst_n, .ni_req, .ni_ack, .mbox_full, .io_in, .io_in_ack,
    .rdata, .dlv, .io_req, .io_rsp, .mode);

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

  task automatic idle();
    for (int i = 0; i <= N_PE; i++) begin
      ni_req[i]    = '0;
      mbox_full[i] = 1'b0;
    end
    io_in  = '0;
    io_rsp = '{readdata: '0, waitrequest: 1'b0};
  endtask

  // Present a request between edges and look at the router's answer.
  task automatic look();
    #1;
  endtask

  task automatic step();
    @(posedge clk);
    @(negedge clk);
  endtask

  function automatic logic any_ack();
    logic a = io_in_ack;
    for (int i = 0; i <= N_PE; i++) a |= ni_ack[i];
    return a;
  endfunction

  task automatic set_mode(input gr_mode_e m);
    idle();
    ni_req[0] = '{valid: 1'b1, write: 1'b1, field: 11'd0, data: 32'(m)};
    look();
    check(ni_ack[0] && !dlv.valid && !io_req.write && !io_req.read, "MODE write accepted");
    step();
    idle();
    look();
    check(mode == m, $sformatf("mode %0d expected %0d", mode, m));
  endtask

  initial begin
    idle();
    @(negedge clk);
    rst_n = 1'b1;
    look();
    check(mode == MODE_PE_PE, "reset mode PE_PE");

    // PE_PE: PE1 -> PE3
    ni_req[1] = '{valid: 1'b1, write: 1'b1, field: 11'd3, data: 32'hA1A3};
    look();
    check(ni_ack[1] && dlv.valid && dlv.dest == 11'd3 && dlv.data == 32'hA1A3, "PE1->PE3");
    // full mailbox holds it back
    mbox_full[3] = 1'b1;
    look();
    check(!ni_ack[1] && !dlv.valid, "PE1->PE3 waits on full mailbox");
    step();
    mbox_full[3] = 1'b0;
    look();
    check(ni_ack[1] && dlv.valid, "PE1->PE3 after mailbox empties");
    step();
    idle();
    // PE -> controller not allowed in PE_PE
    ni_req[2] = '{valid: 1'b1, write: 1'b1, field: 11'd0, data: 32'hB2};
    look();
    check(!ni_ack[2] && !dlv.valid, "PE->controller waits in PE_PE");
    // PE read of an I/O address not allowed in PE_PE
    ni_req[4] = '{valid: 1'b1, write: 1'b0, field: 11'h40, data: 32'h0};
    look();
    check(!ni_ack[4] && !io_req.read, "PE I/O read waits in PE_PE");
    step();
    idle();
    // identity above N_PE: dropped
    ni_req[2] = '{valid: 1'b1, write: 1'b1, field: 11'd9, data: 32'hDEAD};
    look();
    check(ni_ack[2] && !dlv.valid, "write to missing PE dropped");
    step();
    idle();

    // round robin: PEs 1,2,4 all send to PE3 with mailbox always free
    begin
      int order [$];
      for (int i = 1; i <= N_PE; i++)
        if (i != 3) ni_req[i] = '{valid: 1'b1, write: 1'b1, field: 11'd3, data: 32'(i)};
      for (int c = 0; c < 6; c++) begin
        look();
        for (int i = 0; i <= N_PE; i++)
          if (ni_ack[i]) begin
            order.push_back(i);
            check(dlv.valid && dlv.data == 32'(i), "data of granted source");
          end
        check(order.size() == c + 1, "exactly one grant per cycle");
        step();
      end
      for (int k = 3; k < order.size(); k++)
        check(order[k] == order[k-3], "round-robin order repeats");
      check(order[0] != order[1] && order[1] != order[2] && order[0] != order[2],
            "each of three sources served once in three cycles");
      idle();
    end

    // PE_CTRL
    set_mode(MODE_PE_CTRL);
    ni_req[2] = '{valid: 1'b1, write: 1'b1, field: 11'd0, data: 32'hB2};
    look();
    check(ni_ack[2] && dlv.valid && dlv.dest == 11'd0 && dlv.data == 32'hB2, "PE2->controller");
    step();
    idle();
    ni_req[0] = '{valid: 1'b1, write: 1'b1, field: 11'd4, data: 32'hC4};
    look();
    check(ni_ack[0] && dlv.valid && dlv.dest == 11'd4 && dlv.data == 32'hC4, "controller->PE4");
    step();
    idle();
    ni_req[1] = '{valid: 1'b1, write: 1'b1, field: 11'd2, data: 32'h12};
    look();
    check(!ni_ack[1], "PE->PE waits in PE_CTRL");
    step();
    idle();

    // PE_IO
    set_mode(MODE_PE_IO);
    ni_req[3] = '{valid: 1'b1, write: 1'b1, field: 11'h55, data: 32'hD3};
    io_rsp.waitrequest = 1'b1;
    look();
    check(io_req.write && io_req.address == 16'h55 && io_req.writedata == 32'hD3 && !ni_ack[3],
          "PE3 I/O write presented, peripheral busy");
    step();
    ni_req[1] = '{valid: 1'b1, write: 1'b1, field: 11'h66, data: 32'hD1};  // competes
    look();
    check(io_req.write && io_req.address == 16'h55 && !ni_ack[1], "I/O transfer keeps the bus");
    io_rsp.waitrequest = 1'b0;
    look();
    check(ni_ack[3] && !ni_ack[1], "I/O write completes");
    step();
    ni_req[3] = '0;
    look();
    check(ni_ack[1] && io_req.address == 16'h66, "next I/O write");
    step();
    idle();
    ni_req[2] = '{valid: 1'b1, write: 1'b0, field: 11'h77, data: 32'h0};
    io_rsp = '{readdata: 32'h7777_0002, waitrequest: 1'b0};
    look();
    check(io_req.read && io_req.address == 16'h77 && ni_ack[2] && rdata == 32'h7777_0002, "PE2 I/O read");
    step();
    idle();
    io_in = '{valid: 1'b1, write: 1'b1, field: 11'd1, data: 32'hE1};
    look();
    check(io_in_ack && dlv.valid && dlv.dest == 11'd1 && dlv.data == 32'hE1, "I/O -> PE1");
    step();
    idle();
    ni_req[0] = '{valid: 1'b1, write: 1'b1, field: 11'h10, data: 32'h0};
    look();
    check(!ni_ack[0] && !io_req.write, "controller I/O write waits in PE_IO");
    step();
    idle();

    // CTRL_IO
    set_mode(MODE_CTRL_IO);
    ni_req[0] = '{valid: 1'b1, write: 1'b0, field: 11'h21, data: 32'h0};
    io_rsp = '{readdata: 32'h2121, waitrequest: 1'b0};
    look();
    check(io_req.read && io_req.address == 16'h21 && ni_ack[0] && rdata == 32'h2121, "controller I/O read");
    step();
    idle();
    io_in = '{valid: 1'b1, write: 1'b1, field: 11'd0, data: 32'hE0};
    look();
    check(io_in_ack && dlv.valid && dlv.dest == 11'd0 && dlv.data == 32'hE0, "I/O -> controller");
    step();
    idle();
    ni_req[2] = '{valid: 1'b1, write: 1'b1, field: 11'h21, data: 32'h0};
    look();
    check(!any_ack(), "PE I/O write waits in CTRL_IO");
    step();
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
