// tb_pe_tile: checks one processing-element subsystem through its processor
// port: local memory contents and two-cycle reads, the system ID words,
// the timer's registers and tick, and that network-interface accesses reach
// the global-router and neighbourhood sides (played by the testbench) with
// the right fields, including a RECEIVE that waits for its word.
module tb_pe_tile;
  import mc_pkg::*;
  localparam logic [10:0] ID = 11'd6;
  localparam int unsigned PERIOD = 19;

  logic        clk = 1'b0, rst_n = 1'b0;
  avmm_req_t   req;
  avmm_rsp_t   rsp;
  logic        irq, tick;
  gr_req_t     gr_req;
  logic        gr_ack;
  gr_dlv_t     dlv = '0;
  logic        mbox_full;
  nb_req_t     nb_req;
  logic        nb_ack;
  int          checks = 0, failures = 0;
  int          ticks = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (tick) ticks++;

  // networks answer at once; router read data and neighbour data are tags
  assign gr_ack = gr_req.valid;
  assign nb_ack = nb_req.valid;

  pe_tile #(.IS_CTRL(1'b0), .MY_ID(ID), .MEM_DEPTH(1024), .TIMER_PERIOD(PERIOD)) dut (
    .clk, .rst_n, .cpu_req(req), .cpu_rsp(rsp), .timer_irq(irq), .timer_tick(tick),
    .gr_req, .gr_ack, .gr_rdata(32'h6000_0000 | 32'(gr_req.field)), .gr_dlv(dlv), .mbox_full,
    .nb_req, .nb_ack, .nb_rdata(32'h7000_0000 | 32'(nb_req.dir)));

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

  initial begin
    logic [31:0] rd, ref_mem [16];
    int cy;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // memory
    for (int i = 0; i < 16; i++) begin
      ref_mem[i] = $urandom;
      bfm.write(16'(i * 61), ref_mem[i]);
    end
    for (int i = 0; i < 16; i++) begin
      bfm.xfer(1'b0, 16'(i * 61), '0, rd, cy);
      check(rd == ref_mem[i] && cy == 2, $sformatf("memory word %0d", i));
    end
    // system ID
    bfm.xfer(1'b0, 16'h5000, '0, rd, cy);
    check(rd == 32'(ID) && cy == 1, $sformatf("system ID %0d", rd));
    bfm.read(16'h5001, rd);
    check(rd == 32'd0, "system ID role word");
    // timer
    bfm.read(16'h4002, rd);
    check(rd == PERIOD, "timer period register");
    repeat (60) @(posedge clk);
    check(ticks >= 3, $sformatf("%0d timer ticks", ticks));
    bfm.write(16'h4001, 32'h1);
    @(negedge clk);
    check(irq, "timer irq enabled");
    // global send: field and data reach the router
    fork
      bfm.write(16'h8800 | 16'd3, 32'hABCD);
      begin
        @(negedge clk); #2;
        check(gr_req.valid && gr_req.write && gr_req.field == 11'd3 && gr_req.data == 32'hABCD,
              "global send fields");
        check(!nb_req.valid, "global send on neighbourhood side");
      end
    join
    bfm.read(16'h8800 | 16'h1F, rd);
    check(rd == 32'h6000_001F, "I/O read through router");
    // neighbourhood
    fork
      bfm.write(16'h8000 | 16'd6, 32'h5E);
      begin
        @(negedge clk); #2;
        check(nb_req.valid && nb_req.write && nb_req.dir == DIR_SE && !gr_req.valid,
              "neighbour send south-east");
      end
    join
    bfm.read(16'h8000 | 16'd5, rd);
    check(rd == 32'h7000_0005, "neighbour receive north-west");
    // RECEIVE of own identity waits for the word
    fork
      bfm.xfer(1'b0, 16'h8800 | 16'(ID), '0, rd, cy);
      begin
        repeat (4) @(negedge clk);
        dlv = '{valid: 1'b1, dest: ID, data: 32'h0601};
        @(negedge clk);
        dlv = '0;
      end
    join
    check(rd == 32'h0601 && cy >= 4, $sformatf("global receive %h after %0d cycles", rd, cy));
    // unmapped address
    bfm.xfer(1'b0, 16'hC000, '0, rd, cy);
    check(rd == 0 && cy == 1, "unmapped read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
