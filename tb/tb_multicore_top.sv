// tb_multicore_top: end-to-end test of the full multicore array at its
// default size (3 x 3 PEs and a controller). Each PE and the controller run
// their own program through a behavioural bus master, as their processors
// would, stepping through phases together:
//   1  every PE reads its system ID and uses its local memory
//   2  neighbourhood exchange: every PE first receives from the north
//      (waiting for its northern neighbour), sends a tagged word in all eight
//      directions, sends east a second time (which must wait until the
//      eastern neighbour has read the first), then receives from all eight
//      directions and checks each word against the neighbour expected from
//      the grid geometry, zero at the edges
//   3  global PE_PE: around a ring every PE sends to the next PE, takes a
//      word, sends to the PE after next and takes a word; each sends to a
//      missing identity (dropped); then all PEs send to PE 1 at once, so
//      senders wait on its one-word mailbox
//   4  PE_CTRL: the PEs send to the controller before the controller has
//      selected the mode, so they wait; the controller then switches the
//      mode, collects one word from each PE and sends one word back to each
//   5  PE_IO: every PE writes and reads the I/O peripheral (which inserts
//      wait states), and the peripheral sends a word to every PE
//   6  CTRL_IO: the controller writes and reads the peripheral, and the
//      peripheral sends a word to the controller
// Finally the test waits for two timer ticks and checks their spacing.
// Each mechanism is counted; one that never happened is a failure.
module tb_multicore_top;
  import mc_pkg::*;
  localparam int ROWS = 3, COLS = 3, N = ROWS * COLS;
  localparam int unsigned TICK_CYCLES = 50000;  // default timer period + 1
  localparam int IO_WAIT = 2;                   // peripheral wait states

  logic        clk = 1'b0, rst_n = 1'b0;
  avmm_req_t   pe_req [N];
  avmm_rsp_t   pe_rsp [N];
  logic        pe_irq [N], pe_tick [N];
  avmm_req_t   ctrl_req;
  avmm_rsp_t   ctrl_rsp;
  logic        ctrl_irq, ctrl_tick;
  avmm_req_t   io_req;
  avmm_rsp_t   io_rsp;
  gr_req_t     io_in = '0;
  logic        io_in_ack;
  gr_mode_e    mode;
  int          checks = 0, failures = 0;
  longint      cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  multicore_top dut (
    .clk, .rst_n, .pe_req, .pe_rsp, .pe_irq, .pe_tick,
    .ctrl_req, .ctrl_rsp, .ctrl_irq, .ctrl_tick,
    .io_req, .io_rsp, .io_in, .io_in_ack, .mode);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_nb_send_stall = 0, n_nb_recv_stall = 0, n_nb_edge = 0;
  int n_mbox_stall = 0, n_mode_wait = 0, n_drop = 0, n_arb_conflict = 0;
  int n_bad_dlv = 0, n_mode_switch = 0, n_io_wait = 0, n_io_in = 0, n_tick = 0;

  // ---------------- I/O peripheral model: 256 registers, IO_WAIT wait states
  logic [31:0] io_regs [256];
  int          io_cnt = 0;
  always_comb begin
    io_rsp.waitrequest = (io_req.read || io_req.write) && io_cnt < IO_WAIT;
    io_rsp.readdata    = io_regs[io_req.address[7:0]];
  end
  always @(posedge clk) begin
    if ((io_req.read || io_req.write) && io_rsp.waitrequest) begin
      io_cnt <= io_cnt + 1;
      n_io_wait++;
    end else begin
      io_cnt <= 0;
      if (io_req.write) io_regs[io_req.address[7:0]] <= io_req.writedata;
    end
  end
  initial for (int k = 0; k < 256; k++) io_regs[k] = 32'h0;

  // ---------------- observers
  gr_mode_e mode_prev = MODE_PE_PE;
  longint   tick_at [$];
  always @(posedge clk) if (rst_n) begin
    int nv;
    nv = 0;
    for (int k = 0; k <= N; k++) if (dut.gr_req[k].valid) nv++;
    if (nv > 1) n_arb_conflict++;
    if (dut.gr_dlv.valid && dut.gr_dlv.dest > 11'(N)) n_bad_dlv++;
    if (mode != mode_prev) n_mode_switch++;
    mode_prev <= mode;
    if (pe_tick[0]) tick_at.push_back(cyc);
    if (pe_tick[0] || ctrl_tick) n_tick++;
  end

  // ---------------- phase control
  int phase = 0;
  int done_cnt [8] = '{default: 0};
  int io_written = 0;

  task automatic barrier(input int ph);
    done_cnt[ph]++;
  endtask

  // compass offsets by direction number 0..7: N E W S NE NW SE SW
  int off_r [8] = '{-1, 0, 0, 1, -1, -1, 1, 1};
  int off_c [8] = '{ 0, 1, -1, 0, 1, -1, 1, -1};
  int opp   [8] = '{ 3, 2, 1, 0, 7, 6, 5, 4};

  function automatic int nbr(int p, int d);
    int r, c;
    r = p / COLS + off_r[d];
    c = p % COLS + off_c[d];
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return -1;
    return r * COLS + c;
  endfunction

  localparam logic [15:0] NI   = 16'h8000;
  localparam logic [15:0] GLOB = 16'h8800;

  // ---------------- one program per PE
  for (genvar gi = 0; gi < N; gi++) begin : g_pe
    avmm_bfm u_bfm (.clk, .req(pe_req[gi]), .rsp(pe_rsp[gi]));

    initial begin
      automatic int i = gi;
      automatic int id = gi + 1;
      logic [31:0] rd;
      int cy;

      // phase 1: system ID and local memory
      wait (phase == 1);
      u_bfm.read(16'h5000, rd);
      check(rd == 32'(id), $sformatf("PE %0d system ID %0d", id, rd));
      for (int k = 0; k < 8; k++) u_bfm.write(16'(k * 37 + i), 32'(id * 100 + k));
      for (int k = 0; k < 8; k++) begin
        u_bfm.read(16'(k * 37 + i), rd);
        check(rd == 32'(id * 100 + k), $sformatf("PE %0d memory word %0d", id, k));
      end
      barrier(1);

      // phase 2: neighbourhood network
      wait (phase == 2);
      // receive from the north first: it waits until the northern
      // neighbour, itself released by its own northern neighbour, sends
      begin
        int s;
        logic [31:0] exp;
        s   = nbr(i, 0);
        exp = (s < 0) ? 32'h0 : (32'h0A00_0000 | 32'((s + 1) << 8) | 32'd3);
        u_bfm.xfer(1'b0, NI | 16'd0, '0, rd, cy);
        if (cy > 1) n_nb_recv_stall++;
        check(rd == exp, $sformatf("PE %0d from north got %h expected %h", id, rd, exp));
      end
      for (int d = 0; d < 8; d++) begin
        u_bfm.xfer(1'b1, NI | 16'(d), 32'h0A00_0000 | 32'(id << 8) | 32'(d), rd, cy);
        if (nbr(i, d) < 0) n_nb_edge++;
      end
      u_bfm.xfer(1'b1, NI | 16'd1, 32'h0B00_0000 | 32'(id << 8) | 32'd1, rd, cy);
      if (cy > 1) n_nb_send_stall++;
      for (int d = 1; d < 8; d++) begin
        int s;
        logic [31:0] exp;
        s   = nbr(i, d);
        exp = (s < 0) ? 32'h0 : (32'h0A00_0000 | 32'((s + 1) << 8) | 32'(opp[d]));
        u_bfm.xfer(1'b0, NI | 16'(d), '0, rd, cy);
        if (cy > 1) n_nb_recv_stall++;
        check(rd == exp, $sformatf("PE %0d from dir %0d got %h expected %h", id, d, rd, exp));
      end
      begin
        int s;
        logic [31:0] exp;
        s   = nbr(i, 2);  // west neighbour sent east a second time
        exp = (s < 0) ? 32'h0 : (32'h0B00_0000 | 32'((s + 1) << 8) | 32'd1);
        u_bfm.read(NI | 16'd2, rd);
        check(rd == exp, $sformatf("PE %0d second word from west %h expected %h", id, rd, exp));
      end
      barrier(2);

      // phase 3: global router, PE_PE
      wait (phase == 3);
      begin
        logic [31:0] got [2];
        logic [31:0] e1, e2;
        // ring: send to the next PE, take a word, send to the one after
        for (int k = 1; k <= 2; k++) begin
          u_bfm.xfer(1'b1, GLOB | 16'((i + k) % N + 1), 32'h3000_0000 | 32'(id << 4) | 32'(k), rd, cy);
          if (cy > 1) n_mbox_stall++;
          u_bfm.read(GLOB | 16'(id), got[k-1]);
        end
        e1 = 32'h3000_0000 | 32'((((i - 1 + N) % N) + 1) << 4) | 32'd1;
        e2 = 32'h3000_0000 | 32'((((i - 2 + N) % N) + 1) << 4) | 32'd2;
        check((got[0] == e1 && got[1] == e2) || (got[0] == e2 && got[1] == e1),
              $sformatf("PE %0d ring words %h %h expected %h %h", id, got[0], got[1], e1, e2));
      end
      u_bfm.xfer(1'b1, GLOB | 16'd100, 32'hDEAD, rd, cy);
      n_drop++;
      // gather: all other PEs send to PE 1 through its one-word mailbox
      if (id == 1) begin
        bit seen [N+1];
        for (int k = 0; k <= N; k++) seen[k] = 1'b0;
        for (int k = 1; k < N; k++) begin
          u_bfm.read(GLOB | 16'(id), rd);
          check(rd[31:8] == 24'h310000 && rd[7:0] >= 2 && rd[7:0] <= N && !seen[rd[3:0]],
                $sformatf("PE 1 gathered %h", rd));
          seen[rd[3:0]] = 1'b1;
        end
      end else begin
        u_bfm.xfer(1'b1, GLOB | 16'd1, 32'h3100_0000 | 32'(id), rd, cy);
        if (cy > 1) n_mbox_stall++;
      end
      barrier(3);

      // phase 4: PE_CTRL; send before the controller switches the mode
      wait (phase == 4);
      u_bfm.xfer(1'b1, GLOB | 16'd0, 32'hC000_0000 | 32'(id), rd, cy);
      if (cy > 4) n_mode_wait++;
      u_bfm.read(GLOB | 16'(id), rd);
      check(rd == (32'hD000_0000 | 32'(id)), $sformatf("PE %0d word from controller %h", id, rd));
      barrier(4);

      // phase 5: PE_IO
      wait (phase == 5);
      u_bfm.xfer(1'b1, GLOB | 16'(16 + id), 32'hE000_0000 | 32'(id), rd, cy);
      check(cy == IO_WAIT + 1 || cy > IO_WAIT + 1, "I/O write wait states");
      io_written++;
      wait (io_written == N);
      u_bfm.read(GLOB | 16'(16 + (id % N) + 1), rd);
      check(rd == (32'hE000_0000 | 32'((id % N) + 1)), $sformatf("PE %0d I/O read %h", id, rd));
      u_bfm.read(GLOB | 16'(id), rd);
      check(rd == (32'hF000_0000 | 32'(id)), $sformatf("PE %0d word from I/O %h", id, rd));
      barrier(5);
    end
  end

  avmm_bfm u_ctrl (.clk, .req(ctrl_req), .rsp(ctrl_rsp));

  task automatic next_phase(input int ph, input int expect_done);
    phase = ph;
    wait (done_cnt[ph] == expect_done);
  endtask

  initial begin
    wait (cyc == 250_000);
    failures++;
    $display("FAIL: watchdog at phase %0d", phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    int cy;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);

    // controller's own tile
    u_ctrl.read(16'h5000, rd);
    check(rd == 32'd0, "controller system ID");
    u_ctrl.read(16'h5001, rd);
    check(rd == 32'd1, "controller role word");
    u_ctrl.write(16'h0010, 32'h1234);
    u_ctrl.read(16'h0010, rd);
    check(rd == 32'h1234, "controller memory");
    u_ctrl.xfer(1'b0, NI | 16'd3, '0, rd, cy);
    check(rd == 0 && cy == 1, "controller has no neighbours");

    next_phase(1, N);
    next_phase(2, N);
    u_ctrl.write(GLOB, 32'(MODE_PE_PE));
    check(mode == MODE_PE_PE, "mode PE_PE");
    next_phase(3, N);

    // phase 4: the PEs start sending first, then the mode is switched
    phase = 4;
    repeat (20) @(posedge clk);
    check(dut.mbox_full[0] == 1'b0, "no word reached the controller before the mode switch");
    u_ctrl.write(GLOB, 32'(MODE_PE_CTRL));
    begin
      bit seen [N+1];
      for (int k = 0; k <= N; k++) seen[k] = 1'b0;
      for (int k = 0; k < N; k++) begin
        u_ctrl.read(GLOB | 16'd0, rd);
        check(rd[31:28] == 4'hC && rd[27:0] >= 1 && rd[27:0] <= N && !seen[rd[3:0]],
              $sformatf("controller received %h", rd));
        seen[rd[3:0]] = 1'b1;
      end
    end
    for (int k = 1; k <= N; k++) u_ctrl.write(GLOB | 16'(k), 32'hD000_0000 | 32'(k));
    wait (done_cnt[4] == N);

    // phase 5: PE_IO, and the peripheral sends one word to each PE
    u_ctrl.write(GLOB, 32'(MODE_PE_IO));
    phase = 5;
    for (int k = 1; k <= N; k++) begin
      @(negedge clk);
      io_in = '{valid: 1'b1, write: 1'b1, field: 11'(k), data: 32'hF000_0000 | 32'(k)};
      forever begin
        #1;
        if (io_in_ack) break;
        @(negedge clk);
      end
      @(posedge clk);
      #1 io_in = '0;
      n_io_in++;
    end
    wait (done_cnt[5] == N);

    // phase 6: CTRL_IO
    u_ctrl.write(GLOB, 32'(MODE_CTRL_IO));
    check(mode == MODE_CTRL_IO, "mode CTRL_IO");
    u_ctrl.write(GLOB | 16'h80, 32'h0C0F_FEE0);
    u_ctrl.read(GLOB | 16'h80, rd);
    check(rd == 32'h0C0F_FEE0 && io_regs[8'h80] == 32'h0C0F_FEE0, "controller I/O write and read");
    fork
      u_ctrl.read(GLOB | 16'd0, rd);
      begin
        repeat (5) @(negedge clk);
        io_in = '{valid: 1'b1, write: 1'b1, field: 11'd0, data: 32'h1010_0000};
        forever begin
          #1;
          if (io_in_ack) break;
          @(negedge clk);
        end
        @(posedge clk);
        #1 io_in = '0;
        n_io_in++;
      end
    join
    check(rd == 32'h1010_0000, $sformatf("controller word from I/O %h", rd));

    // timer ticks
    wait (tick_at.size() >= 2);
    check(tick_at[1] - tick_at[0] == TICK_CYCLES,
          $sformatf("tick spacing %0d cycles", tick_at[1] - tick_at[0]));

    check(n_nb_send_stall > 0, "mechanism: neighbour send waited on a full buffer");
    check(n_nb_recv_stall > 0, "mechanism: neighbour receive waited on an empty buffer");
    check(n_nb_edge > 0,       "mechanism: send to a missing neighbour");
    check(n_mbox_stall > 0,    "mechanism: global send waited on a full mailbox");
    check(n_mode_wait > 0,     "mechanism: transfer waited for its mode");
    check(n_drop == N && n_bad_dlv == 0, "mechanism: send to a missing identity dropped");
    check(n_arb_conflict > 0,  "mechanism: several router requests at once");
    check(n_mode_switch >= 3,  "mechanism: mode switches");
    check(n_io_wait > 0,       "mechanism: I/O wait states");
    check(n_io_in == N + 1,    "mechanism: words from the I/O peripheral");
    check(n_tick > 0,          "mechanism: timer tick");
    $display("mechanisms: nb_send_stall=%0d nb_recv_stall=%0d nb_edge=%0d mbox_stall=%0d mode_wait=%0d",
             n_nb_send_stall, n_nb_recv_stall, n_nb_edge, n_mbox_stall, n_mode_wait);
    $display("finished after %0d cycles", cyc);
    $display("            drop=%0d arb_conflict=%0d mode_switch=%0d io_wait=%0d io_in=%0d tick=%0d",
             n_drop, n_arb_conflict, n_mode_switch, n_io_wait, n_io_in, n_tick);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
