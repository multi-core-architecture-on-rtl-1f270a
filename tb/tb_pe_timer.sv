// tb_pe_timer: checks the interval timer. With a period of PERIOD+1 cycles
// the tick must come every PERIOD+1 cycles from reset; TO must set on a
// tick and clear on a status write; irq must follow TO only when ITO is
// set; STOP must freeze the count and START resume it; a new period must
// change the interval.
module tb_pe_timer;
  import mc_pkg::*;
  localparam int unsigned PERIOD = 9;

  logic      clk = 1'b0, rst_n = 1'b0;
  avmm_req_t req;
  avmm_rsp_t rsp;
  logic      tick, irq;
  int        checks = 0, failures = 0;
  longint    cyc = 0;
  longint    tick_at [$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tick) tick_at.push_back(cyc);
  end

  pe_timer #(.DEFAULT_PERIOD(PERIOD)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .tick, .irq);
  avmm_bfm bfm (.clk, .req, .rsp);

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

  initial begin
    logic [31:0] rd;
    int n;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (45) @(posedge clk);
    check(tick_at.size() >= 4, $sformatf("%0d ticks in 45 cycles", tick_at.size()));
    for (int i = 1; i < tick_at.size(); i++)
      check(tick_at[i] - tick_at[i-1] == PERIOD + 1,
            $sformatf("tick interval %0d", tick_at[i] - tick_at[i-1]));
    bfm.read(16'd0, rd);
    check(rd[0] == 1'b1 && rd[1] == 1'b1, $sformatf("status %h, TO and RUN expected", rd));
    check(irq == 1'b0, "irq without ITO");
    bfm.write(16'd1, 32'h1);             // ITO
    @(negedge clk);
    check(irq == 1'b1, "irq with ITO and TO");
    bfm.write(16'd0, 32'h0);             // clear TO
    @(negedge clk);
    check(irq == 1'b0 || tick, "irq after clearing TO");
    bfm.read(16'd2, rd);
    check(rd == PERIOD, $sformatf("period reads %0d", rd));
    // STOP: no tick for 30 cycles
    bfm.write(16'd1, 32'h8);
    n = tick_at.size();
    repeat (30) @(posedge clk);
    check(tick_at.size() == n, "tick while stopped");
    bfm.read(16'd0, rd);
    check(rd[1] == 1'b0, "RUN while stopped");
    // new period and START
    bfm.write(16'd2, 32'd4);
    bfm.write(16'd1, 32'h4);
    n = tick_at.size();
    repeat (30) @(posedge clk);
    check(tick_at.size() - n >= 4, "ticks after restart");
    for (int i = n + 1; i < tick_at.size(); i++)
      check(tick_at[i] - tick_at[i-1] == 5,
            $sformatf("new tick interval %0d", tick_at[i] - tick_at[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
