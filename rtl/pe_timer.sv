// pe_timer: interval timer giving each processor its periodic system tick.
//
// A 32-bit down-counter reloads from the period register every time it
// reaches zero; at that moment `tick` pulses for one cycle and the timeout
// flag TO is set. `irq` is TO gated by the interrupt enable ITO. Registers
// (word offsets on the Avalon-MM slave, no wait states):
//   0 status  : bit0 TO (write anything to clear), bit1 RUN (read only)
//   1 control : bit0 ITO, bit2 START (write 1), bit3 STOP (write 1)
//   2 period  : reload value, cycles per tick minus one; writing it restarts
//               the count
// The timer runs from reset with DEFAULT_PERIOD so that the tick exists
// without software set-up. The source description says only that each processor has
// a timer giving a periodic tick; the register map, loosely modelled on the
// usual soft-processor interval timer, and the default period are this
// design's own.
module pe_timer
  import mc_pkg::*;
#(
  parameter int unsigned DEFAULT_PERIOD = 49999  // 1 ms at 50 MHz
) (
  input  logic      clk,
  input  logic      rst_n,
  input  avmm_req_t s_req,
  output avmm_rsp_t s_rsp,
  output logic      tick,
  output logic      irq
);
  logic [31:0] period_q, count_q;
  logic        run_q, to_q, ito_q;
  logic [1:0]  reg_sel;
  logic        wr_status, wr_control, wr_period;

  assign reg_sel    = s_req.address[1:0];
  assign wr_status  = s_req.write && reg_sel == 2'd0;
  assign wr_control = s_req.write && reg_sel == 2'd1;
  assign wr_period  = s_req.write && reg_sel == 2'd2;
  assign tick       = run_q && count_q == 32'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_q <= DEFAULT_PERIOD;
      count_q  <= DEFAULT_PERIOD;
      run_q    <= 1'b1;
      to_q     <= 1'b0;
      ito_q    <= 1'b0;
    end else begin
      if (wr_period) begin
        period_q <= s_req.writedata;
        count_q  <= s_req.writedata;
      end else if (run_q) begin
        count_q <= (count_q == 32'd0) ? period_q : count_q - 32'd1;
      end
      if (wr_control) begin
        ito_q <= s_req.writedata[0];
        if (s_req.writedata[2]) run_q <= 1'b1;
        else if (s_req.writedata[3]) run_q <= 1'b0;
      end
      if (wr_status)  to_q <= 1'b0;
      else if (tick)  to_q <= 1'b1;
    end
  end

  always_comb begin
    s_rsp.waitrequest = 1'b0;
    case (reg_sel)
      2'd0:    s_rsp.readdata = {30'd0, run_q, to_q};
      2'd1:    s_rsp.readdata = {31'd0, ito_q};
      2'd2:    s_rsp.readdata = period_q;
      default: s_rsp.readdata = count_q;
    endcase
  end

  assign irq = to_q && ito_q;
endmodule
