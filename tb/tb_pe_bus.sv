// tb_pe_bus: checks the address decoder. Each of the four slaves answers
// with its own tag and a random waitrequest; for addresses in and around
// every region the test checks that only the right slave sees the access
// and that its response comes back, and that unmapped addresses read zero
// at once.
module tb_pe_bus;
  import mc_pkg::*;

  avmm_req_t m_req;
  avmm_rsp_t m_rsp;
  avmm_req_t s_req [4];
  avmm_rsp_t s_rsp [4];
  int        checks = 0, failures = 0;

  pe_bus dut (.m_req, .m_rsp, .s_req, .s_rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int expect_slave(logic [15:0] a);
    if (a < 16'h4000) return 0;
    if (a >= 16'h4000 && a < 16'h5000) return 1;
    if (a >= 16'h5000 && a < 16'h6000) return 2;
    if (a >= 16'h8000 && a < 16'h9000) return 3;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] addrs [$];
    addrs = '{16'h0000, 16'h3FFF, 16'h4000, 16'h4FFF, 16'h5000, 16'h5FFF,
              16'h6000, 16'h7FFF, 16'h8000, 16'h8800, 16'h8FFF, 16'h9000, 16'hFFFF};
    repeat (100) addrs.push_back(16'($urandom));
    foreach (addrs[k]) begin
      for (int rw = 0; rw < 2; rw++) begin
        int e;
        logic [3:0] w;
        w = 4'($urandom);
        for (int i = 0; i < 4; i++)
          s_rsp[i] = '{readdata: 32'hA0 + 32'(i), waitrequest: w[i]};
        m_req = '{read: rw == 0, write: rw == 1, address: addrs[k], writedata: $urandom};
        #1;
        e = expect_slave(addrs[k]);
        for (int i = 0; i < 4; i++) begin
          check(s_req[i].read == (rw == 0 && e == i) && s_req[i].write == (rw == 1 && e == i),
                $sformatf("addr %h slave %0d strobe", addrs[k], i));
          check(s_req[i].address == addrs[k] && s_req[i].writedata == m_req.writedata,
                "address/data passed on");
        end
        if (e < 0)
          check(m_rsp.readdata == 0 && !m_rsp.waitrequest, $sformatf("addr %h unmapped", addrs[k]));
        else
          check(m_rsp.readdata == 32'hA0 + 32'(e) && m_rsp.waitrequest == w[e],
                $sformatf("addr %h response", addrs[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
