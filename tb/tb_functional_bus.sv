// tb_functional_bus: three slaves with distinct responses. Checks that only
// the addressed slave sees valid, that every slave sees the request fields,
// that the addressed slave's response returns, and that an address with no
// slave completes at once and reads zero.
module tb_functional_bus;
  import pass_pkg::*;
  localparam int unsigned N = 3;
  fbus_req_t m_req;
  fbus_rsp_t m_rsp;
  fbus_req_t s_req [N];
  fbus_rsp_t s_rsp [N];
  int checks = 0, failures = 0;

  functional_bus #(.N_SLAVES(N)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int s;
      m_req.valid = 1'($urandom);
      m_req.write = 1'($urandom);
      m_req.addr  = ADDR_W'($urandom % ((N + 2) << REG_BITS));
      m_req.wdata = $urandom;
      for (int j = 0; j < N; j++) begin
        s_rsp[j].ready = 1'($urandom);
        s_rsp[j].rdata = $urandom;
      end
      #1;
      s = int'(m_req.addr >> REG_BITS);
      for (int j = 0; j < N; j++) begin
        check(s_req[j].valid == (m_req.valid && s == j), $sformatf("valid of slave %0d", j));
        check(s_req[j].addr == m_req.addr && s_req[j].wdata == m_req.wdata
              && s_req[j].write == m_req.write, "request broadcast");
      end
      if (s < N) check(m_rsp == s_rsp[s], $sformatf("response of slave %0d", s));
      else       check(m_rsp.ready && m_rsp.rdata == '0, "unmapped address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
