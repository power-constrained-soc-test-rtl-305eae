// tb_fifo_controller: random clk_in ticks and random alpha against a cycle
// model of the three modulo counters. Checks every cycle that e2 = tick and
// not alpha and no capture pending, e1 every W_B-th shift, e3 every S_M-th
// shift, e4 on the first tick after every L_MAX-th scan, and the capture count.
module tb_fifo_controller;
  localparam int unsigned W_B = 8, S_M = 3, L_MAX = 4;
  logic clk = 0, rst_n = 0, clear = 0, tick = 0, alpha = 0;
  logic e1, e2, e3, e4;
  logic [15:0] captures;
  int checks = 0, failures = 0;
  int m_so = 0, m_si = 0, m_sc = 0, m_caps = 0;
  bit m_pend = 0;
  int n_e1 = 0, n_e3 = 0, n_e4 = 0, n_stall = 0;

  fifo_controller #(.W_B(W_B), .S_M(S_M), .L_MAX(L_MAX), .CAP_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit x2, x1, x3, x4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      tick  = ($urandom % 100) < 70;
      alpha = ($urandom % 100) < 15;
      if (c == 10000) clear = 1; else clear = 0;
      #1;
      x2 = tick && !alpha && !m_pend;
      x1 = x2 && (m_so == W_B - 1);
      x3 = x2 && (m_si == S_M - 1);
      x4 = tick && m_pend;
      check(e2 == x2 && e1 == x1 && e3 == x3 && e4 == x4,
            $sformatf("e1..e4 %b%b%b%b expected %b%b%b%b", e1, e2, e3, e4, x1, x2, x3, x4));
      check(32'(captures) == m_caps, "capture count");
      if (tick && alpha && !m_pend) n_stall++;
      if (x1) n_e1++;
      if (x3) n_e3++;
      if (x4) n_e4++;
      // model update
      if (clear) begin
        m_so = 0; m_si = 0; m_sc = 0; m_pend = 0; m_caps = 0;
      end else begin
        if (x2) begin m_so = (m_so + 1) % W_B; m_si = (m_si + 1) % S_M; end
        if (x3) begin
          if (m_sc == L_MAX - 1) begin m_sc = 0; m_pend = 1; end else m_sc++;
        end
        if (x4) begin m_pend = 0; m_caps++; end
      end
      @(negedge clk);
    end
    check(n_e1 > 100 && n_e3 > 100 && n_e4 > 50 && n_stall > 100, "every event seen");
    $display("e1=%0d e3=%0d e4=%0d stalls=%0d", n_e1, n_e3, n_e4, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
