// tb_core_test_interface: one core test interface with a scan core model,
// driven over its bus port the way the test processor drives it.
// Checks: normal-mode functional access through the T/N mux; delivery of a
// whole test (patterns, one flush pattern, padding) in packets with gaps,
// so that the core runs dry and waits (alpha); a phase where responses are
// not collected, so the output buffer fills and stops the core; every
// response word against the reference model; the capture count; and the
// scan rate: while nothing stalls, scan clocks are S_M*(div+1) cycles apart,
// plus div+1 when a capture lies between them.
module tb_core_test_interface;
  import pass_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned S_M = 4, L = 5, DEPTH = 4, DB = 4;
  localparam int unsigned DIV = 2;
  localparam int unsigned NPAT = 40;   // patterns, plus one flush pattern

  logic clk = 0, rst_n = 0;
  fbus_req_t req;
  fbus_rsp_t rsp;
  logic [S_M-1:0] scan_in, scan_out;
  logic scan_en, capture, test_mode, func_wr, func_rd;
  logic [W_B-1:0] func_wdata, func_rdata;
  int checks = 0, failures = 0;

  core_test_interface #(.S_M(S_M), .L_MAX(L), .DEPTH(DEPTH), .DIV_BITS(DB)) dut (.*);
  scan_core_model #(.S_M(S_M), .L(L)) core (
    .clk, .rst_n, .scan_in, .scan_en, .capture, .scan_out,
    .func_wr, .func_wdata, .func_rdata
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int bus_waits = 0;
  task automatic bus(input bit w, input reg_sel_e r, input logic [W_B-1:0] d,
                     output logic [W_B-1:0] q);
    @(negedge clk);
    req.valid = 1; req.write = w; req.addr = ADDR_W'(r); req.wdata = d;
    #1;
    while (!rsp.ready) begin bus_waits++; @(negedge clk); #1; end
    q = rsp.rdata;
    @(posedge clk);
    #1 req.valid = 0;
  endtask

  // scan-rate monitor
  int last_scan = -1, cyc = 0, rate_ok = 0, rate_bad = 0;
  bit stalled = 0, cap_between = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.tick && (dut.alpha_in || dut.alpha_out)) stalled <= 1;
    if (capture) cap_between <= 1;
    if (scan_en) begin
      if (last_scan >= 0 && !stalled) begin
        if (cyc - last_scan == int'(S_M * (DIV + 1) + (cap_between ? DIV + 1 : 0))) rate_ok <= rate_ok + 1;
        else begin
          rate_bad <= rate_bad + 1;
          $display("scan interval %0d (capture between: %0d)", cyc - last_scan, cap_between);
        end
      end
      last_scan <= cyc; stalled <= 0; cap_between <= 0;
    end
  end

  int starve_cycles = 0, full_cycles = 0;
  always @(posedge clk) begin
    if (dut.tick && dut.alpha_in && dut.test_mode) starve_cycles++;
    if (dut.tick && dut.alpha_out) full_cycles++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit inb[$], expb[$];
    logic [W_B-1:0] words[$], got, st, w;
    int nwords, nread, sent, avail, it = 0;
    bit first;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // normal mode: the bus reaches the core's functional port
    bus(1, REG_DATA, 32'h1357_9bdf, got);
    bus(0, REG_DATA, '0, got);
    check(got == ~32'h1357_9bdf, "functional read in normal mode");
    check(scan_en == 0 && capture == 0, "no scan in normal mode");

    // build the test stream: NPAT+1 patterns and padding, whole words
    for (int i = 0; i < (NPAT + 1) * S_M * L + S_M; i++) inb.push_back(1'($urandom));
    while (inb.size() % W_B != 0) inb.push_back(1'($urandom));
    nwords = inb.size() / W_B;
    for (int k = 0; k < nwords; k++) begin
      for (int b = 0; b < W_B; b++) w[b] = inb[k*W_B + b];
      words.push_back(w);
    end
    expected_responses(inb, S_M, L, expb);

    // test mode, divide by DIV+1, clear
    bus(1, REG_CTRL, W_B'((DIV << CTRL_DIV_LSB) | 32'h3), got);
    bus(0, REG_CTRL, '0, got);
    check(got[0] && got[CTRL_DIV_LSB +: DB] == DB'(DIV), "ctrl read back");

    sent = 0; nread = 0;
    while (nread < nwords) begin
      // one packet of up to 3 words (the first one fills the buffer)
      // the test program only sends what the input buffer has room for
      bus(0, REG_STATUS, '0, st);
      // (the first packet is one word too long and has to wait for room)
      first = (sent == 0);
      for (int p = 0; first ? (p < int'(DEPTH) + 2)
                                  : (p < 3 && p < int'(DEPTH + 1) - int'(st[15:8]))
                       && sent < nwords; p++) begin
        bus(1, REG_DATA, words[sent], got);
        sent++;
      end
      // middle third of the test: responses are left waiting
      if (it < 4 || it >= 10) begin
        bus(0, REG_STATUS, '0, st);
        avail = int'(st[23:16]);
        for (int a = 0; a < avail; a++) begin
          bus(0, REG_DATA, '0, got);
          for (int b = 0; b < W_B; b++) w[b] = expb[nread*W_B + b];
          check(got == w, $sformatf("response word %0d: %h expected %h", nread, got, w));
          nread++;
        end
      end
      repeat (150) @(negedge clk);
      it++;
    end
    bus(0, REG_CAPCNT, '0, got);
    check(got == W_B'(nwords * W_B / S_M / L), $sformatf("captures %0d", got));
    check(core.n_cap == nwords * W_B / S_M / L, "captures seen by core");
    check(rate_bad == 0 && rate_ok > 20, $sformatf("scan rate ok=%0d bad=%0d", rate_ok, rate_bad));
    check(starve_cycles > 0, "core waited for data");
    check(full_cycles > 0, "output buffer full stopped the core");
    check(bus_waits > 0, "bus waited on a full input buffer");
    // back to normal mode: T/N mux returns the functional data again
    bus(1, REG_CTRL, 32'h0, got);
    bus(1, REG_DATA, 32'h0f0f_0f0f, got);
    bus(0, REG_DATA, '0, got);
    check(got == 32'hf0f0_f0f0, "functional read after test");
    $display("words=%0d starve=%0d full=%0d waits=%0d rate_ok=%0d", nwords, starve_cycles, full_cycles, bus_waits, rate_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
