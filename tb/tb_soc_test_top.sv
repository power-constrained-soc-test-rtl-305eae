// tb_soc_test_top: the whole SOC test architecture at its default
// configuration, run end to end with a behavioural test processor and four
// scan core models.
//
// Each core model sits inside the design's boundary-cell wrapper, so the
// responses include what the output cells capture from the core outputs.
// The processor first uses every core in normal mode (functional writes
// and reads through the boundary cells and the T/N mux), then switches all cores to test mode with
// the frequency each one was assigned, and delivers every core's test data
// with a packet-set schedule: cores 0 and 1 are split-1, core 2 is split-2
// and core 3 is split-4, packets are P words each, and one packet set is
//   c3 c2 | c3 c0 | c3 c2 | c3 c1
// (each split-4 packet followed by a split-2 or split-1 packet). After every
// packet it collects the responses waiting at that core. Before a packet it
// waits until the core's input buffer has room, collecting responses while
// it waits. With the dividers set for scan rates 1/4, 1/4, 1/2 and 1 bit per
// cycle the packet set is a perfect fit: every core consumes its share of a
// set in the same time.
// Checks: every response word of every core against the reference model;
// captures per core; each core's scan clock spacing S_M*(div+1) while it is
// not stalled; and that each mechanism happened: normal-mode access, mode
// switch, bus wait states, a core waiting for data (alpha), captures, the
// split ratios. The test is sized by SETS packet sets.
module tb_soc_test_top;
  import pass_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 4, SMAX = 16;
  localparam int unsigned SM [N]  = '{16, 8, 4, 2};
  localparam int unsigned LM [N]  = '{32, 40, 24, 16};   // internal chains
  // longest wrapper chain: internal chain plus one boundary cell per S_M terminals at each end
  localparam int unsigned LW [N]  = '{32 + 4, 40 + 8, 24 + 16, 16 + 32};
  localparam int unsigned DIV [N] = '{3, 3, 1, 0};
  localparam int unsigned SPLIT [N] = '{1, 1, 2, 4};
  localparam int unsigned P = 4;          // packet size in bus words
  localparam int unsigned SETS = 16;      // packet sets in the test
  localparam int unsigned CAP = 13;       // words an input buffer holds (DEPTH 12 + input register)

  logic clk = 0, rst_n = 0;
  fbus_req_t m_req;
  fbus_rsp_t m_rsp;
  logic [SMAX-1:0] scan_in [N], scan_out [N];
  logic scan_en [N], capture [N], test_mode [N], func_wr [N], func_rd [N];
  logic [W_B-1:0] func_wdata [N], func_rdata [N];
  int checks = 0, failures = 0;

  soc_test_top dut (.*);

  int unsigned n_cap_core [N];
  int stall_cycles [N], rate_ok [N], rate_bad [N];
  for (genvar i = 0; i < N; i++) begin : g_core
    logic [SM[i]-1:0] so;
    scan_core_model #(.S_M(SM[i]), .L(LM[i])) core (
      .clk, .rst_n,
      .scan_in (scan_in[i][SM[i]-1:0]), .scan_en (scan_en[i]), .capture (capture[i]),
      .scan_out (so), .func_wr (func_wr[i]), .func_wdata (func_wdata[i]),
      .func_rdata (func_rdata[i])
    );
    assign scan_out[i] = SMAX'(so);
    assign n_cap_core[i] = core.n_cap;

    // scan-rate monitor and stall counter for this core
    int last = -1, cyc = 0;
    bit stalled = 0, capb = 0;
    initial begin stall_cycles[i] = 0; rate_ok[i] = 0; rate_bad[i] = 0; end
    always @(posedge clk) begin
      cyc <= cyc + 1;
      if (dut.g_core[i].u_cti.tick && (dut.g_core[i].u_cti.alpha_in || dut.g_core[i].u_cti.alpha_out)) begin
        stalled <= 1;
        stall_cycles[i] <= stall_cycles[i] + 1;
      end
      if (capture[i]) capb <= 1;
      if (scan_en[i]) begin
        if (last >= 0 && !stalled) begin
          if (cyc - last == int'(SM[i] * (DIV[i] + 1) + (capb ? DIV[i] + 1 : 0))) rate_ok[i] <= rate_ok[i] + 1;
          else rate_bad[i] <= rate_bad[i] + 1;
        end
        last <= cyc; stalled <= 0; capb <= 0;
      end
    end
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int bus_waits = 0;
  task automatic bus(input bit w, input int core, input reg_sel_e r, input logic [W_B-1:0] d,
                     output logic [W_B-1:0] q);
    @(negedge clk);
    m_req.valid = 1; m_req.write = w; m_req.wdata = d;
    m_req.addr = ADDR_W'((core << REG_BITS) | int'(r));
    #1;
    while (!m_rsp.ready) begin bus_waits++; @(negedge clk); #1; end
    q = m_rsp.rdata;
    @(posedge clk);
    #1 m_req.valid = 0;
  endtask

  bit inb [N][$];
  bit expb [N][$];
  int nwords [N], sent [N], nread [N], packets [N];

  task automatic collect(input int c);
    logic [W_B-1:0] st, got, w;
    int avail;
    bus(0, c, REG_STATUS, '0, st);
    avail = int'(st[23:16]);
    for (int a = 0; a < avail; a++) begin
      bus(0, c, REG_DATA, '0, got);
      for (int b = 0; b < W_B; b++) w[b] = expb[c][nread[c]*W_B + b];
      check(got == w, $sformatf("core %0d response word %0d: %h expected %h", c, nread[c], got, w));
      nread[c]++;
    end
  endtask

  task automatic send_packet(input int c);
    logic [W_B-1:0] st, got, w;
    int n;
    n = (nwords[c] - sent[c] < int'(P)) ? nwords[c] - sent[c] : int'(P);
    if (n == 0) return;
    // wait for room, collecting responses meanwhile
    forever begin
      bus(0, c, REG_STATUS, '0, st);
      if (int'(CAP) - int'(st[15:8]) >= n) break;
      collect(c);
      repeat (8) @(negedge clk);
    end
    for (int k = 0; k < n; k++) begin
      for (int b = 0; b < W_B; b++) w[b] = inb[c][(sent[c] + k)*W_B + b];
      bus(1, c, REG_DATA, w, got);
    end
    sent[c] += n;
    packets[c]++;
    collect(c);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W_B-1:0] got;
    int order [8] = '{3, 2, 3, 0, 3, 2, 3, 1};
    bit done;
    int t0;
    m_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // normal mode on every core
    for (int c = 0; c < N; c++) bus(1, c, REG_DATA, 32'h1000_0000 + c, got);
    for (int c = 0; c < N; c++) begin
      bus(0, c, REG_DATA, '0, got);
      check(got == ~(32'h1000_0000 + c), $sformatf("core %0d functional read", c));
    end

    // test data: every core gets SPLIT*P words per packet set
    for (int c = 0; c < N; c++) begin
      nwords[c] = int'(SPLIT[c] * P * SETS);
      for (int b = 0; b < nwords[c] * int'(W_B); b++) inb[c].push_back(1'($urandom));
      expected_wrapped(inb[c], int'(SM[c]), int'(LM[c]), int'(W_B), int'(W_B), 32'h1000_0000 + c, expb[c]);
      sent[c] = 0; nread[c] = 0; packets[c] = 0;
    end

    // switch to test mode with each core's frequency
    for (int c = 0; c < N; c++)
      bus(1, c, REG_CTRL, W_B'((DIV[c] << CTRL_DIV_LSB) | 32'h3), got);
    for (int c = 0; c < N; c++) begin
      bus(0, c, REG_CTRL, '0, got);
      check(got[0] == 1'b1 && got[CTRL_DIV_LSB +: 4] == 4'(DIV[c]), "test mode set");
    end

    t0 = $time;
    for (int s = 0; s < int'(SETS); s++)
      for (int k = 0; k < 8; k++) send_packet(order[k]);

    // drain all responses
    done = 0;
    while (!done) begin
      done = 1;
      for (int c = 0; c < N; c++) begin
        collect(c);
        if (nread[c] < nwords[c]) done = 0;
      end
      repeat (20) @(negedge clk);
    end
    $display("test time %0d cycles", ($time - t0) / 10);

    for (int c = 0; c < N; c++) begin
      bus(0, c, REG_CAPCNT, '0, got);
      check(got == W_B'(nwords[c] * W_B / SM[c] / LW[c]), $sformatf("core %0d captures %0d", c, got));
      check(n_cap_core[c] == nwords[c] * W_B / SM[c] / LW[c], "captures seen by core");
      check(packets[c] == int'(SPLIT[c] * SETS), $sformatf("core %0d packets %0d (split ratio)", c, packets[c]));
      check(rate_bad[c] == 0 && rate_ok[c] > 0, $sformatf("core %0d scan rate ok=%0d bad=%0d", c, rate_ok[c], rate_bad[c]));
      check(stall_cycles[c] > 0, $sformatf("core %0d waited for data", c));
      $display("core %0d: words=%0d captures=%0d packets=%0d stall ticks=%0d scans on time=%0d",
               c, nwords[c], got, packets[c], stall_cycles[c], rate_ok[c]);
    end
    check(bus_waits > 0, "bus wait states");
    $display("bus wait cycles=%0d", bus_waits);

    // back to normal mode: T/N mux returns functional data again
    for (int c = 0; c < N; c++) begin
      bus(1, c, REG_CTRL, 32'h0, got);
      bus(1, c, REG_DATA, 32'h2000_0000 + c, got);
      bus(0, c, REG_DATA, '0, got);
      check(got == ~(32'h2000_0000 + c), $sformatf("core %0d functional read after test", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
