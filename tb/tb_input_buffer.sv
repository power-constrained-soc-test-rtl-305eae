// tb_input_buffer: random bus writes and random serial shifts. The bench
// plays the FIFO controller (e1 every W_B-th shift) and checks that each
// S_M-bit chunk presented at a scan clock equals the next S_M bits of the
// written word stream, LSB first; that alpha is high exactly when no bit can
// be shifted; that the word count is right; and that writes wait when full.
module tb_input_buffer;
  localparam int unsigned W_B = 8, S_M = 3, DEPTH = 4;
  logic clk = 0, rst_n = 0, clear = 0;
  logic wr_valid = 0, wr_ready, e1, e2, alpha;
  logic [W_B-1:0] wr_data = '0;
  logic [S_M-1:0] scan_data;
  logic [2:0] words;
  int checks = 0, failures = 0;
  bit stream[$];
  int nso = 0, nsi = 0, held = 0, waits = 0, starves = 0, chunks = 0;
  bit want_shift = 0;

  input_buffer #(.W_B(W_B), .S_M(S_M), .DEPTH(DEPTH)) dut (.*);

  assign e2 = want_shift && !alpha;
  assign e1 = e2 && (nso == W_B - 1);

  always #5 clk = ~clk;
  always @(posedge clk) if (e2) nso <= (nso + 1) % W_B;

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
    logic [S_M-1:0] exp;
    bit x1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int pw, ps;
      // alternate phases: bus faster than scan, and scan faster than bus
      pw = ((c / 1000) % 2) ? 90 : 15;
      ps = ((c / 1000) % 2) ? 30 : 95;
      wr_valid   = ($urandom % 100) < pw;
      wr_data    = W_B'($urandom);
      want_shift = ($urandom % 100) < ps;
      #1;
      x1 = e1;
      check(alpha || held > 0, "no alpha while empty");
      if (held == 0) check(alpha, "alpha when empty");
      if (wr_valid && !wr_ready) waits++;
      if (want_shift && alpha) starves++;
      if (e2) begin
        check(stream.size() > 0, "shift without data");
        nsi++;
        if (nsi == S_M) begin
          nsi = 0;
          for (int b = 0; b < S_M; b++) exp[b] = stream[b];
          check(scan_data == exp, $sformatf("chunk %0d: %b expected %b", chunks, scan_data, exp));
          for (int b = 0; b < S_M; b++) void'(stream.pop_front());
          chunks++;
        end
      end
      if (wr_valid && wr_ready) begin
        for (int b = 0; b < W_B; b++) stream.push_back(wr_data[b]);
        held++;
      end
      if (x1) held--;
      @(negedge clk);
      check(32'(words) == held, $sformatf("words %0d vs %0d", words, held));
    end
    check(waits > 50 && starves > 50 && chunks > 1000, "both stall kinds seen");
    $display("chunks=%0d waits=%0d starves=%0d", chunks, waits, starves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
