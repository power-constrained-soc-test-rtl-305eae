// tb_output_buffer: random scan responses captured at scan clocks, random
// serial shifts and random bus reads. The bench plays the FIFO controller
// (e1 every W_B-th and e3 every S_M-th shift) and checks every word read
// against the expected response stream: S_M zero bits from reset, then each
// captured chunk in chain order, packed LSB first. Also checks the word
// count and that the buffer stops the shifting (alpha) only when full.
module tb_output_buffer;
  localparam int unsigned W_B = 8, S_M = 3, DEPTH = 4;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [S_M-1:0] scan_resp = '0;
  logic e1, e2, e3, alpha, rd = 0, rd_avail;
  logic [W_B-1:0] rd_data;
  logic [2:0] words;
  int checks = 0, failures = 0;
  bit pending[$];
  bit cur[$];
  logic [W_B-1:0] expq[$];
  int nso = 0, nsi = 0, held = 0, fulls = 0, nread = 0;
  bit want_shift = 0;

  output_buffer #(.W_B(W_B), .S_M(S_M), .DEPTH(DEPTH)) dut (.*);

  assign e2 = want_shift && !alpha;
  assign e1 = e2 && (nso == W_B - 1);
  assign e3 = e2 && (nsi == S_M - 1);

  always #5 clk = ~clk;
  always @(posedge clk) if (e2) begin
    nso <= (nso + 1) % W_B;
    nsi <= (nsi + 1) % S_M;
  end

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
    logic [W_B-1:0] w;
    bit x1;
    for (int b = 0; b < S_M; b++) pending.push_back(1'b0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int pr;
      pr = ((c / 1000) % 2) ? 5 : 90;   // slow reader, then fast reader
      want_shift = ($urandom % 100) < 70;
      scan_resp  = S_M'($urandom);
      #1;
      rd = rd_avail && (($urandom % 100) < pr);
      #1;
      if (alpha) begin
        fulls++;
        check(held >= DEPTH - 1, $sformatf("alpha with %0d words", held));
      end
      if (rd) begin
        check(expq.size() > 0 && rd_data == expq[0],
              $sformatf("word %0d: %h expected %h", nread, rd_data, expq.size() ? expq[0] : '0));
        if (expq.size() > 0) void'(expq.pop_front());
        nread++;
        held--;
      end
      x1 = e1;
      if (e2) begin
        cur.push_back(pending.pop_front());
        if (e3) for (int b = 0; b < S_M; b++) pending.push_back(scan_resp[b]);
        if (x1) begin
          for (int b = 0; b < W_B; b++) w[b] = cur[b];
          cur.delete();
          expq.push_back(w);
          held++;
        end
      end
      @(negedge clk);
      check(32'(words) == held, $sformatf("words %0d vs %0d", words, held));
    end
    check(fulls > 100 && nread > 500, "full stall and reads seen");
    $display("reads=%0d full-stall cycles=%0d", nread, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
