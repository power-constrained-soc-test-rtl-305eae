// tb_wrapper_boundary_cell: random stimulus against a one-bit model: the
// flip-flop takes scan_in on shift, func_in on capture (shift has priority)
// and holds otherwise; func_out is func_in in normal mode and the flip-flop
// in test mode.
module tb_wrapper_boundary_cell;
  logic clk = 0, rst_n = 0, test_mode = 0, shift = 0, capture = 0;
  logic func_in = 0, func_out, scan_in = 0, scan_out;
  int checks = 0, failures = 0;
  bit m = 0;
  int n_shift = 0, n_cap = 0;

  wrapper_boundary_cell dut (.*);

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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      test_mode = 1'($urandom);
      shift     = ($urandom % 4) == 0;
      capture   = ($urandom % 4) == 0;
      func_in   = 1'($urandom);
      scan_in   = 1'($urandom);
      #1;
      check(scan_out == m, "flip-flop value");
      check(func_out == (test_mode ? m : func_in), "functional output");
      if (shift) begin m = scan_in; n_shift++; end
      else if (capture) begin m = func_in; n_cap++; end
      @(negedge clk);
    end
    check(n_shift > 100 && n_cap > 100, "shift and capture seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
