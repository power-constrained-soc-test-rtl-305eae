// tb_clock_divider: checks that the divider gives exactly one tick every
// div+1 cycles for every setting, none while disabled, and restarts on clear.
module tb_clock_divider;
  localparam int unsigned DB = 4;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, tick;
  logic [DB-1:0] div = '0;
  int checks = 0, failures = 0;

  clock_divider #(.DIV_BITS(DB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: no ticks
    n = 0;
    repeat (50) begin @(negedge clk); if (tick) n++; end
    check(n == 0, "tick while disabled");
    for (int d = 0; d < (1 << DB); d++) begin
      @(negedge clk);
      div = DB'(d); clear = 1; en = 1;
      @(negedge clk);
      clear = 0;
      last = -1; n = 0;
      for (int c = 0; c < 20 * (d + 1); c++) begin
        if (tick) begin
          if (last >= 0) check(c - last == d + 1, $sformatf("period for div=%0d is %0d", d, c - last));
          last = c; n++;
        end
        @(negedge clk);
      end
      check(n == 20, $sformatf("tick count %0d for div=%0d", n, d));
    end
    // clear restarts: first tick div+1 cycles after clear
    @(negedge clk); div = 4'd6; clear = 1;
    @(negedge clk); clear = 0;
    n = 0;
    while (!tick) begin @(negedge clk); n++; end
    check(n == 6, $sformatf("first tick after clear at %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
