// tb_fall_through_stack: random pushes and pops against a queue model.
// Checks order, count, push_ready == (not all full or popping), and the
// fall-through latency of DEPTH cycles from the top into an empty stack.
module tb_fall_through_stack;
  localparam int unsigned WIDTH = 16, DEPTH = 5;
  logic clk = 0, rst_n = 0, clear = 0;
  logic push_valid = 0, push_ready, pop = 0, bot_valid;
  logic [WIDTH-1:0] push_data = '0, bot_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q[$];

  fall_through_stack #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

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
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: one word into an empty stack
    push_valid = 1; push_data = 16'hbeef;
    @(negedge clk);
    push_valid = 0;
    lat = 1;
    while (!bot_valid && lat < 50) begin @(negedge clk); lat++; end
    check(lat == DEPTH, $sformatf("fall-through latency %0d", lat));
    check(bot_data == 16'hbeef, "latency word");
    pop = 1; @(negedge clk); pop = 0;
    check(count == 0, "empty after pop");
    // random traffic, three phases: fill-heavy, balanced, drain-heavy
    for (int ph = 0; ph < 3; ph++) begin
      for (int c = 0; c < 2000; c++) begin
        int pp, pq;
        pp = (ph == 0) ? 80 : (ph == 1 ? 50 : 20);
        pq = (ph == 0) ? 20 : (ph == 1 ? 50 : 80);
        push_valid = ($urandom % 100) < pp;
        push_data  = WIDTH'($urandom);
        pop        = bot_valid && (($urandom % 100) < pq);
        #1;
        check(push_ready == ((count < DEPTH) || pop), "push_ready");
        if (pop) begin
          check(q.size() > 0 && bot_data == q[0], $sformatf("order: got %h", bot_data));
          if (q.size() > 0) void'(q.pop_front());
        end
        if (push_valid && push_ready) q.push_back(push_data);
        @(negedge clk);
        check(32'(count) == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      end
    end
    // full-rate streaming: a full stack passes one word per cycle
    push_valid = 0; pop = 0;
    repeat (10) @(negedge clk);
    while (count < DEPTH) begin push_valid = 1; push_data = WIDTH'($urandom); #1; if (push_ready) q.push_back(push_data); @(negedge clk); end
    for (int c = 0; c < 20; c++) begin
      push_valid = 1; push_data = WIDTH'($urandom); pop = 1; #1;
      check(push_ready && bot_valid, "full-rate streaming");
      check(bot_data == q[0], "stream order");
      void'(q.pop_front()); q.push_back(push_data);
      @(negedge clk);
    end
    push_valid = 0; pop = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(count == 0 && !bot_valid, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
