// tb_bus_protocol_interface: drives bus transfers into the slave and checks
// CTRL write/read-back and the one-cycle clear pulse, routing of DATA writes
// and reads to the input/output buffer in test mode and to the core in
// normal mode, wait states while a buffer cannot serve the transfer, and
// STATUS / CAPCNT read-back.
module tb_bus_protocol_interface;
  import pass_pkg::*;
  localparam int unsigned DB = 4;
  logic clk = 0, rst_n = 0;
  fbus_req_t req;
  fbus_rsp_t rsp;
  logic test_mode, clear;
  logic [DB-1:0] div;
  logic in_wr_valid, in_wr_ready = 1, out_rd, out_avail = 0;
  logic [W_B-1:0] in_wr_data, mux_rdata = '0, func_wdata, status = '0, capcnt = '0;
  logic func_wr, func_rd;
  int checks = 0, failures = 0;

  bus_protocol_interface #(.DIV_BITS(DB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic set_req(bit v, bit w, reg_sel_e r, logic [W_B-1:0] d);
    req.valid = v; req.write = w; req.addr = ADDR_W'(r); req.wdata = d;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_req(0, 0, REG_DATA, '0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!test_mode && div == 0 && !clear, "reset values");
    // normal mode: DATA goes to the core
    set_req(1, 1, REG_DATA, 32'h1234_5678); #1;
    check(rsp.ready && func_wr && func_wdata == 32'h1234_5678 && !in_wr_valid, "normal write");
    set_req(1, 0, REG_DATA, '0); mux_rdata = 32'hcafe_f00d; #1;
    check(rsp.ready && func_rd && !out_rd && rsp.rdata == 32'hcafe_f00d, "normal read");
    // CTRL: test mode, divider 5, clear
    @(negedge clk);
    set_req(1, 1, REG_CTRL, 32'h0000_0503); @(negedge clk);
    set_req(0, 0, REG_DATA, '0); #1;
    check(test_mode && div == 4'd5 && clear, "ctrl write and clear pulse");
    @(negedge clk);
    check(!clear, "clear lasts one cycle");
    set_req(1, 0, REG_CTRL, '0); #1;
    check(rsp.ready && rsp.rdata == 32'h0000_0501, $sformatf("ctrl read back %h", rsp.rdata));
    // test mode writes to the input buffer, with a wait state
    set_req(1, 1, REG_DATA, 32'hdead_beef); in_wr_ready = 0; #1;
    check(!rsp.ready && in_wr_valid && !func_wr, "write waits while input register full");
    in_wr_ready = 1; #1;
    check(rsp.ready && in_wr_valid && in_wr_data == 32'hdead_beef, "test write");
    // test mode reads from the output buffer, waiting until a word is there
    set_req(1, 0, REG_DATA, '0); out_avail = 0; mux_rdata = 32'h0bad_cafe; #1;
    check(!rsp.ready && !out_rd, "read waits until a response word is there");
    out_avail = 1; #1;
    check(rsp.ready && out_rd && rsp.rdata == 32'h0bad_cafe && !func_rd, "test read");
    // status and capture count
    set_req(1, 0, REG_STATUS, '0); status = 32'h00a5_0c13; #1;
    check(rsp.ready && rsp.rdata == 32'h00a5_0c13, "status read");
    set_req(1, 0, REG_CAPCNT, '0); capcnt = 32'd77; #1;
    check(rsp.ready && rsp.rdata == 32'd77, "capture count read");
    // back to normal mode
    @(negedge clk);
    set_req(1, 1, REG_CTRL, 32'h0); @(negedge clk);
    set_req(0, 0, REG_DATA, '0); #1;
    check(!test_mode && !clear, "back to normal mode");
    // a request with valid low changes nothing
    set_req(0, 1, REG_CTRL, 32'h1); @(negedge clk); #1;
    check(!test_mode, "no write without valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
