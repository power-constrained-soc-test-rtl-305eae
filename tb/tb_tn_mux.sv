// tb_tn_mux: random words on both inputs, both select values.
module tb_tn_mux;
  logic test_mode;
  logic [31:0] test_data, func_data, bus_data;
  int checks = 0, failures = 0;

  tn_mux #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      test_mode = 1'($urandom);
      test_data = $urandom;
      func_data = $urandom;
      #1;
      checks++;
      if (bus_data !== (test_mode ? test_data : func_data)) begin
        failures++;
        $display("FAIL: mode=%0d got %h", test_mode, bus_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
