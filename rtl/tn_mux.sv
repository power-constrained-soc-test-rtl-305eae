// tn_mux: the test/normal (T/N) multiplexer in front of a core's bus
// protocol interface. In test mode the word returned to the bus is the
// output buffer's response word; in normal mode it is the core's own
// functional output, so the same bus port serves both uses. Purely
// combinational. The select polarity (1 = test) is this design's choice.
module tn_mux #(
  parameter int unsigned W = 32
) (
  input  logic         test_mode,
  input  logic [W-1:0] test_data,
  input  logic [W-1:0] func_data,
  output logic [W-1:0] bus_data
);
  always_comb bus_data = test_mode ? test_data : func_data;
endmodule
