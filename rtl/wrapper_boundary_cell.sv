// wrapper_boundary_cell: one boundary cell on a core terminal (a primary
// input or output of the core). In normal mode the functional value passes
// straight through. In test mode the terminal is driven from the cell's
// flip-flop, which is one link of a wrapper scan chain: it takes scan_in on a
// scan clock (shift) and the functional value on a capture clock (capture).
// Input cells are given no capture, so they keep the stimulus they were
// loaded with; output cells capture the core's response. The cells and their
// cascading into the scan chains follow the core test architecture; this
// cell structure (one flip-flop, no separate update stage) is this design's
// choice. Timing: shift and capture are one-cycle enables; the flip-flop
// changes at the rising edge; func_out is combinational.
module wrapper_boundary_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic test_mode,
  input  logic shift,
  input  logic capture,
  input  logic func_in,
  output logic func_out,
  input  logic scan_in,
  output logic scan_out
);
  logic ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ff <= 1'b0;
    else if (shift)   ff <= scan_in;
    else if (capture) ff <= func_in;
  end

  assign scan_out = ff;
  assign func_out = test_mode ? ff : func_in;
endmodule
