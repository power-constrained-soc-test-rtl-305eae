// fall_through_stack: the word store between the input register and the
// bit-serial end of a test buffer.
//
// DEPTH slots of WIDTH bits, each with its own status (full) bit, slot 0 at
// the bottom. A word written at the top falls one slot per clock cycle
// towards the lowest empty slot, so words leave the bottom in the order they
// entered. A slot takes the word above it when it is empty or when its own
// word moves down (or is popped) at the same edge; that look-ahead lets a
// full stack move at one word per cycle. The per-slot status bits and the
// fall-through behaviour follow the described buffer; the look-ahead is this
// design's choice.
//
// Interface: push_data is taken at the rising edge where push_valid and
// push_ready are high. bot_valid/bot_data show slot 0; pop (only while
// bot_valid) empties it at the next edge. count is the number of full slots.
module fall_through_stack
  import pass_pkg::cnt_w;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      push_valid,
  input  logic [WIDTH-1:0]          push_data,
  output logic                      push_ready,
  input  logic                      pop,
  output logic                      bot_valid,
  output logic [WIDTH-1:0]          bot_data,
  output logic [cnt_w(DEPTH)-1:0]   count
);
  logic [WIDTH-1:0] slot [DEPTH];
  logic [DEPTH-1:0] full;
  logic [DEPTH-1:0] free;    // slot can take a new word at this edge
  logic [DEPTH-1:0] leave;   // slot's word leaves at this edge
  logic [DEPTH-1:0] fill;    // slot takes a word at this edge

  assign leave[0] = pop && full[0];
  assign free[0]  = !full[0] || leave[0];
  for (genvar i = 0; i < DEPTH - 1; i++) begin : g_fall
    assign fill[i]    = full[i+1] && free[i];
    assign leave[i+1] = fill[i];
    assign free[i+1]  = !full[i+1] || leave[i+1];
  end
  assign fill[DEPTH-1] = push_valid && free[DEPTH-1];

  assign push_ready = free[DEPTH-1];
  assign bot_valid  = full[0];
  assign bot_data   = slot[0];

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count += cnt_w(DEPTH)'(full[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      full <= '0;
    else if (clear)  full <= '0;
    else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (fill[i])       full[i] <= 1'b1;
        else if (leave[i]) full[i] <= 1'b0;
      end
    end
  end

  // Data slots need no reset: a slot is only read while its status bit is set.
  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH - 1; i++)
      if (fill[i]) slot[i] <= slot[i+1];
    if (fill[DEPTH-1]) slot[DEPTH-1] <= push_data;
  end

  a_pop_when_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> full[0]);
endmodule
