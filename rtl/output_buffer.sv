// output_buffer: collects the responses that a core's s_m wrapper scan
// chains shift out and returns them to the functional bus in w_b-bit words.
//
// It mirrors input_buffer with the data flowing the other way:
//   response register s_m bits loaded from the chain outputs at every scan
//                     clock (e3) and sent out one bit per serial shift (e2),
//                     chain 0 first;
//   bottom word       a w_b-bit shift register collecting those bits, LSB
//                     first; when w_b bits are in (e1) the word is pushed
//                     onto the stack;
//   stack             fall_through_stack of DEPTH-1 words;
//   bus register      one word the processor reads; refilled from the stack.
// Because both buffers are driven by the same e1/e2/e3, each serial shift
// moves one test bit in and one response bit out. The response stream lags
// the test stream by s_m bits: the first s_m bits out are zeros from reset,
// and each chunk's bits follow in chain order. alpha (full) is high when the
// stack cannot take a word, which stops the shared controller. The mirrored
// structure follows the description; the stall on full, the reset contents
// and the bit order are this design's choices.
//
// Timing: rd_data/rd_avail show the bus register; rd pops it at the edge.
module output_buffer
  import pass_pkg::cnt_w;
#(
  parameter int unsigned W_B   = 32,
  parameter int unsigned S_M   = 8,
  parameter int unsigned DEPTH = 16    // stack rows, bottom word included
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  // scan side
  input  logic [S_M-1:0]          scan_resp,
  // FIFO controller
  input  logic                    e1,
  input  logic                    e2,
  input  logic                    e3,
  output logic                    alpha,
  // bus side
  input  logic                    rd,
  output logic [W_B-1:0]          rd_data,
  output logic                    rd_avail,
  // status
  output logic [cnt_w(DEPTH)-1:0] words
);
  localparam int unsigned SD = DEPTH - 1;

  logic [S_M-1:0] preg;
  logic           sbit;
  logic [W_B-1:0] asm_q, asm_d;
  logic           stk_ready, stk_valid, stk_pop;
  logic [W_B-1:0] stk_data;
  logic [cnt_w(SD)-1:0] stk_count;
  logic           out_full;
  logic [W_B-1:0] out_reg;

  assign sbit = preg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      preg <= '0;
    else if (clear)  preg <= '0;
    else if (e3)     preg <= scan_resp;
    else if (e2)     preg <= preg >> 1;
  end

  assign asm_d = {sbit, asm_q[W_B-1:1]};
  always_ff @(posedge clk)
    if (e2) asm_q <= asm_d;

  fall_through_stack #(.WIDTH(W_B), .DEPTH(SD)) u_stack (
    .clk, .rst_n, .clear,
    .push_valid (e1),
    .push_data  (asm_d),
    .push_ready (stk_ready),
    .pop        (stk_pop),
    .bot_valid  (stk_valid),
    .bot_data   (stk_data),
    .count      (stk_count)
  );
  assign alpha = !stk_ready;

  assign stk_pop = stk_valid && (!out_full || rd);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       out_full <= 1'b0;
    else if (clear)   out_full <= 1'b0;
    else if (stk_pop) out_full <= 1'b1;
    else if (rd)      out_full <= 1'b0;
  end
  always_ff @(posedge clk)
    if (stk_pop) out_reg <= stk_data;

  assign rd_data  = out_reg;
  assign rd_avail = out_full;
  assign words    = cnt_w(DEPTH)'(stk_count) + cnt_w(DEPTH)'(out_full);

  a_push_fits: assert property (@(posedge clk) disable iff (!rst_n) e1 |-> stk_ready);
  a_rd_avail:  assert property (@(posedge clk) disable iff (!rst_n) rd |-> out_full);
endmodule
