// input_buffer: receives test data from the functional bus in w_b-bit
// words and hands them to a core's s_m wrapper scan chains, so that bus
// width and scan-chain count need not match and bus and scan run at
// unrelated rates.
//
// Four parts, in data order:
//   input register  latches one bus word and sets its status bit;
//   stack           fall_through_stack of DEPTH-1 words; its top copies the
//                   input register when it has room, which clears the input
//                   register's status bit;
//   bottom word     the lowest stack row, a w_b-bit shift register that
//                   sends one bit per serial shift (e2), LSB first, and is
//                   refilled from the stack by e1 (or as soon as it is empty);
//   output register s_m bits wired to the scan chain inputs; each e2 shifts
//                   the next bit in; after s_m bits the chains scan (e3).
// alpha (buffer empty) is high while the bottom word holds no data.
// The parts and their order follow the described buffer; the register
// widths, the serial bit order and the look-ahead handshakes are this
// design's choices. Bit j of each s_m-bit chunk goes to chain j, and chunk
// bits are taken from the serial stream in order, so the stream is the
// test data as the processor sends them, word after word, LSB first.
//
// Timing: a write is taken at the edge where wr_valid && wr_ready. scan_data
// is the value the output register takes at the end of an e3 cycle (the
// complete chunk); the chains sample it at that same edge.
module input_buffer
  import pass_pkg::cnt_w;
#(
  parameter int unsigned W_B   = 32,
  parameter int unsigned S_M   = 8,
  parameter int unsigned DEPTH = 16    // stack rows, bottom word included
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  // bus side
  input  logic                    wr_valid,
  input  logic [W_B-1:0]          wr_data,
  output logic                    wr_ready,
  // FIFO controller
  input  logic                    e1,
  input  logic                    e2,
  output logic                    alpha,
  // scan side
  output logic [S_M-1:0]          scan_data,
  // status
  output logic [cnt_w(DEPTH+1)-1:0] words
);
  localparam int unsigned SD = DEPTH - 1;

  logic           in_full;
  logic [W_B-1:0] in_reg;
  logic           copy;
  logic           stk_ready, stk_valid, stk_pop;
  logic [W_B-1:0] stk_data;
  logic [cnt_w(SD)-1:0] stk_count;
  logic           bot_valid;
  logic [W_B-1:0] bot;
  logic           load_bot;
  logic [S_M-1:0] oreg;
  logic           sbit;

  assign copy     = in_full && stk_ready;
  assign wr_ready = !in_full || copy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    in_full <= 1'b0;
    else if (clear)                in_full <= 1'b0;
    else if (wr_valid && wr_ready) in_full <= 1'b1;
    else if (copy)                 in_full <= 1'b0;
  end
  always_ff @(posedge clk)
    if (wr_valid && wr_ready) in_reg <= wr_data;

  fall_through_stack #(.WIDTH(W_B), .DEPTH(SD)) u_stack (
    .clk, .rst_n, .clear,
    .push_valid (copy),
    .push_data  (in_reg),
    .push_ready (stk_ready),
    .pop        (stk_pop),
    .bot_valid  (stk_valid),
    .bot_data   (stk_data),
    .count      (stk_count)
  );

  // Bottom word: refilled by e1 when its last bit leaves, or when empty.
  assign load_bot = stk_valid && (!bot_valid || e1);
  assign stk_pop  = load_bot;
  assign alpha    = !bot_valid;
  assign sbit     = bot[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        bot_valid <= 1'b0;
    else if (clear)    bot_valid <= 1'b0;
    else if (load_bot) bot_valid <= 1'b1;
    else if (e1)       bot_valid <= 1'b0;
  end
  always_ff @(posedge clk) begin
    if (load_bot) bot <= stk_data;
    else if (e2)  bot <= bot >> 1;
  end

  // Output register, next bit enters at the top.
  if (S_M == 1) begin : g_one
    assign scan_data = sbit;
  end else begin : g_many
    assign scan_data = {sbit, oreg[S_M-1:1]};
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     oreg <= '0;
    else if (clear) oreg <= '0;
    else if (e2)    oreg <= scan_data;
  end

  assign words = cnt_w(DEPTH+1)'(in_full) + cnt_w(DEPTH+1)'(stk_count)
               + cnt_w(DEPTH+1)'(bot_valid);

  a_shift_needs_data: assert property (@(posedge clk) disable iff (!rst_n) e2 |-> bot_valid);
endmodule
