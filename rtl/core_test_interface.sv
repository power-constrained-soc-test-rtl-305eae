// core_test_interface: everything that sits between the functional bus and
// one core under test: bus protocol interface, input buffer, output buffer,
// one FIFO buffer controller shared by both buffers, the clock divider that
// sets the core's serial rate, and the T/N mux on the read path.
//
// Operation in test mode: the processor writes a packet (a burst of w_b-bit
// words) to DATA. The words fall through the input buffer; the controller,
// stepped by the divider's clk_in ticks, moves one bit per tick into the
// s_m-bit output register, pulses scan_en (e3) every s_m bits and capture
// (e4) after every L_MAX scan clocks. The response bits the chains shift out
// at each scan clock travel the same way backwards into the output buffer,
// from which the processor reads them through DATA. When the input buffer
// runs dry or the output buffer fills up, the controller stops (alpha), so
// the core simply waits for the next packet: scan and bus timing are
// decoupled. The processor unloads the last response by sending one more
// pattern's worth of data.
//
// STATUS word: [0] input register can take a word, [1] input buffer empty,
// [2] response word available, [3] output buffer full, [4] test mode,
// [15:8] test words held, [23:16] response words held.
//
// The composition follows the core test architecture; the single clock
// domain with clk_in as an enable, the STATUS layout and the stall on a full
// output buffer are this design's choices.
module core_test_interface
  import pass_pkg::*;
#(
  parameter int unsigned S_M      = 8,    // wrapper scan chains
  parameter int unsigned L_MAX    = 16,   // longest wrapper scan chain
  parameter int unsigned DEPTH    = 16,   // stack rows per buffer
  parameter int unsigned DIV_BITS = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  fbus_req_t      req,
  output fbus_rsp_t      rsp,
  // wrapper scan chains of the core
  output logic [S_M-1:0] scan_in,
  output logic           scan_en,     // scan clock e3
  output logic           capture,     // capture clock e4
  input  logic [S_M-1:0] scan_out,
  output logic           test_mode,
  // functional port of the core (normal mode)
  output logic           func_wr,
  output logic           func_rd,
  output logic [W_B-1:0] func_wdata,
  input  logic [W_B-1:0] func_rdata
);
  logic                clear, tick;
  logic [DIV_BITS-1:0] div;
  logic                in_wr_valid, in_wr_ready;
  logic [W_B-1:0]      in_wr_data;
  logic                out_rd, out_avail;
  logic [W_B-1:0]      out_rdata, mux_rdata;
  logic                e1, e2, e3, e4, alpha_in, alpha_out;
  logic [15:0]         captures;
  logic [cnt_w(DEPTH+1)-1:0] in_words;
  logic [cnt_w(DEPTH)-1:0]   out_words;
  logic [W_B-1:0]      status;

  bus_protocol_interface #(.DIV_BITS(DIV_BITS)) u_bpi (
    .clk, .rst_n, .req, .rsp,
    .test_mode, .clear, .div,
    .in_wr_valid, .in_wr_data, .in_wr_ready,
    .out_rd, .out_avail, .mux_rdata,
    .func_wr, .func_rd, .func_wdata,
    .status, .capcnt (W_B'(captures))
  );

  clock_divider #(.DIV_BITS(DIV_BITS)) u_div (
    .clk, .rst_n, .clear, .en (test_mode), .div, .tick
  );

  fifo_controller #(.W_B(W_B), .S_M(S_M), .L_MAX(L_MAX), .CAP_W(16)) u_ctl (
    .clk, .rst_n, .clear, .tick,
    .alpha (alpha_in || alpha_out),
    .e1, .e2, .e3, .e4, .captures
  );

  input_buffer #(.W_B(W_B), .S_M(S_M), .DEPTH(DEPTH)) u_ibuf (
    .clk, .rst_n, .clear,
    .wr_valid (in_wr_valid), .wr_data (in_wr_data), .wr_ready (in_wr_ready),
    .e1, .e2, .alpha (alpha_in),
    .scan_data (scan_in),
    .words (in_words)
  );

  output_buffer #(.W_B(W_B), .S_M(S_M), .DEPTH(DEPTH)) u_obuf (
    .clk, .rst_n, .clear,
    .scan_resp (scan_out),
    .e1, .e2, .e3, .alpha (alpha_out),
    .rd (out_rd), .rd_data (out_rdata), .rd_avail (out_avail),
    .words (out_words)
  );

  tn_mux #(.W(W_B)) u_tn (
    .test_mode, .test_data (out_rdata), .func_data (func_rdata), .bus_data (mux_rdata)
  );

  assign scan_en = e3;
  assign capture = e4;

  always_comb begin
    status         = '0;
    status[0]      = in_wr_ready;
    status[1]      = alpha_in;
    status[2]      = out_avail;
    status[3]      = alpha_out;
    status[4]      = test_mode;
    status[15:8]   = 8'(in_words);
    status[23:16]  = 8'(out_words);
  end
endmodule
