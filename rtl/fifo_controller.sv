// fifo_controller: the FIFO buffer controller of one core's test interface.
//
// It turns the core's serial rate clk_in into the four control signals of
// the buffers, using three modulo counters:
//   e2  serial shift: one bit moves from the stack bottom into the output
//       register (and, in the output buffer, the other way) on every clk_in
//       tick, unless alpha says the buffer cannot move data;
//   e1  fall-through: MOD w_b counts e2; when w_b bits have left the bottom
//       word, a new word is brought into the bottom of the stack;
//   e3  scan clock: MOD s_m counts e2; when s_m bits have gathered in the
//       output register, all s_m wrapper chains shift once;
//   e4  capture clock: MOD max(l) counts e3; after max(l) scan clocks the
//       core captures its response.
// These counters, the gating by alpha and the meaning of each signal follow
// the described controller. What is this design's own: clk_in is an enable
// (tick) in the system clock domain rather than a gated clock; e1 and e3 are
// high in the same cycle as the e2 that completes their count, so one bit
// moves per tick with no bubble; and the capture takes one clk_in tick of its
// own, during which no shifting happens, so capture and scan never coincide.
// The same controller serves the input and the output buffer.
//
// Interface: all outputs are single-cycle, active-high enables, valid in the
// cycle they act (registers that use them update at the next rising edge).
module fifo_controller
  import pass_pkg::cnt_w;
#(
  parameter int unsigned W_B   = 32,   // bus width w_b
  parameter int unsigned S_M   = 8,    // wrapper scan chains s_m
  parameter int unsigned L_MAX = 16,   // longest wrapper chain max(l)
  parameter int unsigned CAP_W = 16    // width of the capture counter
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             tick,      // clk_in
  input  logic             alpha,     // buffer cannot move data this tick
  output logic             e1,        // fall-through stack refill
  output logic             e2,        // serial shift
  output logic             e3,        // scan clock
  output logic             e4,        // capture clock
  output logic [CAP_W-1:0] captures   // e4 pulses since clear
);
  logic [cnt_w(W_B)-1:0]   n_so;   // bits shifted out of the bottom word
  logic [cnt_w(S_M)-1:0]   n_si;   // bits shifted into the output register
  logic [cnt_w(L_MAX)-1:0] n_sc;   // scan clocks in this pattern
  logic                    cap_pending;

  assign e2 = tick && !alpha && !cap_pending;
  assign e1 = e2 && (n_so == cnt_w(W_B)'(W_B - 1));
  assign e3 = e2 && (n_si == cnt_w(S_M)'(S_M - 1));
  assign e4 = tick && cap_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_so <= '0; n_si <= '0; n_sc <= '0; cap_pending <= 1'b0; captures <= '0;
    end else if (clear) begin
      n_so <= '0; n_si <= '0; n_sc <= '0; cap_pending <= 1'b0; captures <= '0;
    end else begin
      if (e2) begin
        n_so <= e1 ? '0 : n_so + 1'b1;
        n_si <= e3 ? '0 : n_si + 1'b1;
      end
      if (e3) begin
        if (n_sc == cnt_w(L_MAX)'(L_MAX - 1)) begin
          n_sc        <= '0;
          cap_pending <= 1'b1;
        end else begin
          n_sc <= n_sc + 1'b1;
        end
      end
      if (e4) begin
        cap_pending <= 1'b0;
        captures    <= captures + 1'b1;
      end
    end
  end

  // A capture clock never coincides with a shift or scan clock.
  a_cap_alone: assert property (@(posedge clk) disable iff (!rst_n) e4 |-> !e2);
endmodule
