// clock_divider: derives a core's serial shift rate clk_in from the fast
// system clock as a one-cycle enable pulse.
//
// The test-group former reassigns each core to one of a set of discrete
// frequencies below the maximum, limited by how many flip-flops the clock
// divider may use. This divider has DIV_BITS flip-flops and divides by
// div+1, so it offers 2**DIV_BITS frequencies F, F/2, ... F/2**DIV_BITS. The
// divide-by-N structure and the default of 4 flip-flops (the resolution
// beyond which test time improves little) are this design's choices.
//
// Interface: div (divide-by minus one) may change at any time; a change takes
// effect at the next wrap. tick is high for one clk cycle in every div+1 while
// en is high; with div = 0 it is high on every cycle. clear restarts the count.
module clock_divider #(
  parameter int unsigned DIV_BITS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic [DIV_BITS-1:0] div,
  output logic                tick
);
  logic [DIV_BITS-1:0] cnt;

  assign tick = en && (cnt >= div);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (clear)    cnt <= '0;
    else if (en) begin
      if (cnt >= div)  cnt <= '0;
      else             cnt <= cnt + 1'b1;
    end
  end
endmodule
