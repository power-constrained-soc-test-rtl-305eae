// scan_core_model: behavioural model of a wrapped core under test, for
// simulation only (the cores themselves are not part of this design).
//
// S_M wrapper scan chains of L flip-flops each, all reset to zero. On
// scan_en every chain shifts by one: chain c takes scan_in[c] at its first
// flip-flop and shows its last flip-flop on scan_out[c]. On capture each
// flip-flop j of chain c loads ~st[c][j] ^ st[(c+1) % S_M][(j+1) % L], a
// stand-in for the core logic that mixes neighbouring chains. Its functional
// port is a register written by func_wr; its outputs are the inverse of that
// register XORed with the present inputs (func_wdata), so a read with zero
// on the inputs returns the inverse of the last word written.
module scan_core_model #(
  parameter int unsigned S_M = 4,
  parameter int unsigned L   = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [S_M-1:0] scan_in,
  input  logic           scan_en,
  input  logic           capture,
  output logic [S_M-1:0] scan_out,
  input  logic           func_wr,
  input  logic [31:0]    func_wdata,
  output logic [31:0]    func_rdata
);
  logic [L-1:0] st [S_M];
  logic [31:0]  freg;
  int unsigned  n_scan = 0, n_cap = 0;

  for (genvar c = 0; c < S_M; c++) begin : g_out
    assign scan_out[c] = st[c][L-1];
  end
  assign func_rdata = ~freg ^ func_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < S_M; c++) st[c] <= '0;
      freg <= '0;
    end else begin
      if (scan_en) begin
        for (int c = 0; c < S_M; c++)
          if (L == 1) st[c] <= scan_in[c];
          else        st[c] <= {st[c][L-2:0], scan_in[c]};
        n_scan <= n_scan + 1;
      end
      if (capture) begin
        for (int c = 0; c < S_M; c++)
          for (int j = 0; j < L; j++)
            st[c][j] <= ~st[c][j] ^ st[(c + 1) % S_M][(j + 1) % L];
        n_cap <= n_cap + 1;
      end
      if (func_wr) freg <= func_wdata;
    end
  end

  a_no_scan_during_capture: assert property (@(posedge clk) !(scan_en && capture));
endmodule
