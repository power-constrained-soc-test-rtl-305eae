// core_wrapper: the boundary cells around one core and the wrapper scan
// chains they form. Wrapper chain c runs from wsi[c] through the input cells
// of chain c, into the core's internal chain c (int_si[c] .. int_so[c]), and
// through the output cells of chain c to wso[c]. Input cell k and output
// cell k are placed on chain k mod S_M, in increasing k, which spreads the
// cells evenly so that, for internal chains of equal length, the longest
// wrapper chain is as short as possible. Cascading boundary cells with the
// internal chains follows the core test architecture; the round-robin
// placement is this design's choice.
//
// Interface: shift (scan clock) and capture are passed on to the core's
// internal chains. Wrapper chain c holds chain_len(c) = in_cells(c) + internal
// length + out_cells(c) flip-flops. In normal mode pi_core = pi_ext and
// po_ext = po_core.
module core_wrapper #(
  parameter int unsigned S_M = 8,
  parameter int unsigned NPI = 32,
  parameter int unsigned NPO = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           test_mode,
  input  logic           shift,
  input  logic           capture,
  // wrapper chains (towards the test interface)
  input  logic [S_M-1:0] wsi,
  output logic [S_M-1:0] wso,
  // internal chains of the core
  output logic [S_M-1:0] int_si,
  input  logic [S_M-1:0] int_so,
  output logic           int_shift,
  output logic           int_capture,
  // core terminals
  input  logic [NPI-1:0] pi_ext,
  output logic [NPI-1:0] pi_core,
  input  logic [NPO-1:0] po_core,
  output logic [NPO-1:0] po_ext
);
  logic [NPI-1:0] in_so;
  logic [NPO-1:0] out_so;

  assign int_shift   = shift;
  assign int_capture = capture;

  for (genvar k = 0; k < NPI; k++) begin : g_in
    logic si;
    if (k < S_M) begin : g_first
      assign si = wsi[k];
    end else begin : g_next
      assign si = in_so[k - S_M];
    end
    wrapper_boundary_cell u_cell (
      .clk, .rst_n, .test_mode, .shift, .capture (1'b0),
      .func_in (pi_ext[k]), .func_out (pi_core[k]),
      .scan_in (si), .scan_out (in_so[k])
    );
  end

  for (genvar k = 0; k < NPO; k++) begin : g_out
    logic si;
    if (k < S_M) begin : g_first
      assign si = int_so[k];
    end else begin : g_next
      assign si = out_so[k - S_M];
    end
    wrapper_boundary_cell u_cell (
      .clk, .rst_n, .test_mode, .shift, .capture,
      .func_in (po_core[k]), .func_out (po_ext[k]),
      .scan_in (si), .scan_out (out_so[k])
    );
  end

  // chain ends: last cell of each chain, or straight through if it has none
  for (genvar c = 0; c < S_M; c++) begin : g_chain
    localparam int unsigned NI = (NPI > c) ? (NPI - c + S_M - 1) / S_M : 0;
    localparam int unsigned NO = (NPO > c) ? (NPO - c + S_M - 1) / S_M : 0;
    if (NI > 0) begin : g_i
      assign int_si[c] = in_so[c + S_M * (NI - 1)];
    end else begin : g_ni
      assign int_si[c] = wsi[c];
    end
    if (NO > 0) begin : g_o
      assign wso[c] = out_so[c + S_M * (NO - 1)];
    end else begin : g_no
      assign wso[c] = int_so[c];
    end
  end
endmodule
