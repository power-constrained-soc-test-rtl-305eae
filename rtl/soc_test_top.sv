// soc_test_top: a bus-based SOC prepared for core test over its functional
// bus. The embedded processor, acting as tester, is the bus master (its bus
// port is brought out here); every core under test sits behind its own
// core_test_interface on one shared functional_bus, whose buffers decouple
// the processor's packet deliveries from each core's scan timing, and inside
// a core_wrapper of boundary cells on its bus-facing terminals. The cores
// themselves are outside this module: each core's internal scan chains
// (scan_in/scan_out, scan_en, capture) and its bus-facing terminals
// (func_wdata = its w_b primary inputs, func_rdata = its w_b primary outputs,
// both through the boundary cells) are brought out.
//
// Core i is slave i on the bus (word addresses 4*i .. 4*i+3). Its number of
// wrapper chains S_M[i], longest internal chain L_INT[i] and buffer depth
// DEPTH[i] are per-core parameters. The wrapper chains are one boundary cell
// per w_b/S_M terminals longer at each end, so the test interface is built
// for L_INT + 2*ceil(W_B/S_M) scan clocks per pattern. Chain bits above
// S_M[i] in the port arrays are unused (scan_in reads as zero there,
// scan_out is ignored). The number of cores and the per-core sizes are this
// design's example configuration; the 32-bit bus, the 100-word total buffer
// and the 4-flip-flop frequency dividers follow the evaluation.
module soc_test_top
  import pass_pkg::*;
#(
  parameter int unsigned N_CORES  = 4,
  parameter int unsigned S_MAX    = 16,
  parameter int unsigned S_M   [N_CORES] = '{16, 8, 4, 2},
  parameter int unsigned L_INT [N_CORES] = '{32, 40, 24, 16},
  parameter int unsigned DEPTH [N_CORES] = '{12, 12, 12, 12},
  parameter int unsigned DIV_BITS = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // functional bus master port (embedded processor)
  input  fbus_req_t        m_req,
  output fbus_rsp_t        m_rsp,
  // internal scan chains of each core
  output logic [S_MAX-1:0] scan_in  [N_CORES],
  output logic             scan_en  [N_CORES],
  output logic             capture  [N_CORES],
  input  logic [S_MAX-1:0] scan_out [N_CORES],
  output logic             test_mode[N_CORES],
  // functional port of each core: strobes, and its bus-facing terminals
  output logic             func_wr   [N_CORES],
  output logic             func_rd   [N_CORES],
  output logic [W_B-1:0]   func_wdata[N_CORES],
  input  logic [W_B-1:0]   func_rdata[N_CORES]
);
  fbus_req_t s_req [N_CORES];
  fbus_rsp_t s_rsp [N_CORES];

  functional_bus #(.N_SLAVES(N_CORES)) u_bus (
    .m_req, .m_rsp, .s_req, .s_rsp
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    localparam int unsigned CELLS = (W_B + S_M[i] - 1) / S_M[i];
    localparam int unsigned LW    = L_INT[i] + 2 * CELLS;   // longest wrapper chain
    logic [S_M[i]-1:0] wsi, wso, isi;
    logic              e3, e4, tm;
    logic [W_B-1:0]    bus_wdata, po_ext;

    core_test_interface #(
      .S_M(S_M[i]), .L_MAX(LW), .DEPTH(DEPTH[i]), .DIV_BITS(DIV_BITS)
    ) u_cti (
      .clk, .rst_n,
      .req        (s_req[i]),
      .rsp        (s_rsp[i]),
      .scan_in    (wsi),
      .scan_en    (e3),
      .capture    (e4),
      .scan_out   (wso),
      .test_mode  (tm),
      .func_wr    (func_wr[i]),
      .func_rd    (func_rd[i]),
      .func_wdata (bus_wdata),
      .func_rdata (po_ext)
    );

    core_wrapper #(.S_M(S_M[i]), .NPI(W_B), .NPO(W_B)) u_wrap (
      .clk, .rst_n,
      .test_mode   (tm),
      .shift       (e3),
      .capture     (e4),
      .wsi, .wso,
      .int_si      (isi),
      .int_so      (scan_out[i][S_M[i]-1:0]),
      .int_shift   (scan_en[i]),
      .int_capture (capture[i]),
      .pi_ext      (bus_wdata),
      .pi_core     (func_wdata[i]),
      .po_core     (func_rdata[i]),
      .po_ext
    );
    assign scan_in[i]   = S_MAX'(isi);
    assign test_mode[i] = tm;
  end
endmodule
