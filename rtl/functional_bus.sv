// functional_bus: the single shared functional bus that connects the
// embedded processor (the only master during test) to every core.
//
// The upper address bits select one of N_SLAVES slaves, the lower REG_BITS
// a register in it. The request is broadcast with valid qualified by the
// decode; the response comes back from the selected slave. An address with
// no slave behind it completes at once and reads as zero. The decode and the
// request/response bus are this design's choices; the description only
// assumes one shared bus reaching every module.
//
// Timing: purely combinational; a transfer completes in the cycle where the
// master's valid and the returned ready are both high.
module functional_bus
  import pass_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4
) (
  input  fbus_req_t m_req,
  output fbus_rsp_t m_rsp,
  output fbus_req_t s_req [N_SLAVES],
  input  fbus_rsp_t s_rsp [N_SLAVES]
);
  localparam int unsigned SEL_W = ADDR_W - REG_BITS;
  logic [SEL_W-1:0] sel;
  assign sel = m_req.addr[ADDR_W-1:REG_BITS];

  always_comb begin
    m_rsp = '{ready: 1'b1, rdata: '0};
    for (int i = 0; i < N_SLAVES; i++) begin
      s_req[i]       = m_req;
      s_req[i].valid = m_req.valid && (sel == SEL_W'(i));
      if (sel == SEL_W'(i)) m_rsp = s_rsp[i];
    end
  end
endmodule
