// bus_protocol_interface: the functional-bus slave of one core's test
// interface. It turns bus transfers into writes of the input buffer, reads
// of the output buffer and accesses to a small control/status register set,
// and in normal mode passes data transfers on to the core itself.
//
// Registers (word addresses within the slave, see pass_pkg):
//   DATA    write: test mode -> input buffer (waits while the input register
//                  is full, so a packet is one burst of writes);
//                  normal mode -> core functional write.
//           read:  the word from the T/N mux: in test mode the next response
//                  word (waits until one is available); in normal mode the
//                  core's functional output.
//   CTRL    [0] test mode, [1] clear (one-cycle pulse, not stored),
//           [8 +: DIV_BITS] clock divider setting (divide by value + 1).
//   STATUS  read only, supplied by the caller.
//   CAPCNT  read only, number of capture clocks.
// The block is only named in the description; the register map and the
// valid/ready handshake are this design's choices.
//
// Timing: a transfer completes in the cycle where req.valid && rsp.ready;
// read data are valid in that cycle. Register writes act at the next edge.
module bus_protocol_interface
  import pass_pkg::*;
#(
  parameter int unsigned DIV_BITS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fbus_req_t           req,        // valid already qualified by decode
  output fbus_rsp_t           rsp,
  // configuration
  output logic                test_mode,
  output logic                clear,
  output logic [DIV_BITS-1:0] div,
  // input buffer
  output logic                in_wr_valid,
  output logic [W_B-1:0]      in_wr_data,
  input  logic                in_wr_ready,
  // output buffer (through the T/N mux)
  output logic                out_rd,
  input  logic                out_avail,
  input  logic [W_B-1:0]      mux_rdata,
  // core functional port
  output logic                func_wr,
  output logic                func_rd,
  output logic [W_B-1:0]      func_wdata,
  // status
  input  logic [W_B-1:0]      status,
  input  logic [W_B-1:0]      capcnt
);
  reg_sel_e sel;
  logic     is_data, wr_ok;

  assign sel     = reg_sel_e'(req.addr[REG_BITS-1:0]);
  assign is_data = req.valid && (sel == REG_DATA);

  always_comb begin
    rsp.ready = 1'b1;
    rsp.rdata = '0;
    unique case (sel)
      REG_DATA: begin
        if (test_mode) rsp.ready = req.write ? in_wr_ready : out_avail;
        rsp.rdata = mux_rdata;
      end
      REG_CTRL: begin
        rsp.rdata[CTRL_TEST_BIT] = test_mode;
        rsp.rdata[CTRL_DIV_LSB +: DIV_BITS] = div;
      end
      REG_STATUS: rsp.rdata = status;
      REG_CAPCNT: rsp.rdata = capcnt;
      default: ;
    endcase
  end

  assign wr_ok       = req.valid && req.write && rsp.ready;
  assign in_wr_valid = is_data && req.write && test_mode;
  assign in_wr_data  = req.wdata;
  assign out_rd      = is_data && !req.write && test_mode && out_avail;
  assign func_wr     = is_data && req.write && !test_mode;
  assign func_rd     = is_data && !req.write && !test_mode;
  assign func_wdata  = req.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_mode <= 1'b0;
      div       <= '0;
      clear     <= 1'b0;
    end else begin
      clear <= 1'b0;
      if (wr_ok && sel == REG_CTRL) begin
        test_mode <= req.wdata[CTRL_TEST_BIT];
        div       <= req.wdata[CTRL_DIV_LSB +: DIV_BITS];
        clear     <= req.wdata[CTRL_CLEAR_BIT];
      end
    end
  end
endmodule
