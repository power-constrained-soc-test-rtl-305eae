// pass_pkg: types and constants shared by the buffer-based SOC test
// architecture, in which test data reach each core over the ordinary
// functional bus instead of a dedicated test access mechanism.
//
// The functional bus is modelled as a generic single-master, word-wide
// request/response bus (the architecture is bus-agnostic: every core sits
// behind a "bus protocol interface"). A transfer happens in the cycle where
// req.valid and rsp.ready are both high; read data are valid in that cycle.
// Each core's test interface occupies four word registers (REG_* below); the
// register map and bus handshake are choices of this design.
package pass_pkg;

  // Bus width w_b. 32 bits is the width the buffer-size study is run at.
  localparam int unsigned W_B    = 32;
  // Byte-free word address: upper bits select the slave, REG_BITS the register.
  localparam int unsigned ADDR_W   = 8;
  localparam int unsigned REG_BITS = 2;

  typedef enum logic [REG_BITS-1:0] {
    REG_DATA   = 2'd0,  // write: test word to input buffer; read: response word
    REG_CTRL   = 2'd1,  // [0] test mode (T/N), [1] clear, [15:8] divide-by minus 1
    REG_STATUS = 2'd2,  // see core_test_interface for the bit layout
    REG_CAPCNT = 2'd3   // number of capture clocks issued since clear
  } reg_sel_e;

  // CTRL register fields
  localparam int unsigned CTRL_TEST_BIT  = 0;
  localparam int unsigned CTRL_CLEAR_BIT = 1;
  localparam int unsigned CTRL_DIV_LSB   = 8;

  typedef struct packed {
    logic              valid;
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [W_B-1:0]    wdata;
  } fbus_req_t;

  typedef struct packed {
    logic           ready;
    logic [W_B-1:0] rdata;
  } fbus_rsp_t;

  // Width of a counter that can hold values 0..n
  function automatic int unsigned cnt_w(int unsigned n);
    return (n < 2) ? 1 : $clog2(n + 1);
  endfunction

endpackage
