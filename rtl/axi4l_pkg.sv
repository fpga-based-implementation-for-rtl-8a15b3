// axi4l_pkg: AXI4-Lite channel bundles used by every register block.
//
// The custom accelerators sit on 32-bit AXI4-Lite slave ports (S00_AXI) driven
// by the processor's general-purpose master port through an interconnect. The
// two structs below group the master-to-slave and slave-to-master signals so a
// port is one request and one response. Address and data are 32 bits, the width
// of the processor's general-purpose AXI port; a slave only decodes the low bits
// of the address. No protection or cache signals are carried: AXI4-Lite slaves
// of this kind ignore them.
// The original system names only the S00_AXI ports; the choice of AXI4-Lite
// and these struct bundles belong to this design.
package axi4l_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Master to slave.
  typedef struct packed {
    logic [ADDR_W-1:0] awaddr;
    logic              awvalid;
    logic [DATA_W-1:0] wdata;
    logic [STRB_W-1:0] wstrb;
    logic              wvalid;
    logic              bready;
    logic [ADDR_W-1:0] araddr;
    logic              arvalid;
    logic              rready;
  } axi4l_req_t;

  // Slave to master.
  typedef struct packed {
    logic              awready;
    logic              wready;
    axi_resp_e         bresp;
    logic              bvalid;
    logic              arready;
    logic [DATA_W-1:0] rdata;
    axi_resp_e         rresp;
    logic              rvalid;
  } axi4l_rsp_t;

endpackage
