// Shared types and constants of the AXI4-Lite to APB bridge.
//
// The bridge moves single 32-bit transfers from an AXI4-Lite slave port,
// clocked by ACLK, to an APB (AMBA 4) master port, clocked by a slower PCLK.
// This package holds the bus widths, the number of APB slaves, the encoding
// of the transaction-control FSM states and the AXI response codes, so that
// the FSM, the data-path and the testbenches agree on them.
//
// The six state names follow the bridge's transaction FSM. The bus widths
// (32-bit address and data) and the eight APB slaves follow the design;
// the binary state encoding and the response codes OKAY/SLVERR
// are this implementation's choice (the codes are the AMBA ones).
package axi_apb_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned STRB_W     = DATA_W / 8;
  localparam int unsigned NUM_SLAVES = 8;

  // States of the transaction-control FSM.
  typedef enum logic [2:0] {
    ST_IDLE         = 3'd0,
    ST_IDLE_WRITE   = 3'd1,
    ST_SETUP_WRITE  = 3'd2,
    ST_ACCESS_WRITE = 3'd3,
    ST_SETUP_READ   = 3'd4,
    ST_ACCESS_READ  = 3'd5
  } fsm_state_e;

  // AXI4-Lite response codes (BRESP / RRESP).
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_SLVERR = 2'b10
  } axi_resp_e;

  // Everything that crosses from the AXI clock domain to the APB clock
  // domain: the request channels as levels, and the "handshake done" levels
  // of the B and R channels.
  typedef struct packed {
    logic              awvalid;
    logic [ADDR_W-1:0] awaddr;
    logic              wvalid;
    logic [DATA_W-1:0] wdata;
    logic [STRB_W-1:0] wstrb;
    logic              arvalid;
    logic [ADDR_W-1:0] araddr;
    logic              bdone;
    logic              rdone;
  } axi_req_t;

  // Everything that crosses from the APB clock domain back to the AXI clock
  // domain: permission to accept the request, the response levels, the
  // response code and the read data.
  typedef struct packed {
    logic              wr_accept;
    logic              rd_accept;
    logic              bvalid;
    logic              rvalid;
    axi_resp_e         resp;
    logic [DATA_W-1:0] rdata;
  } apb_rsp_t;

endpackage
