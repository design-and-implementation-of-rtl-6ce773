// AXI4-Lite to APB bridge, top level.
//
// The bridge lets an AXI4-Lite master running on a fast clock (ACLK, 100 MHz
// in the reference system) reach up to eight low-power APB peripherals on a
// slow clock (PCLK, 10 MHz). It is an AXI4-Lite slave on one side and an APB
// master on the other and carries one single-beat 32-bit transfer at a time.
//
// Structure:
//   axi_slave_port  ACLK  AXI4-Lite handshakes, B/R response registers
//   apb_sync_bus    both  synchronizers for every signal between the clocks
//   apb_fsm         PCLK  six-state transaction control FSM
//   apb_datapath    PCLK  PADDR/PWDATA/PSTRB registers, slave decode,
//                         return multiplexer, read-data capture
//
// A write: AWVALID (and WVALID) cross to PCLK; the FSM goes through
// IDLE_WRITE and SETUP_WRITE (PSEL), then ACCESS_WRITE (PSEL, PENABLE) while
// the AXI side pulses AWREADY/WREADY; when the slave gives PREADY the FSM
// raises its response level, the AXI side presents BVALID/BRESP and, after
// BREADY, reports back so the FSM returns to IDLE. A read follows the same
// path through SETUP_READ and ACCESS_READ, returning RDATA/RRESP.
// PSLVERR of the slave becomes SLVERR on BRESP/RRESP.
//
// APB slave n is selected by PADDR[SEL_LSB +: 3] = n. The slave-side ports
// are plain arrays indexed by slave number.
//
// The partitioning into FSM, data-path and synchronizer bus, the two clocks,
// the eight slaves and the 32-bit buses follow the bridge description; the
// AXI-side handshake logic, the address decode bits and the error mapping
// are this implementation's choices.
module axi_apb_bridge
  import axi_apb_pkg::*;
#(
  parameter int unsigned NSLV        = NUM_SLAVES,
  parameter int unsigned SEL_LSB     = 10,
  parameter bit          ACLK_FASTER = 1'b1
) (
  // AXI4-Lite slave port (ACLK domain)
  input  logic                        aclk,
  input  logic                        aresetn,
  input  logic [ADDR_W-1:0]           s_awaddr,
  input  logic                        s_awvalid,
  output logic                        s_awready,
  input  logic [DATA_W-1:0]           s_wdata,
  input  logic [STRB_W-1:0]           s_wstrb,
  input  logic                        s_wvalid,
  output logic                        s_wready,
  output logic [1:0]                  s_bresp,
  output logic                        s_bvalid,
  input  logic                        s_bready,
  input  logic [ADDR_W-1:0]           s_araddr,
  input  logic                        s_arvalid,
  output logic                        s_arready,
  output logic [DATA_W-1:0]           s_rdata,
  output logic [1:0]                  s_rresp,
  output logic                        s_rvalid,
  input  logic                        s_rready,
  // APB master port (PCLK domain)
  input  logic                        pclk,
  input  logic                        presetn,
  output logic [ADDR_W-1:0]           paddr,
  output logic                        pwrite,
  output logic [NSLV-1:0]             psel,
  output logic                        penable,
  output logic [DATA_W-1:0]           pwdata,
  output logic [STRB_W-1:0]           pstrb,
  input  logic [NSLV-1:0][DATA_W-1:0] prdata,
  input  logic [NSLV-1:0]             pready,
  input  logic [NSLV-1:0]             pslverr
);

  axi_req_t   req_a, req_p;
  apb_rsp_t   rsp_a, rsp_p;

  logic       load_wr, load_rd, clear, complete, psel_en;
  logic       wr_accept, rd_accept, bvalid_l, rvalid_l;
  logic       awvalid_q, wvalid_q, arvalid_q;
  logic       pready_sel;
  logic [DATA_W-1:0] rdata_q;
  axi_resp_e  resp_q;

  axi_slave_port u_axi (
    .aclk, .aresetn,
    .s_awaddr, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready,
    .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .req_a, .rsp_a
  );

  apb_sync_bus #(.ACLK_FASTER(ACLK_FASTER)) u_sync (
    .aclk, .aresetn, .pclk, .presetn,
    .req_a, .req_p, .rsp_p, .rsp_a
  );

  apb_fsm u_fsm (
    .pclk, .presetn,
    .awvalid_s (req_p.awvalid),
    .wvalid_s  (req_p.wvalid),
    .arvalid_s (req_p.arvalid),
    .bready_s  (req_p.bdone),
    .rready_s  (req_p.rdone),
    .awvalid_q, .wvalid_q, .arvalid_q,
    .pready    (pready_sel),
    .state     (),
    .load_wr, .load_rd, .clear, .complete,
    .psel_en, .penable, .pwrite,
    .wr_accept, .rd_accept,
    .bvalid    (bvalid_l),
    .rvalid    (rvalid_l)
  );

  apb_datapath #(.NSLV(NSLV), .SEL_LSB(SEL_LSB)) u_dp (
    .pclk, .presetn,
    .load_wr, .load_rd, .clear, .complete, .psel_en,
    .awaddr_s  (req_p.awaddr),
    .awvalid_s (req_p.awvalid),
    .wdata_s   (req_p.wdata),
    .wstrb_s   (req_p.wstrb),
    .wvalid_s  (req_p.wvalid),
    .araddr_s  (req_p.araddr),
    .arvalid_s (req_p.arvalid),
    .awvalid_q, .wvalid_q, .arvalid_q,
    .paddr, .pwdata, .pstrb, .psel,
    .prdata_in  (prdata),
    .pready_in  (pready),
    .pslverr_in (pslverr),
    .pready     (pready_sel),
    .rdata_q, .resp_q
  );

  always_comb begin
    rsp_p           = '0;
    rsp_p.wr_accept = wr_accept;
    rsp_p.rd_accept = rd_accept;
    rsp_p.bvalid    = bvalid_l;
    rsp_p.rvalid    = rvalid_l;
    rsp_p.resp      = resp_q;
    rsp_p.rdata     = rdata_q;
  end

endmodule
