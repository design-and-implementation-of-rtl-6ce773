// AXI4-Lite slave interface of the AXI4-Lite to APB bridge (ACLK domain).
//
// The bridge's transaction FSM runs on the slower APB clock and talks to the
// AXI side only through synchronized levels. This block turns those levels
// into correct AXI4-Lite handshakes on ACLK:
//   AW/W/AR  The request channels go to the synchronizer as they are; the
//            master holds VALID, address and data until its handshake. When
//            the FSM's wr_accept (rd_accept) level rises, AWREADY and WREADY
//            (ARREADY) are pulsed high for exactly one ACLK cycle.
//   B / R    When the FSM's bvalid (rvalid) level is high and the AW/W (AR)
//            handshake of the transfer has already taken place, BVALID
//            (RVALID) is set together with BRESP (RRESP, RDATA) and held
//            until the master's BREADY (RREADY). The completed handshake is
//            reported back as the bdone (rdone) level, which stays high
//            until the FSM drops its response level. Requiring the earlier
//            request handshake keeps the AXI ordering rule even when both
//            levels cross the clock boundary in the same cycle.
// One transfer is in flight at a time; AXI writes and reads are therefore
// never outstanding together inside the bridge.
//
// Timing: AWREADY/WREADY/ARREADY are registered at the first ACLK edge that
// sees the accept level; BVALID/RVALID at the first edge that sees the
// response level, but no earlier than the edge after the request handshake.
//
// The bridge description names this interface but does not give its insides;
// the edge-to-pulse conversion and the done levels are this implementation's
// way of keeping the four-phase level exchange with the APB-clock FSM.
module axi_slave_port
  import axi_apb_pkg::*;
(
  input  logic              aclk,
  input  logic              aresetn,
  // AXI4-Lite write address channel
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  // write data channel
  input  logic [DATA_W-1:0] s_wdata,
  input  logic [STRB_W-1:0] s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  // write response channel
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  // read address channel
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  // read data channel
  output logic [DATA_W-1:0] s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // to and from the synchronizer bus
  output axi_req_t          req_a,
  input  apb_rsp_t          rsp_a
);

  logic wr_acc_d, rd_acc_d;
  logic bv_taken_q, rv_taken_q;   // response level already turned into VALID
  logic aw_done_q, ar_done_q;     // request handshake of this transfer done
  logic bdone_q, rdone_q;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      wr_acc_d   <= 1'b0;
      rd_acc_d   <= 1'b0;
      bv_taken_q <= 1'b0;
      rv_taken_q <= 1'b0;
      aw_done_q  <= 1'b0;
      ar_done_q  <= 1'b0;
      s_awready <= 1'b0;
      s_wready  <= 1'b0;
      s_arready <= 1'b0;
      s_bvalid  <= 1'b0;
      s_bresp   <= RESP_OKAY;
      s_rvalid  <= 1'b0;
      s_rresp   <= RESP_OKAY;
      s_rdata   <= '0;
      bdone_q   <= 1'b0;
      rdone_q   <= 1'b0;
    end else begin
      wr_acc_d  <= rsp_a.wr_accept;
      rd_acc_d  <= rsp_a.rd_accept;

      s_awready <= rsp_a.wr_accept && !wr_acc_d;
      s_wready  <= rsp_a.wr_accept && !wr_acc_d;
      s_arready <= rsp_a.rd_accept && !rd_acc_d;

      // write response: only after this transfer's AW/W handshake
      if (s_awready && s_awvalid) aw_done_q <= 1'b1;
      if (rsp_a.bvalid && !bv_taken_q && aw_done_q) begin
        s_bvalid   <= 1'b1;
        s_bresp    <= rsp_a.resp;
        bv_taken_q <= 1'b1;
      end else if (s_bvalid && s_bready) begin
        s_bvalid   <= 1'b0;
        aw_done_q  <= 1'b0;
      end
      if (!rsp_a.bvalid) bv_taken_q <= 1'b0;
      if (s_bvalid && s_bready) bdone_q <= 1'b1;
      else if (!rsp_a.bvalid)   bdone_q <= 1'b0;

      // read response: only after this transfer's AR handshake
      if (s_arready && s_arvalid) ar_done_q <= 1'b1;
      if (rsp_a.rvalid && !rv_taken_q && ar_done_q) begin
        s_rvalid   <= 1'b1;
        s_rresp    <= rsp_a.resp;
        s_rdata    <= rsp_a.rdata;
        rv_taken_q <= 1'b1;
      end else if (s_rvalid && s_rready) begin
        s_rvalid   <= 1'b0;
        ar_done_q  <= 1'b0;
      end
      if (!rsp_a.rvalid) rv_taken_q <= 1'b0;
      if (s_rvalid && s_rready) rdone_q <= 1'b1;
      else if (!rsp_a.rvalid)   rdone_q <= 1'b0;
    end
  end

  always_comb begin
    req_a         = '0;
    req_a.awvalid = s_awvalid;
    req_a.awaddr  = s_awaddr;
    req_a.wvalid  = s_wvalid;
    req_a.wdata   = s_wdata;
    req_a.wstrb   = s_wstrb;
    req_a.arvalid = s_arvalid;
    req_a.araddr  = s_araddr;
    req_a.bdone   = bdone_q;
    req_a.rdone   = rdone_q;
  end

  // The bridge accepts a request only while the master offers it.
  a_aw_offered: assert property (@(posedge aclk) disable iff (!aresetn)
    s_awready |-> (s_awvalid && s_wvalid));
  a_ar_offered: assert property (@(posedge aclk) disable iff (!aresetn)
    s_arready |-> s_arvalid);

endmodule
