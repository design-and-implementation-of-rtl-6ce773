// Synchronizer bus of the AXI4-Lite to APB bridge.
//
// Every signal that passes between the AXI clock (ACLK) and the APB clock
// (PCLK) goes through one synchronizer per direction, chosen by which clock
// is faster:
//   source clock faster than destination -> sync_fast_to_slow
//   source clock slower than destination -> sync_slow_to_fast
// With ACLK_FASTER = 1 (100 MHz AXI, 10 MHz APB) the request bundle uses the
// fast-to-slow circuit and the response bundle the slow-to-fast circuit;
// with ACLK_FASTER = 0 the two are swapped.
//
// Each bundle is a packed struct that moves through one synchronizer as a
// single word, so the valid levels and the address or data that go with
// them always arrive in the same destination cycle.
//
// Interface: req_a is sampled on aclk and appears as req_p on pclk; rsp_p is
// sampled on pclk and appears as rsp_a on aclk. Latency is that of the
// synchronizer used (about two slow-clock periods).
//
// Synchronizing every crossing signal, and choosing the circuit by the ratio
// of the two clocks, follows the bridge description. Grouping the signals
// into two words is this implementation's choice.
module apb_sync_bus
  import axi_apb_pkg::*;
#(
  parameter bit ACLK_FASTER = 1'b1
) (
  input  logic     aclk,
  input  logic     aresetn,
  input  logic     pclk,
  input  logic     presetn,
  input  axi_req_t req_a,
  output axi_req_t req_p,
  input  apb_rsp_t rsp_p,
  output apb_rsp_t rsp_a
);

  localparam int unsigned REQ_W = $bits(axi_req_t);
  localparam int unsigned RSP_W = $bits(apb_rsp_t);

  logic [REQ_W-1:0] req_bits;
  logic [RSP_W-1:0] rsp_bits;

  if (ACLK_FASTER) begin : g_aclk_fast
    sync_fast_to_slow #(.WIDTH(REQ_W)) u_req (
      .clk_src(aclk), .rst_src_n(aresetn), .clk_dst(pclk), .rst_dst_n(presetn),
      .data_in(req_a), .data_out(req_bits));
    sync_slow_to_fast #(.WIDTH(RSP_W)) u_rsp (
      .clk_src(pclk), .rst_src_n(presetn), .clk_dst(aclk), .rst_dst_n(aresetn),
      .data_in(rsp_p), .data_out(rsp_bits));
  end else begin : g_pclk_fast
    sync_slow_to_fast #(.WIDTH(REQ_W)) u_req (
      .clk_src(aclk), .rst_src_n(aresetn), .clk_dst(pclk), .rst_dst_n(presetn),
      .data_in(req_a), .data_out(req_bits));
    sync_fast_to_slow #(.WIDTH(RSP_W)) u_rsp (
      .clk_src(pclk), .rst_src_n(presetn), .clk_dst(aclk), .rst_dst_n(aresetn),
      .data_in(rsp_p), .data_out(rsp_bits));
  end

  assign req_p = axi_req_t'(req_bits);
  assign rsp_a = apb_rsp_t'(rsp_bits);

endmodule
