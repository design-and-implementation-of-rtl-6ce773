// Testbench of axi_slave_port, the ACLK side of the bridge.
//
// It plays the part of the APB-clock FSM (the synchronized accept and
// response levels) and of an AXI4-Lite master, for many write and read
// transfers with random delays. Checks:
//  - the request fields reach the synchronizer unchanged;
//  - AWREADY and WREADY (ARREADY) rise at the first ACLK edge that sees the
//    accept level and stay high for exactly one cycle, however long the
//    level stays high;
//  - BVALID (RVALID) rises at the first edge that sees the response level,
//    carries the
//    response code (and the read data present at that moment), and stays
//    high until BREADY (RREADY);
//  - the done level rises with the handshake and falls at the first edge
//    that sees the response level low.
module tb_axi_slave_port;
  import axi_apb_pkg::*;

  logic aclk = 1'b0, aresetn = 1'b0;
  always #5 aclk = ~aclk;

  logic [31:0] s_awaddr = 0, s_wdata = 0, s_araddr = 0, s_rdata;
  logic [3:0]  s_wstrb = 0;
  logic        s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  axi_req_t    req_a;
  apb_rsp_t    rsp_a = '0;

  axi_slave_port dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // count READY pulses
  int aw_pulses = 0, w_pulses = 0, ar_pulses = 0;
  always @(negedge aclk) begin
    if (s_awready) aw_pulses++;
    if (s_wready)  w_pulses++;
    if (s_arready) ar_pulses++;
  end

  task automatic tick(); @(posedge aclk); #1; endtask

  task automatic write_xfer(input axi_resp_e resp, input int hold, input int bdelay);
    logic [31:0] a, d;
    logic [3:0]  st;
    int          p0;
    a = $urandom; d = $urandom; st = 4'($urandom);
    s_awaddr = a; s_wdata = d; s_wstrb = st; s_awvalid = 1; s_wvalid = 1;
    #1 check(req_a.awvalid && req_a.wvalid && req_a.awaddr == a && req_a.wdata == d &&
             req_a.wstrb == st, "write request reaches the synchronizer");
    repeat ($urandom_range(5)) tick();
    p0 = aw_pulses;
    rsp_a.wr_accept = 1;
    tick(); check(s_awready && s_wready, "AWREADY/WREADY at the first edge after the level");
    tick(); check(!s_awready && !s_wready, "AWREADY/WREADY high for one cycle");
    s_awvalid = 0; s_wvalid = 0;                 // handshake done at that edge
    repeat (hold) tick();
    check(aw_pulses == p0 + 1 && w_pulses == p0 + 1, "exactly one READY pulse");
    rsp_a.resp = resp;
    rsp_a.bvalid = 1;
    tick(); check(s_bvalid && s_bresp == resp, "BVALID with BRESP at the first edge");
    rsp_a.resp = RESP_OKAY;
    repeat (bdelay) begin
      tick(); check(s_bvalid && s_bresp == resp && !req_a.bdone, "BVALID held until BREADY");
    end
    s_bready = 1;
    tick(); s_bready = 0;
    #1 check(!s_bvalid && req_a.bdone, "handshake clears BVALID and raises done");
    repeat ($urandom_range(4)) begin tick(); check(req_a.bdone, "done held while bvalid level"); end
    rsp_a.bvalid = 0; rsp_a.wr_accept = 0;
    tick(); check(!req_a.bdone, "done falls at the first edge after the level");
  endtask

  task automatic read_xfer(input axi_resp_e resp, input int hold, input int rdelay);
    logic [31:0] a, d;
    int          p0;
    a = $urandom; d = $urandom;
    s_araddr = a; s_arvalid = 1;
    #1 check(req_a.arvalid && req_a.araddr == a, "read request reaches the synchronizer");
    repeat ($urandom_range(5)) tick();
    p0 = ar_pulses;
    rsp_a.rd_accept = 1;
    tick(); check(s_arready, "ARREADY at the first edge after the level");
    tick(); check(!s_arready, "ARREADY high for one cycle");
    s_arvalid = 0;
    repeat (hold) tick();
    check(ar_pulses == p0 + 1, "exactly one ARREADY pulse");
    rsp_a.resp = resp; rsp_a.rdata = d; rsp_a.rvalid = 1;
    tick(); check(s_rvalid && s_rresp == resp && s_rdata == d, "RVALID with RDATA/RRESP");
    rsp_a.rdata = ~d; rsp_a.resp = RESP_OKAY;
    repeat (rdelay) begin
      tick(); check(s_rvalid && s_rdata == d && !req_a.rdone, "RVALID and RDATA held until RREADY");
    end
    s_rready = 1;
    tick(); s_rready = 0;
    #1 check(!s_rvalid && req_a.rdone, "handshake clears RVALID and raises done");
    rsp_a.rvalid = 0; rsp_a.rd_accept = 0;
    tick(); tick(); check(!req_a.rdone, "done falls after the level");
  endtask

  initial begin
    repeat (3) @(posedge aclk);
    #1 aresetn = 1;
    tick();
    check(!s_awready && !s_wready && !s_arready && !s_bvalid && !s_rvalid, "quiet after reset");
    repeat (300) begin
      if ($urandom_range(1))
        write_xfer($urandom_range(1) ? RESP_SLVERR : RESP_OKAY, $urandom_range(12), $urandom_range(6));
      else
        read_xfer($urandom_range(1) ? RESP_SLVERR : RESP_OKAY, $urandom_range(12), $urandom_range(6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
