// Directed testbench: the two example transfers of the bridge's timing
// diagrams, replayed on the default bridge at 100 MHz / 10 MHz with slaves
// that insert one wait state, as the diagrams show.
//
//   write: AWADDR = 0x00000408, WDATA = 0x000001F4 (address and data together)
//   read:  ARADDR = 0x00000400, returning 0xFFFFFFFF
//
// A trace with one line per PCLK cycle is printed. Checks, per transfer:
//  - APB: PSEL rises with PENABLE low, the right PADDR and PWRITE (and
//    PWDATA/PSTRB for the write), PENABLE stays high for two cycles (access
//    plus one wait state), PSEL and PENABLE fall together, and the whole APB
//    transfer takes three PCLK cycles;
//  - AXI: the AW/W (AR) handshake happens after PSEL has risen and before
//    BVALID (RVALID), BVALID/RVALID come after PREADY, the response is OKAY
//    and the read returns 0xFFFFFFFF;
//  - the transfer, from VALID to the response handshake, ends within
//    ten PCLK cycles.
module tb_axi_apb_bridge_diagrams;
  import axi_apb_pkg::*;

  localparam int NS = 8;

  logic aclk = 1'b0, pclk = 1'b0;
  logic aresetn = 1'b0, presetn = 1'b0;
  always #5 aclk = ~aclk;                          // 100 MHz
  initial begin #3; forever #50 pclk = ~pclk; end  // 10 MHz

  logic [31:0] s_awaddr = '0, s_wdata = '0, s_araddr = '0;
  logic [3:0]  s_wstrb = '0;
  logic        s_awvalid = 1'b0, s_wvalid = 1'b0, s_bready = 1'b0;
  logic        s_arvalid = 1'b0, s_rready = 1'b0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] s_rdata;

  logic [31:0]         paddr, pwdata;
  logic                pwrite, penable;
  logic [3:0]          pstrb;
  logic [NS-1:0]       psel;
  logic [NS-1:0][31:0] prdata;
  logic [NS-1:0]       pready, pslverr;

  axi_apb_bridge dut (
    .aclk, .aresetn,
    .s_awaddr, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready,
    .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .pclk, .presetn,
    .paddr, .pwrite, .psel, .penable, .pwdata, .pstrb,
    .prdata, .pready, .pslverr
  );

  int proto_err [NS];
  int unused_cnt [NS][3];
  for (genvar i = 0; i < NS; i++) begin : g_slv
    apb_slave_model #(.ID(i), .FIX_WAIT(1)) u_slv (
      .pclk, .presetn,
      .paddr, .psel(psel[i]), .penable, .pwrite, .pwdata, .pstrb,
      .prdata(prdata[i]), .pready(pready[i]), .pslverr(pslverr[i]),
      .proto_errors(proto_err[i]), .wait_cycles(unused_cnt[i][0]),
      .transfers(unused_cnt[i][1]), .errors_given(unused_cnt[i][2])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------------
  // event times, in PCLK cycles since the transfer started
  int  cyc = 0;
  bit  tracing = 0;
  int  t_psel_rise, t_psel_fall, t_pen_rise, t_pen_fall, t_pready, t_req_hs, t_resp_valid, t_resp_hs;
  bit  prev_psel, prev_pen;
  string axi_ev;

  task automatic clear_marks();
    t_psel_rise = -1; t_psel_fall = -1; t_pen_rise = -1; t_pen_fall = -1;
    t_pready = -1; t_req_hs = -1; t_resp_valid = -1; t_resp_hs = -1;
    prev_psel = 0; prev_pen = 0; cyc = 0; axi_ev = "";
  endtask

  // AXI-side events, sampled on ACLK and reported in the current PCLK cycle
  always @(negedge aclk) if (tracing) begin
    if ((s_awvalid && s_awready) || (s_arvalid && s_arready)) begin
      if (t_req_hs < 0) t_req_hs = cyc;
      axi_ev = {axi_ev, s_arready ? " ARREADY" : " AWREADY+WREADY"};
    end
    if ((s_bvalid || s_rvalid) && t_resp_valid < 0) begin
      t_resp_valid = cyc;
      axi_ev = {axi_ev, s_bvalid ? " BVALID" : " RVALID"};
    end
    if (((s_bvalid && s_bready) || (s_rvalid && s_rready)) && t_resp_hs < 0) begin
      t_resp_hs = cyc;
      axi_ev = {axi_ev, " response-handshake"};
    end
  end

  // APB side, one trace line per PCLK cycle
  always @(posedge pclk) if (tracing) begin
    #1;
    cyc++;
    if (|psel && !prev_psel) t_psel_rise = cyc;
    if (!(|psel) && prev_psel) t_psel_fall = cyc;
    if (penable && !prev_pen) t_pen_rise = cyc;
    if (!penable && prev_pen) t_pen_fall = cyc;
    if (penable && pready[1] && t_pready < 0) t_pready = cyc;
    $display("  %2d  %-13s PADDR=%h PWRITE=%b PSEL=%b PENABLE=%b PWDATA=%h PRDATA=%h PREADY=%b |%s",
             cyc, dut.u_fsm.state_q.name(), paddr, pwrite, psel, penable, pwdata, prdata[1],
             pready[1], axi_ev);
    axi_ev = "";
    prev_psel = |psel;
    prev_pen  = penable;
  end

  task automatic check_apb(input string what);
    check(t_psel_rise > 0 && t_pen_rise == t_psel_rise + 1, {what, ": setup phase of one cycle"});
    check(t_pen_fall == t_pen_rise + 2, {what, ": access of two cycles (one wait state)"});
    check(t_psel_fall == t_pen_fall, {what, ": PSEL and PENABLE fall together"});
    check(t_psel_fall - t_psel_rise == 3, {what, ": APB transfer of three PCLK cycles"});
    check(t_pready == t_pen_rise + 1, {what, ": PREADY after one wait state"});
    check(t_req_hs >= t_psel_rise && t_req_hs <= t_resp_valid, {what, ": request handshake after PSEL, before response"});
    check(t_resp_valid >= t_pready, {what, ": response after PREADY"});
    check(t_resp_hs > 0 && t_resp_hs <= 10, {what, ": done within ten PCLK cycles"});
  endtask

  // setup-phase values seen on the bus
  logic [31:0] setup_addr, setup_data;
  logic        setup_write;
  logic [3:0]  setup_strb;
  always @(posedge pclk) if (tracing && |psel && !penable) begin
    setup_addr = paddr; setup_data = pwdata; setup_write = pwrite; setup_strb = pstrb;
  end

  initial begin
    repeat (3) @(posedge pclk);
    aresetn = 1'b1;
    presetn = 1'b1;
    // preload 0xFFFFFFFF at 0x400 through the bridge (not traced)
    @(posedge aclk);
    s_awaddr <= 32'h400; s_wdata <= 32'hFFFF_FFFF; s_wstrb <= 4'hF;
    s_awvalid <= 1; s_wvalid <= 1; s_bready <= 1;
    do @(negedge aclk); while (!s_awready);
    @(posedge aclk); s_awvalid <= 0; s_wvalid <= 0;
    do @(negedge aclk); while (!s_bvalid);
    @(posedge aclk); s_bready <= 0;
    repeat (5) @(posedge pclk);

    // ---- write of the diagram
    $display("write 0x000001F4 to 0x00000408 (cycle, FSM state, APB bus | AXI events)");
    @(posedge pclk); #2;
    clear_marks(); tracing = 1;
    s_awaddr <= 32'h408; s_wdata <= 32'h1F4; s_wstrb <= 4'hF;
    s_awvalid <= 1; s_wvalid <= 1; s_bready <= 1;
    do @(negedge aclk); while (!s_awready);
    @(posedge aclk); s_awvalid <= 0; s_wvalid <= 0;
    do @(negedge aclk); while (!s_bvalid);
    check(s_bresp == RESP_OKAY, "write: BRESP OKAY");
    @(posedge aclk); s_bready <= 0;
    repeat (2) @(posedge pclk);
    #2 tracing = 0;
    check_apb("write");
    check(setup_addr == 32'h408 && setup_write && setup_data == 32'h1F4 && setup_strb == 4'hF,
          "write: PADDR/PWRITE/PWDATA/PSTRB in setup");
    check(g_slv[1].u_slv.mem[2] == 32'h1F4, "write: slave 1 holds 0x1F4 at 0x408");

    // ---- read of the diagram
    $display("read 0x00000400 (cycle, FSM state, APB bus | AXI events)");
    @(posedge pclk); #2;
    clear_marks(); tracing = 1;
    s_araddr <= 32'h400; s_arvalid <= 1; s_rready <= 1;
    do @(negedge aclk); while (!s_arready);
    @(posedge aclk); s_arvalid <= 0;
    do @(negedge aclk); while (!s_rvalid);
    check(s_rresp == RESP_OKAY, "read: RRESP OKAY");
    check(s_rdata == 32'hFFFF_FFFF, "read: RDATA 0xFFFFFFFF");
    @(posedge aclk); s_rready <= 0;
    repeat (2) @(posedge pclk);
    #2 tracing = 0;
    check_apb("read");
    check(setup_addr == 32'h400 && !setup_write, "read: PADDR/PWRITE in setup");

    for (int i = 0; i < NS; i++) check(proto_err[i] == 0, "no APB protocol error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
