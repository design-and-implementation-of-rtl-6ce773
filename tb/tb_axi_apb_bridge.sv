// End-to-end testbench of the AXI4-Lite to APB bridge at its default size.
//
// ACLK runs at 100 MHz and PCLK at 10 MHz, as in the reference system. An
// AXI4-Lite master (tasks below) drives the bridge; eight behavioural APB
// slaves with random wait states sit behind it. Every write is also applied
// to a reference memory and every read is compared with it, including
// slave-error responses from each slave's error window.
//
// It first repeats the two example transfers of the design's timing
// diagrams (0x1F4 written to 0x408, 0xFFFFFFFF read back from 0x400), then
// runs random traffic that exercises: address before data, data before
// address, both together, delayed BREADY and RREADY, APB wait states,
// PSLVERR, all eight slaves, and a write waiting in SETUP_WRITE for its data.
// Each of these is counted and must occur at least once.
// Timing checks: every APB transfer lasts two PCLK cycles plus its wait
// states (setup and access phases), and no AXI transfer takes longer than
// MAX_LAT PCLK cycles.
module tb_axi_apb_bridge;
  import axi_apb_pkg::*;

  localparam int NS      = 8;
  localparam int N_OPS   = 600;
  localparam int MAX_LAT = 24;   // PCLK cycles, request to response

  logic aclk = 1'b0, pclk = 1'b0;
  logic aresetn = 1'b0, presetn = 1'b0;

  always #5 aclk = ~aclk;                         // 100 MHz
  initial begin #3; forever #50 pclk = ~pclk; end // 10 MHz, edges apart from ACLK

  logic [31:0] s_awaddr = '0, s_wdata = '0, s_araddr = '0;
  logic [3:0]  s_wstrb = '0;
  logic        s_awvalid = 1'b0, s_wvalid = 1'b0, s_bready = 1'b0;
  logic        s_arvalid = 1'b0, s_rready = 1'b0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] s_rdata;

  logic [31:0]            paddr, pwdata;
  logic                   pwrite, penable;
  logic [3:0]             pstrb;
  logic [NS-1:0]          psel;
  logic [NS-1:0][31:0]    prdata;
  logic [NS-1:0]          pready, pslverr;

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
  int waits     [NS];
  int xfers     [NS];
  int errs      [NS];

  for (genvar i = 0; i < NS; i++) begin : g_slv
    apb_slave_model #(.ID(i), .MAX_WAIT(3)) u_slv (
      .pclk, .presetn,
      .paddr, .psel(psel[i]), .penable, .pwrite, .pwdata, .pstrb,
      .prdata(prdata[i]), .pready(pready[i]), .pslverr(pslverr[i]),
      .proto_errors(proto_err[i]), .wait_cycles(waits[i]),
      .transfers(xfers[i]), .errors_given(errs[i])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------------
  // reference memory
  logic [31:0] ref_mem [NS][256];
  initial for (int s = 0; s < NS; s++) for (int w = 0; w < 256; w++) ref_mem[s][w] = '0;

  function automatic bit is_err(input logic [31:0] a);
    return a[9:2] >= 8'hF0;
  endfunction

  // ---------------------------------------------------------------------
  // mechanism counters
  int n_wr = 0, n_rd = 0, n_aw_first = 0, n_w_first = 0, n_together = 0;
  int n_bdelay = 0, n_rdelay = 0, n_slverr = 0, n_wait_xfer = 0, n_setup_wait = 0;
  int slave_hit [NS];
  int wr_lat_min = 1 << 30, wr_lat_max = 0, rd_lat_min = 1 << 30, rd_lat_max = 0;
  initial for (int s = 0; s < NS; s++) slave_hit[s] = 0;

  // ---------------------------------------------------------------------
  // APB monitor: transfer length, one-hot select matching the address
  int  apb_len = 0, apb_waits = 0;
  bit  in_xfer = 1'b0;
  always @(posedge pclk) if (presetn) begin
    if (|psel) begin
      if (!in_xfer) begin
        apb_len   = 0;
        apb_waits = 0;
        check($onehot(psel) && psel[paddr[12:10]], "PSEL one-hot and matching PADDR[12:10]");
        check(!penable, "transfer starts with a setup phase");
      end
      in_xfer = 1'b1;
      apb_len++;
      if (penable && !pready[paddr[12:10]]) apb_waits++;
      if (penable && pready[paddr[12:10]]) begin
        check(apb_len == 2 + apb_waits, "APB transfer takes 2 cycles plus wait states");
        if (apb_waits > 0) n_wait_xfer++;
        slave_hit[paddr[12:10]]++;
      end
    end else begin
      in_xfer = 1'b0;
      check(!penable, "PENABLE low outside a transfer");
    end
    if (dut.u_fsm.state_q == ST_SETUP_WRITE && psel == '0) n_setup_wait++;
  end

  // AXI rule: VALID stays high until its handshake
  logic bvalid_prev = 1'b0, rvalid_prev = 1'b0, bhs_prev = 1'b0, rhs_prev = 1'b0;
  always @(posedge aclk) if (aresetn) begin
    if (bvalid_prev && !bhs_prev) check(s_bvalid, "BVALID held until BREADY");
    if (rvalid_prev && !rhs_prev) check(s_rvalid, "RVALID held until RREADY");
    bvalid_prev <= s_bvalid;
    rvalid_prev <= s_rvalid;
    bhs_prev    <= s_bvalid && s_bready;
    rhs_prev    <= s_rvalid && s_rready;
  end

  // ---------------------------------------------------------------------
  // AXI4-Lite master
  task automatic axi_write(input logic [31:0] addr, input logic [31:0] data,
                           input logic [3:0] strb, input int mode, input int bdelay,
                           output logic [1:0] resp, output int lat);
    int t0;
    t0 = 0;
    @(posedge aclk);
    fork
      begin : aw_ch
        if (mode == 2) repeat (40 + $urandom_range(120)) @(posedge aclk);
        s_awaddr  <= addr;
        s_awvalid <= 1'b1;
        do @(negedge aclk); while (!s_awready);
        @(posedge aclk);
        s_awvalid <= 1'b0;
        s_awaddr  <= $urandom;
      end
      begin : w_ch
        if (mode == 1) repeat (40 + $urandom_range(200)) @(posedge aclk);
        s_wdata  <= data;
        s_wstrb  <= strb;
        s_wvalid <= 1'b1;
        do @(negedge aclk); while (!s_wready);
        @(posedge aclk);
        s_wvalid <= 1'b0;
        s_wdata  <= $urandom;
      end
      begin : count_lat
        forever begin @(posedge pclk); t0++; end
      end
    join_any
    // the remaining channel finishes, then the response
    s_bready <= (bdelay == 0);
    do @(negedge aclk); while (!s_bvalid);
    resp = s_bresp;
    if (bdelay > 0) begin
      repeat (bdelay) @(posedge aclk);
      s_bready <= 1'b1;
    end
    @(posedge aclk);
    s_bready <= 1'b0;
    disable fork;
    lat = t0;
  endtask

  task automatic axi_read(input logic [31:0] addr, input int rdelay,
                          output logic [31:0] data, output logic [1:0] resp, output int lat);
    int t0;
    t0 = 0;
    @(posedge aclk);
    fork
      begin
        forever begin @(posedge pclk); t0++; end
      end
    join_none
    s_araddr  <= addr;
    s_arvalid <= 1'b1;
    s_rready  <= (rdelay == 0);
    do @(negedge aclk); while (!s_arready);
    @(posedge aclk);
    s_arvalid <= 1'b0;
    s_araddr  <= $urandom;
    do @(negedge aclk); while (!s_rvalid);
    data = s_rdata;
    resp = s_rresp;
    if (rdelay > 0) begin
      repeat (rdelay) @(posedge aclk);
      s_rready <= 1'b1;
    end
    @(posedge aclk);
    s_rready <= 1'b0;
    disable fork;
    lat = t0;
  endtask

  task automatic do_write(input logic [31:0] addr, input logic [31:0] data,
                          input logic [3:0] strb, input int mode, input int bdelay);
    logic [1:0] resp;
    int         lat, s, w;
    s = int'(addr[12:10]);
    w = int'(addr[9:2]);
    axi_write(addr, data, strb, mode, bdelay, resp, lat);
    n_wr++;
    case (mode)
      0: n_together++;
      1: n_aw_first++;
      default: n_w_first++;
    endcase
    if (bdelay > 0) n_bdelay++;
    if (is_err(addr)) begin
      check(resp == RESP_SLVERR, "write to error window answers SLVERR");
      n_slverr++;
    end else begin
      check(resp == RESP_OKAY, "write answers OKAY");
      for (int b = 0; b < 4; b++) if (strb[b]) ref_mem[s][w][8*b +: 8] = data[8*b +: 8];
    end
    if (mode == 0) begin
      check(lat <= MAX_LAT, "write latency bound");
      if (lat < wr_lat_min) wr_lat_min = lat;
      if (lat > wr_lat_max) wr_lat_max = lat;
    end
  endtask

  task automatic do_read(input logic [31:0] addr, input int rdelay);
    logic [31:0] data, exp;
    logic [1:0]  resp;
    int          lat, s, w;
    s = int'(addr[12:10]);
    w = int'(addr[9:2]);
    axi_read(addr, rdelay, data, resp, lat);
    n_rd++;
    if (rdelay > 0) n_rdelay++;
    if (is_err(addr)) begin
      exp = 32'hDEAD_0000 + 32'(s);
      check(resp == RESP_SLVERR, "read from error window answers SLVERR");
      n_slverr++;
    end else begin
      exp = ref_mem[s][w];
      check(resp == RESP_OKAY, "read answers OKAY");
    end
    check(data == exp, "read data matches reference");
    if (data != exp) $display("  addr %h got %h expected %h", addr, data, exp);
    check(lat <= MAX_LAT, "read latency bound");
    if (lat < rd_lat_min) rd_lat_min = lat;
    if (lat > rd_lat_max) rd_lat_max = lat;
  endtask

  function automatic logic [31:0] rand_addr();
    logic [7:0] w;
    logic [2:0] s;
    s = 3'($urandom_range(NS - 1));
    w = ($urandom_range(9) == 0) ? 8'($urandom_range(255, 240)) : 8'($urandom_range(15));
    return {19'($urandom), s, w, 2'b00};
  endfunction

  // ---------------------------------------------------------------------
  initial begin
    int op;
    repeat (3) @(posedge pclk);
    aresetn = 1'b1;
    presetn = 1'b1;
    repeat (2) @(posedge pclk);

    // the two transfers of the design's timing diagrams
    do_write(32'h0000_0408, 32'h0000_01F4, 4'hF, 0, 0);
    do_write(32'h0000_0400, 32'hFFFF_FFFF, 4'hF, 0, 0);
    do_read (32'h0000_0400, 0);
    do_read (32'h0000_0408, 0);

    for (int i = 0; i < N_OPS; i++) begin
      op = $urandom_range(9);
      if (op < 5)
        do_write(rand_addr(), $urandom, 4'($urandom_range(15, 1)), $urandom_range(2),
                 ($urandom_range(2) == 0) ? $urandom_range(30, 1) : 0);
      else
        do_read(rand_addr(), ($urandom_range(2) == 0) ? $urandom_range(30, 1) : 0);
    end

    // final sweep: every clean word that was touched reads back
    for (int s = 0; s < NS; s++)
      for (int w = 0; w < 16; w++)
        do_read({19'h0, 3'(s), 8'(w), 2'b00}, 0);

    repeat (20) @(posedge pclk);

    for (int s = 0; s < NS; s++) begin
      check(proto_err[s] == 0, "APB slave saw no protocol error");
      check(slave_hit[s] > 0, "every slave selected");
    end
    check(n_wr > 0,         "writes happened");
    check(n_rd > 0,         "reads happened");
    check(n_together > 0,   "address and data together");
    check(n_aw_first > 0,   "address before data");
    check(n_w_first > 0,    "data before address");
    check(n_bdelay > 0,     "delayed BREADY");
    check(n_rdelay > 0,     "delayed RREADY");
    check(n_slverr > 0,     "slave error responses");
    check(n_wait_xfer > 0,  "APB wait states");
    check(n_setup_wait > 0, "write waiting in SETUP_WRITE for its data");
    $display("writes=%0d reads=%0d aw_first=%0d w_first=%0d together=%0d bdelay=%0d rdelay=%0d slverr=%0d wait_xfers=%0d setup_wait_cycles=%0d",
             n_wr, n_rd, n_aw_first, n_w_first, n_together, n_bdelay, n_rdelay, n_slverr,
             n_wait_xfer, n_setup_wait);
    $display("PCLK cycles per transfer: write %0d..%0d, read %0d..%0d",
             wr_lat_min, wr_lat_max, rd_lat_min, rd_lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_OPS * 400 + 20000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("PCLK cycles per transfer: write %0d..%0d, read %0d..%0d",
             wr_lat_min, wr_lat_max, rd_lat_min, rd_lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
