// Testbench of apb_datapath.
//
// Random load/clear/complete commands and random request fields are applied
// each cycle; a reference model of the registers predicts PADDR, PWDATA,
// PSTRB and the captured valids. Every slave returns its own random PRDATA,
// PREADY and PSLVERR, and the checks confirm that PSEL is one-hot on
// PADDR[12:10] while psel_en is high (and zero otherwise), that PREADY comes
// from the addressed slave, and that a completed access captures that
// slave's read data and turns its PSLVERR into SLVERR.
module tb_apb_datapath;
  import axi_apb_pkg::*;

  localparam int NS = 8;

  logic pclk = 1'b0, presetn = 1'b0;
  always #50 pclk = ~pclk;

  logic load_wr = 0, load_rd = 0, clear = 0, complete = 0, psel_en = 0;
  logic [31:0] awaddr_s = 0, wdata_s = 0, araddr_s = 0;
  logic [3:0]  wstrb_s = 0;
  logic        awvalid_s = 0, wvalid_s = 0, arvalid_s = 0;
  logic        awvalid_q, wvalid_q, arvalid_q;
  logic [31:0] paddr, pwdata;
  logic [3:0]  pstrb;
  logic [NS-1:0] psel;
  logic [NS-1:0][31:0] prdata_in = '0;
  logic [NS-1:0] pready_in = '0, pslverr_in = '0;
  logic        pready;
  logic [31:0] rdata_q;
  axi_resp_e   resp_q;

  apb_datapath dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] m_addr = 0, m_data = 0, m_rdata = 0;
  logic [3:0]  m_strb = 0;
  logic        m_awv = 0, m_wv = 0, m_arv = 0, m_err = 0;
  int          sel_hits [NS];
  int          n_err = 0;

  initial begin
    int idx;
    for (int i = 0; i < NS; i++) sel_hits[i] = 0;
    repeat (2) @(posedge pclk);
    #10 presetn = 1'b1;
    repeat (20000) begin
      // drive
      idx = $urandom_range(5);
      load_wr  = (idx == 0);
      load_rd  = (idx == 1);
      clear    = (idx == 2);
      complete = ($urandom_range(3) == 0);
      psel_en  = ($urandom_range(1) == 0);
      awaddr_s = $urandom; wdata_s = $urandom; araddr_s = $urandom; wstrb_s = 4'($urandom);
      awvalid_s = 1'($urandom); wvalid_s = 1'($urandom); arvalid_s = 1'($urandom);
      for (int i = 0; i < NS; i++) begin
        prdata_in[i]  = $urandom;
        pready_in[i]  = 1'($urandom);
        pslverr_in[i] = 1'($urandom);
      end
      #1;
      // combinational checks against the current registers
      idx = int'(m_addr[12:10]);
      check(paddr == m_addr && pwdata == m_data && pstrb == m_strb, "address/data registers");
      check(awvalid_q == m_awv && wvalid_q == m_wv && arvalid_q == m_arv, "captured valids");
      check(psel == (psel_en ? NS'(1) << idx : '0), "PSEL decode of PADDR[12:10]");
      check(pready == pready_in[idx], "PREADY from the addressed slave");
      if (psel_en) sel_hits[idx]++;
      // model update for the coming edge
      if (complete) begin
        m_rdata = prdata_in[idx];
        m_err   = pslverr_in[idx];
        if (m_err) n_err++;
      end
      if (load_wr) begin
        m_addr = awaddr_s; m_data = wdata_s; m_strb = wstrb_s;
        m_awv = awvalid_s; m_wv = wvalid_s; m_arv = 0;
      end else if (load_rd) begin
        m_addr = araddr_s; m_data = 0; m_strb = 0;
        m_awv = 0; m_wv = 0; m_arv = arvalid_s;
      end else if (clear) begin
        m_addr = 0; m_data = 0; m_strb = 0; m_awv = 0; m_wv = 0; m_arv = 0;
      end
      @(posedge pclk);
      #10;
      check(rdata_q == m_rdata, "captured read data");
      check(resp_q == (m_err ? RESP_SLVERR : RESP_OKAY), "captured response");
    end
    for (int i = 0; i < NS; i++) check(sel_hits[i] > 0, "every slave selected");
    check(n_err > 0, "PSLVERR captured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
