// APB-side data-path of the AXI4-Lite to APB bridge (PCLK domain).
//
// It holds the APB transfer registers (PADDR, PWDATA, PSTRB) and, with them,
// the AXI valid bits that arrived together with the address and data, so the
// FSM can tell that what it is about to send to the slave is complete. It
// decodes PADDR into one of NUM_SLAVES select lines, routes PRDATA, PREADY and
// PSLVERR of the addressed slave back to the bridge, and captures the read
// data and the error flag when the access phase ends.
//
// Operation, driven by the FSM:
//   load_wr   PADDR <= awaddr, PWDATA <= wdata, PSTRB <= wstrb (with valids)
//   load_rd   PADDR <= araddr, PWDATA/PSTRB <= 0               (with valid)
//   clear     address, data, strobes and valids return to zero
//   complete  rdata_q <= PRDATA of the addressed slave, err_q <= its PSLVERR
// Slave selection: PADDR[SEL_LSB +: log2(NUM_SLAVES)] is the slave number,
// so with the default SEL_LSB = 10 every slave owns a 1 KiB window that
// repeats every NUM_SLAVES KiB. psel is one-hot while psel_en is high.
// Return path: an AND-OR multiplexer selected by the same slave number.
//
// The design's count of eight APB slaves, the 32-bit bus and selecting the
// peripheral from the address follow the bridge description. The bridge
// description selects the return signals with tristate buffers enabled only
// during a transfer; this implementation uses a multiplexer, which has the
// same function inside a chip. The address bits used for the slave number,
// the zeroing of the bus between transfers and the error capture are this
// implementation's choices.
module apb_datapath
  import axi_apb_pkg::*;
#(
  parameter int unsigned NSLV    = NUM_SLAVES,
  parameter int unsigned SEL_LSB = 10
) (
  input  logic                        pclk,
  input  logic                        presetn,
  // control from the FSM
  input  logic                        load_wr,
  input  logic                        load_rd,
  input  logic                        clear,
  input  logic                        complete,
  input  logic                        psel_en,
  // synchronized AXI request fields
  input  logic [ADDR_W-1:0]           awaddr_s,
  input  logic                        awvalid_s,
  input  logic [DATA_W-1:0]           wdata_s,
  input  logic [STRB_W-1:0]           wstrb_s,
  input  logic                        wvalid_s,
  input  logic [ADDR_W-1:0]           araddr_s,
  input  logic                        arvalid_s,
  // captured valids for the FSM
  output logic                        awvalid_q,
  output logic                        wvalid_q,
  output logic                        arvalid_q,
  // APB master outputs
  output logic [ADDR_W-1:0]           paddr,
  output logic [DATA_W-1:0]           pwdata,
  output logic [STRB_W-1:0]           pstrb,
  output logic [NSLV-1:0]             psel,
  // APB slave returns
  input  logic [NSLV-1:0][DATA_W-1:0] prdata_in,
  input  logic [NSLV-1:0]             pready_in,
  input  logic [NSLV-1:0]             pslverr_in,
  // to the FSM and the AXI side
  output logic                        pready,
  output logic [DATA_W-1:0]           rdata_q,
  output axi_resp_e                   resp_q
);

  localparam int unsigned IDX_W = (NSLV > 1) ? $clog2(NSLV) : 1;

  logic [IDX_W-1:0]  slv_idx;
  logic [DATA_W-1:0] prdata_sel;
  logic              pslverr_sel;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      paddr     <= '0;
      pwdata    <= '0;
      pstrb     <= '0;
      awvalid_q <= 1'b0;
      wvalid_q  <= 1'b0;
      arvalid_q <= 1'b0;
    end else if (load_wr) begin
      paddr     <= awaddr_s;
      pwdata    <= wdata_s;
      pstrb     <= wstrb_s;
      awvalid_q <= awvalid_s;
      wvalid_q  <= wvalid_s;
      arvalid_q <= 1'b0;
    end else if (load_rd) begin
      paddr     <= araddr_s;
      pwdata    <= '0;
      pstrb     <= '0;
      awvalid_q <= 1'b0;
      wvalid_q  <= 1'b0;
      arvalid_q <= arvalid_s;
    end else if (clear) begin
      paddr     <= '0;
      pwdata    <= '0;
      pstrb     <= '0;
      awvalid_q <= 1'b0;
      wvalid_q  <= 1'b0;
      arvalid_q <= 1'b0;
    end
  end

  assign slv_idx = IDX_W'(paddr >> SEL_LSB);

  always_comb begin
    psel        = '0;
    pready      = 1'b0;
    prdata_sel  = '0;
    pslverr_sel = 1'b0;
    for (int unsigned i = 0; i < NSLV; i++) begin
      if (slv_idx == IDX_W'(i)) begin
        psel[i]     = psel_en;
        pready      = pready_in[i];
        prdata_sel  = prdata_in[i];
        pslverr_sel = pslverr_in[i];
      end
    end
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      rdata_q <= '0;
      resp_q  <= RESP_OKAY;
    end else if (complete) begin
      rdata_q <= prdata_sel;
      resp_q  <= pslverr_sel ? RESP_SLVERR : RESP_OKAY;
    end
  end

endmodule
