// Behavioural APB slave used by the bridge testbenches (not synthesizable).
//
// A 256-word memory with byte strobes. PREADY is high whenever the slave is
// not in an access phase; in each access phase it is held low for a random
// number of cycles between 0 and MAX_WAIT, or for FIX_WAIT cycles when that
// parameter is not negative. Word offsets 0xF0 to 0xFF are an
// error window: accesses there answer PSLVERR and writes are ignored, reads
// return 0xDEAD_0000 plus the slave number.
// The model also checks the APB rules it can see: a setup phase lasts one
// cycle and is followed by an access phase to the same address, and address,
// direction, data and strobes do not change during the transfer. Each broken
// rule increments proto_errors.
module apb_slave_model #(
  parameter int unsigned ID       = 0,
  parameter int unsigned MAX_WAIT = 3,
  parameter int          FIX_WAIT = -1   // >= 0: this many wait states every time
) (
  input  logic        pclk,
  input  logic        presetn,
  input  logic [31:0] paddr,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  input  logic [3:0]  pstrb,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output int          proto_errors,
  output int          wait_cycles,
  output int          transfers,
  output int          errors_given
);

  logic [31:0] mem [256];
  int          wait_left;
  logic        in_setup_q;
  logic        acc_wait_q;
  logic [31:0] addr_q, data_q;
  logic        write_q;
  logic [3:0]  strb_q;
  logic [7:0]  word;

  assign word = paddr[9:2];

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 32'h0;
  end

  always_comb begin
    pready  = 1'b1;
    prdata  = 32'h0;
    pslverr = 1'b0;
    if (psel && penable) begin
      pready  = (wait_left == 0);
      pslverr = pready && (word >= 8'hF0);
      if (pready && !pwrite)
        prdata = (word >= 8'hF0) ? (32'hDEAD_0000 + ID) : mem[word];
    end
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      wait_left    <= 0;
      in_setup_q   <= 1'b0;
      acc_wait_q   <= 1'b0;
      proto_errors <= 0;
      wait_cycles  <= 0;
      transfers    <= 0;
      errors_given <= 0;
      addr_q       <= '0;
      data_q       <= '0;
      write_q      <= 1'b0;
      strb_q       <= '0;
    end else begin
      in_setup_q <= psel && !penable;
      if (psel && !penable) begin
        // setup phase: remember the transfer, draw the wait states
        if (in_setup_q) proto_errors <= proto_errors + 1;   // setup longer than one cycle
        addr_q    <= paddr;
        data_q    <= pwdata;
        write_q   <= pwrite;
        strb_q    <= pstrb;
        wait_left <= (FIX_WAIT >= 0) ? FIX_WAIT :
                     (MAX_WAIT == 0) ? 0 : int'($urandom_range(MAX_WAIT, 0));
      end else if (psel && penable) begin
        if (paddr != addr_q || pwrite != write_q ||
            (pwrite && (pwdata != data_q || pstrb != strb_q)))
          proto_errors <= proto_errors + 1;
        if (wait_left != 0) begin
          wait_left   <= wait_left - 1;
          wait_cycles <= wait_cycles + 1;
        end else begin
          transfers <= transfers + 1;
          if (word >= 8'hF0) errors_given <= errors_given + 1;
          else if (pwrite)
            for (int b = 0; b < 4; b++)
              if (pstrb[b]) mem[word][8*b +: 8] <= pwdata[8*b +: 8];
        end
      end
      acc_wait_q <= psel && penable && !pready;
      if (psel && penable && !in_setup_q && !acc_wait_q)
        proto_errors <= proto_errors + 1;                   // access not after setup
    end
  end

endmodule
