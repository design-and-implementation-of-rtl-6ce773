// Transaction-control FSM of the AXI4-Lite to APB bridge (PCLK domain).
//
// Six states sequence one transfer at a time:
//   IDLE         -> IDLE_WRITE   on AWVALID
//   IDLE         -> SETUP_READ   on ARVALID (checked when AWVALID is low)
//   IDLE_WRITE   -> SETUP_WRITE  on AWVALID || WVALID
//   SETUP_WRITE  -> ACCESS_WRITE on AWVALID & WVALID & PREADY
//   ACCESS_WRITE -> IDLE         on BREADY
//   SETUP_READ   -> ACCESS_READ  on ARVALID & PREADY
//   ACCESS_READ  -> IDLE         on RREADY
// The SETUP states drive PSEL with PENABLE low (APB setup phase) once the
// data-path holds a complete request (address, and data for a write), so a
// write whose data arrives after its address waits in SETUP_WRITE with PSEL
// still low. The ACCESS states first drive PSEL and PENABLE (APB access
// phase) until the slave returns PREADY; the FSM then drops PSEL/PENABLE, raises the response level
// (bvalid or rvalid) one cycle later and waits for the AXI side to report the
// B or R handshake, which is its BREADY / RREADY condition.
//
// Inputs arrive from the AXI clock domain through synchronizers, so they are
// levels, not single-cycle handshakes:
//   awvalid_s/arvalid_s   AXI valids as seen in the PCLK domain (IDLE and
//                         IDLE_WRITE decisions)
//   awvalid_q/wvalid_q/arvalid_q  the same valids registered together with
//                         address and data in the data-path (SETUP decisions,
//                         so the access phase starts only with captured data)
//   bready_s/rready_s     "B/R handshake done" levels from the AXI side
// Outputs are levels sent back to the AXI side: wr_accept (AWREADY/WREADY
// may be given), rd_accept (ARREADY may be given), bvalid, rvalid.
// The APB access always ends on PREADY, but the accept and response levels
// are raised only once the matching done level of the previous transfer has
// fallen. That fall proves the AXI side has seen the previous accept and
// response levels low, so every new level gives it a fresh rising edge and
// a leftover done level is never taken for a new handshake.
//
// Timing: setup lasts one PCLK cycle when the addressed slave holds PREADY
// high outside the access phase; access lasts until PREADY; a write takes at
// least IDLE, IDLE_WRITE, SETUP, ACCESS plus the response round trip.
//
// The states, their names and all transition conditions are the bridge
// design's. Which condition wins in IDLE when both AWVALID and ARVALID are
// high (write first), the split of the ACCESS states into an APB phase and a
// response phase, where the AXI READY levels are raised (on entering
// ACCESS), PSEL waiting for a complete request, and holding new levels until
// the previous done level has fallen are this implementation's choices.
module apb_fsm
  import axi_apb_pkg::*;
(
  input  logic       pclk,
  input  logic       presetn,
  // synchronized AXI-side levels
  input  logic       awvalid_s,
  input  logic       wvalid_s,
  input  logic       arvalid_s,
  input  logic       bready_s,
  input  logic       rready_s,
  // valids captured together with address/data in the data-path
  input  logic       awvalid_q,
  input  logic       wvalid_q,
  input  logic       arvalid_q,
  // PREADY of the addressed APB slave
  input  logic       pready,
  // control of the data-path and APB bus
  output fsm_state_e state,
  output logic       load_wr,    // data-path copies write address/data
  output logic       load_rd,    // data-path copies read address
  output logic       clear,      // data-path clears the APB address/data
  output logic       complete,   // access phase ends this cycle
  output logic       psel_en,
  output logic       penable,
  output logic       pwrite,
  // levels to the AXI side
  output logic       wr_accept,
  output logic       rd_accept,
  output logic       bvalid,
  output logic       rvalid
);

  fsm_state_e state_q, state_d;
  logic       done_q, done_d;    // APB access finished
  logic       resp_q, resp_d;    // response level raised towards AXI

  logic in_access;
  logic resp_busy;               // done level of this direction still high

  assign in_access = (state_q == ST_ACCESS_WRITE) || (state_q == ST_ACCESS_READ);
  assign resp_busy = (state_q == ST_ACCESS_WRITE) ? bready_s : rready_s;
  assign complete  = in_access && !done_q && pready;

  always_comb begin
    state_d = state_q;
    done_d  = done_q;
    resp_d  = resp_q;
    unique case (state_q)
      ST_IDLE: begin
        if (awvalid_s)      state_d = ST_IDLE_WRITE;
        else if (arvalid_s) state_d = ST_SETUP_READ;
      end
      ST_IDLE_WRITE: begin
        if (awvalid_s || wvalid_s) state_d = ST_SETUP_WRITE;
      end
      ST_SETUP_WRITE: begin
        if (awvalid_q && wvalid_q && pready) state_d = ST_ACCESS_WRITE;
      end
      ST_ACCESS_WRITE: begin
        if (complete) done_d = 1'b1;
        if (done_q && !resp_q && !resp_busy) resp_d = 1'b1;
        if (resp_q && bready_s) begin
          state_d = ST_IDLE;
          done_d  = 1'b0;
          resp_d  = 1'b0;
        end
      end
      ST_SETUP_READ: begin
        if (arvalid_q && pready) state_d = ST_ACCESS_READ;
      end
      ST_ACCESS_READ: begin
        if (complete) done_d = 1'b1;
        if (done_q && !resp_q && !resp_busy) resp_d = 1'b1;
        if (resp_q && rready_s) begin
          state_d = ST_IDLE;
          done_d  = 1'b0;
          resp_d  = 1'b0;
        end
      end
      default: begin
        state_d = ST_IDLE;
        done_d  = 1'b0;
        resp_d  = 1'b0;
      end
    endcase
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      state_q <= ST_IDLE;
      done_q  <= 1'b0;
      resp_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      done_q  <= done_d;
      resp_q  <= resp_d;
    end
  end

  // Address/data are copied on every edge that enters or stays in a SETUP
  // state, and frozen on the edge into ACCESS.
  assign load_wr = (state_d == ST_SETUP_WRITE);
  assign load_rd = (state_d == ST_SETUP_READ);
  assign clear   = (state_d == ST_IDLE) && (state_q != ST_IDLE);

  assign state     = state_q;
  assign psel_en   = ((state_q == ST_SETUP_WRITE) && awvalid_q && wvalid_q) ||
                     ((state_q == ST_SETUP_READ) && arvalid_q) ||
                     (in_access && !done_q);
  assign penable   = in_access && !done_q;
  assign pwrite    = (state_q == ST_SETUP_WRITE) || (state_q == ST_ACCESS_WRITE);
  assign wr_accept = (state_q == ST_ACCESS_WRITE) && !bready_s;
  assign rd_accept = (state_q == ST_ACCESS_READ)  && !rready_s;
  assign bvalid    = (state_q == ST_ACCESS_WRITE) && resp_q;
  assign rvalid    = (state_q == ST_ACCESS_READ)  && resp_q;

  // APB rule: an access phase keeps PSEL high.
  a_penable_has_psel: assert property (@(posedge pclk) disable iff (!presetn)
    penable |-> psel_en);

endmodule
