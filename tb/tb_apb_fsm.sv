// Testbench of apb_fsm, the transaction-control FSM.
//
// Part 1 walks one write and one read by hand and checks the state and the
// APB and handshake outputs cycle by cycle, including PREADY wait states,
// a write whose data arrives late, a delayed BREADY/RREADY and a done level
// left over from the previous transfer (the access still ends on PREADY,
// the response waits until the old level has fallen).
// Part 2 drives random inputs for many cycles and compares state and
// outputs with a reference model written from the transition table:
//   IDLE -AWVALID-> IDLE_WRITE, IDLE -ARVALID-> SETUP_READ,
//   IDLE_WRITE -AWVALID||WVALID-> SETUP_WRITE,
//   SETUP_WRITE -AWVALID&WVALID&PREADY-> ACCESS_WRITE -BREADY-> IDLE,
//   SETUP_READ -ARVALID&PREADY-> ACCESS_READ -RREADY-> IDLE.
// Every transition of the table must be taken at least once.
module tb_apb_fsm;
  import axi_apb_pkg::*;

  logic pclk = 1'b0, presetn = 1'b0;
  always #50 pclk = ~pclk;

  logic awvalid_s = 0, wvalid_s = 0, arvalid_s = 0, bready_s = 0, rready_s = 0;
  logic awvalid_q = 0, wvalid_q = 0, arvalid_q = 0, pready = 1;
  fsm_state_e state;
  logic load_wr, load_rd, clear, complete, psel_en, penable, pwrite;
  logic wr_accept, rd_accept, bvalid, rvalid;

  apb_fsm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (state %s)", what, $time, state.name()); end
  endtask

  // inputs change just after the rising edge, outputs are checked before the next one
  task automatic step();
    @(posedge pclk);
    #10;
  endtask

  task automatic expect_out(input fsm_state_e st, input bit sel, input bit en,
                            input bit wr, input bit bv, input bit rv, input string what);
    check(state == st, {what, ": state"});
    check(psel_en == sel && penable == en, {what, ": PSEL/PENABLE"});
    check(wr_accept == (st == ST_ACCESS_WRITE && !bready_s) &&
          rd_accept == (st == ST_ACCESS_READ && !rready_s), {what, ": accept levels"});
    if (sel) check(pwrite == wr, {what, ": PWRITE"});
    check(bvalid == bv && rvalid == rv, {what, ": response levels"});
  endtask

  // ---------------- reference model for part 2
  fsm_state_e m_state;
  bit         m_done, m_resp;
  int         hits [7];

  task automatic model_step();
    bit cmp;
    cmp = (m_state inside {ST_ACCESS_WRITE, ST_ACCESS_READ}) && !m_done && pready;
    case (m_state)
      ST_IDLE:
        if (awvalid_s) begin m_state = ST_IDLE_WRITE; hits[0]++; end
        else if (arvalid_s) begin m_state = ST_SETUP_READ; hits[1]++; end
      ST_IDLE_WRITE:
        if (awvalid_s || wvalid_s) begin m_state = ST_SETUP_WRITE; hits[2]++; end
      ST_SETUP_WRITE:
        if (awvalid_q && wvalid_q && pready) begin m_state = ST_ACCESS_WRITE; hits[3]++; end
      ST_ACCESS_WRITE:
        if (m_resp && bready_s) begin m_state = ST_IDLE; m_done = 0; m_resp = 0; hits[4]++; end
        else if (cmp) m_done = 1;
        else if (m_done && !bready_s) m_resp = 1;
      ST_SETUP_READ:
        if (arvalid_q && pready) begin m_state = ST_ACCESS_READ; hits[5]++; end
      ST_ACCESS_READ:
        if (m_resp && rready_s) begin m_state = ST_IDLE; m_done = 0; m_resp = 0; hits[6]++; end
        else if (cmp) m_done = 1;
        else if (m_done && !rready_s) m_resp = 1;
      default: ;
    endcase
  endtask

  initial begin
    repeat (2) @(posedge pclk);
    #10 presetn = 1'b1;
    step();
    expect_out(ST_IDLE, 0, 0, 0, 0, 0, "reset");

    // ---- write, data late, one wait state, BREADY delayed
    awvalid_s = 1;
    step(); expect_out(ST_IDLE_WRITE, 0, 0, 1, 0, 0, "W1 idle_write");
    check(load_wr, "W1 load on entering setup");
    step(); expect_out(ST_SETUP_WRITE, 0, 0, 1, 0, 0, "W1 setup, request incomplete");
    awvalid_q = 1;                 // data-path now holds the address only
    step(); expect_out(ST_SETUP_WRITE, 0, 0, 1, 0, 0, "W1 setup, waiting for data");
    wvalid_s = 1; wvalid_q = 1;
    #1 check(state == ST_SETUP_WRITE && psel_en && !penable, "W1 setup phase on the bus");
    check(!load_wr, "W1 registers freeze on the edge into access");
    step(); pready = 0;
    #1 expect_out(ST_ACCESS_WRITE, 1, 1, 1, 0, 0, "W1 access, wait state");
    check(!complete, "W1 no completion while PREADY low");
    step(); pready = 1;
    #1 check(complete, "W1 completes with PREADY");
    step(); expect_out(ST_ACCESS_WRITE, 0, 0, 1, 0, 0, "W1 access over, response next");
    awvalid_s = 0; wvalid_s = 0;
    step(); expect_out(ST_ACCESS_WRITE, 0, 0, 1, 1, 0, "W1 response pending");
    step(); expect_out(ST_ACCESS_WRITE, 0, 0, 1, 1, 0, "W1 waiting for BREADY");
    bready_s = 1;
    #1 check(clear, "W1 clear on the way to IDLE");
    step(); expect_out(ST_IDLE, 0, 0, 0, 0, 0, "W1 back to IDLE");
    awvalid_q = 0; wvalid_q = 0;

    // ---- read while the old write done level is still high is fine,
    //      but a stale read-done level must hold the response back
    arvalid_s = 1; rready_s = 1;
    step(); expect_out(ST_SETUP_READ, 0, 0, 0, 0, 0, "R1 setup, not loaded yet");
    check(load_rd, "R1 loads address in setup");
    bready_s = 0;
    arvalid_q = 1;
    #1 check(psel_en && !penable && !pwrite, "R1 setup phase on the bus");
    step(); expect_out(ST_ACCESS_READ, 1, 1, 0, 0, 0, "R1 access");
    check(complete, "R1 access ends on PREADY");
    step(); expect_out(ST_ACCESS_READ, 0, 0, 0, 0, 0, "R1 stale RREADY level holds the response");
    step(); expect_out(ST_ACCESS_READ, 0, 0, 0, 0, 0, "R1 still held");
    rready_s = 0;
    step(); expect_out(ST_ACCESS_READ, 0, 0, 0, 0, 1, "R1 response once the old level is gone");
    arvalid_s = 0;
    repeat (3) begin step(); expect_out(ST_ACCESS_READ, 0, 0, 0, 0, 1, "R1 waiting for RREADY"); end
    rready_s = 1;
    step(); expect_out(ST_IDLE, 0, 0, 0, 0, 0, "R1 back to IDLE");
    arvalid_q = 0; rready_s = 0;

    // ---- both requests at once: write goes first
    awvalid_s = 1; arvalid_s = 1;
    step(); check(state == ST_IDLE_WRITE, "write wins over read in IDLE");

    // ---- part 2: random inputs against the model
    presetn = 0;
    #10 presetn = 1;
    m_state = ST_IDLE; m_done = 0; m_resp = 0;
    for (int i = 0; i < 7; i++) hits[i] = 0;
    repeat (20000) begin
      awvalid_s = ($urandom_range(3) != 0); wvalid_s = ($urandom_range(3) != 0);
      arvalid_s = ($urandom_range(2) != 0);
      awvalid_q = ($urandom_range(2) != 0); wvalid_q = ($urandom_range(2) != 0);
      arvalid_q = ($urandom_range(2) != 0);
      bready_s  = ($urandom_range(2) == 0); rready_s = ($urandom_range(2) == 0);
      pready    = ($urandom_range(2) != 0);
      #1;
      check(penable == ((m_state inside {ST_ACCESS_WRITE, ST_ACCESS_READ}) && !m_done), "model: PENABLE");
      check(bvalid == (m_state == ST_ACCESS_WRITE && m_resp), "model: bvalid");
      check(wr_accept == (m_state == ST_ACCESS_WRITE && !bready_s), "model: wr_accept");
      check(rd_accept == (m_state == ST_ACCESS_READ && !rready_s), "model: rd_accept");
      check(rvalid == (m_state == ST_ACCESS_READ && m_resp), "model: rvalid");
      model_step();
      step();
      check(state == m_state, "model: next state");
    end
    for (int i = 0; i < 7; i++) check(hits[i] > 0, "every transition taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
