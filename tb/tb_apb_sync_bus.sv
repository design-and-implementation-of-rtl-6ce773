// Testbench of apb_sync_bus in both of its configurations.
//
// dut_a: ACLK 100 MHz, PCLK 10 MHz, ACLK_FASTER = 1 (the bridge's case).
// dut_p: ACLK 10 MHz, PCLK 100 MHz, ACLK_FASTER = 0.
// In each, a random request word is put on req_a and a random response word
// on rsp_p, each held for a random time of at least two slow-clock periods.
// Checks, at every destination-clock edge: the output is either the previous
// word or the new one, never a mixture; and the new word arrives within
// 300 ns (three slow-clock periods).
module tb_apb_sync_bus;
  import axi_apb_pkg::*;

  logic fclk = 1'b0, sclk = 1'b0, rst_n = 1'b0;
  always #5 fclk = ~fclk;                          // 100 MHz
  initial begin #3; forever #50 sclk = ~sclk; end  // 10 MHz

  axi_req_t req_a1 = '0, req_p1, req_a2 = '0, req_p2;
  apb_rsp_t rsp_p1 = '0, rsp_a1, rsp_p2 = '0, rsp_a2;

  apb_sync_bus #(.ACLK_FASTER(1'b1)) dut_a (
    .aclk(fclk), .aresetn(rst_n), .pclk(sclk), .presetn(rst_n),
    .req_a(req_a1), .req_p(req_p1), .rsp_p(rsp_p1), .rsp_a(rsp_a1));

  apb_sync_bus #(.ACLK_FASTER(1'b0)) dut_p (
    .aclk(sclk), .aresetn(rst_n), .pclk(fclk), .presetn(rst_n),
    .req_a(req_a2), .req_p(req_p2), .rsp_p(rsp_p2), .rsp_a(rsp_a2));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic axi_req_t rand_req();
    logic [$bits(axi_req_t)-1:0] b;
    for (int i = 0; i < $bits(axi_req_t); i += 32) b = {b, 32'($urandom)};
    return axi_req_t'(b);
  endfunction
  function automatic apb_rsp_t rand_rsp();
    logic [$bits(apb_rsp_t)-1:0] b;
    for (int i = 0; i < $bits(apb_rsp_t); i += 32) b = {b, 32'($urandom)};
    return apb_rsp_t'(b);
  endfunction

  localparam int N = 150;
  int done_cnt = 0;

  // request path, fast to slow (dut_a)
  initial begin
    axi_req_t v, prev;
    realtime t0;
    wait (rst_n);
    prev = '0;
    repeat (N) begin
      @(posedge fclk); v = rand_req(); req_a1 <= v; t0 = $realtime;
      while (req_p1 != v) begin
        @(posedge sclk); #1;
        check(req_p1 == v || req_p1 == prev, "dut_a request word whole");
        if ($realtime - t0 > 300.0) break;
      end
      check(req_p1 == v, "dut_a request arrives within 300 ns");
      repeat ($urandom_range(30)) @(posedge fclk);
      prev = v;
    end
    done_cnt++;
  end

  // response path, slow to fast (dut_a)
  initial begin
    apb_rsp_t v, prev;
    realtime t0;
    wait (rst_n);
    prev = '0;
    repeat (N) begin
      @(posedge sclk); v = rand_rsp(); rsp_p1 <= v; t0 = $realtime;
      while (rsp_a1 != v) begin
        @(posedge fclk); #1;
        check(rsp_a1 == v || rsp_a1 == prev, "dut_a response word whole");
        if ($realtime - t0 > 300.0) break;
      end
      check(rsp_a1 == v, "dut_a response arrives within 300 ns");
      repeat (1 + $urandom_range(2)) @(posedge sclk);
      prev = v;
    end
    done_cnt++;
  end

  // request path, slow to fast (dut_p)
  initial begin
    axi_req_t v, prev;
    realtime t0;
    wait (rst_n);
    prev = '0;
    repeat (N) begin
      @(posedge sclk); v = rand_req(); req_a2 <= v; t0 = $realtime;
      while (req_p2 != v) begin
        @(posedge fclk); #1;
        check(req_p2 == v || req_p2 == prev, "dut_p request word whole");
        if ($realtime - t0 > 300.0) break;
      end
      check(req_p2 == v, "dut_p request arrives within 300 ns");
      repeat (1 + $urandom_range(2)) @(posedge sclk);
      prev = v;
    end
    done_cnt++;
  end

  // response path, fast to slow (dut_p)
  initial begin
    apb_rsp_t v, prev;
    realtime t0;
    wait (rst_n);
    prev = '0;
    repeat (N) begin
      @(posedge fclk); v = rand_rsp(); rsp_p2 <= v; t0 = $realtime;
      while (rsp_a2 != v) begin
        @(posedge sclk); #1;
        check(rsp_a2 == v || rsp_a2 == prev, "dut_p response word whole");
        if ($realtime - t0 > 300.0) break;
      end
      check(rsp_a2 == v, "dut_p response arrives within 300 ns");
      repeat ($urandom_range(30)) @(posedge fclk);
      prev = v;
    end
    done_cnt++;
  end

  initial begin
    repeat (3) @(posedge sclk);
    rst_n = 1'b1;
    wait (done_cnt == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge sclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
