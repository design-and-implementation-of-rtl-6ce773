// Testbench of sync_slow_to_fast: a 32-bit bus from 10 MHz to 100 MHz.
//
// The input carries a 16-bit counter and its complement and changes on
// random slow-clock cycles. Checks:
//  - every output word is whole and the counter never goes backwards;
//  - stage 2 only loads stage 1 after stage 1 has been stable for at least
//    two fast periods (it never copies a word that is changing);
//  - a new value reaches the output within one slow period plus five fast
//    periods of the slow edge that registered it.
module tb_sync_slow_to_fast;

  logic clk_src = 1'b0, clk_dst = 1'b0;
  logic rst_src_n = 1'b0, rst_dst_n = 1'b0;
  logic [31:0] data_in = '0, data_out;

  initial begin #3; forever #50 clk_src = ~clk_src; end  // 10 MHz
  always #5 clk_dst = ~clk_dst;                          // 100 MHz

  sync_slow_to_fast #(.WIDTH(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  realtime s1_change = 0;
  logic [31:0] s1_prev = '0, s2_prev = '0;
  always @(posedge clk_src) begin
    #1;
    if (dut.stage1_q != s1_prev) begin
      s1_change = $realtime - 1.0;
      s1_prev   = dut.stage1_q;
    end
  end
  always @(posedge clk_dst) begin
    #1;
    if (dut.stage2_q != s2_prev) begin
      if ($realtime > 300)
        check($realtime - 1.0 - s1_change >= 20.0, "stage 2 copies a settled stage 1");
      s2_prev = dut.stage2_q;
    end
  end

  logic [15:0] last_cnt = '0;
  always @(posedge clk_dst) if (rst_dst_n) begin
    #1;
    check(data_out[31:16] == ~data_out[15:0] || data_out == '0, "output word is whole");
    check(data_out[15:0] >= last_cnt, "counter does not go backwards");
    last_cnt = data_out[15:0];
  end

  logic [15:0] cnt = '0;
  initial begin
    int fast;
    repeat (3) @(posedge clk_src);
    rst_src_n = 1'b1;
    rst_dst_n = 1'b1;
    repeat (200) begin
      repeat ($urandom_range(2)) @(posedge clk_src);
      cnt = cnt + 16'($urandom_range(5, 1));
      data_in <= {~cnt, cnt};
      @(posedge clk_src);           // the edge that registers it in stage 1
      fast = 0;
      while (data_out != {~cnt, cnt} && fast < 40) begin
        @(posedge clk_dst);
        #1;
        fast++;
      end
      check(fast <= 15, "value arrives within one slow period plus five fast periods");
      check(data_out == {~cnt, cnt}, "value arrives");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_dst);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
