// Testbench of sync_fast_to_slow: a 32-bit bus from 100 MHz to 10 MHz.
//
// The input carries a 16-bit counter and its complement and changes at
// random fast-clock cycles. Checks:
//  - every output word is whole (upper half is the complement of the lower)
//    and the counter never goes backwards;
//  - stage 2, the register the slow clock samples, has been stable for at
//    least two fast periods at every slow rising edge (the point of the
//    circuit);
//  - a value held at the input reaches the output within three slow edges.
module tb_sync_fast_to_slow;

  logic clk_src = 1'b0, clk_dst = 1'b0;
  logic rst_src_n = 1'b0, rst_dst_n = 1'b0;
  logic [31:0] data_in = '0, data_out;

  always #5 clk_src = ~clk_src;                          // 100 MHz
  initial begin #3; forever #50 clk_dst = ~clk_dst; end  // 10 MHz

  sync_fast_to_slow #(.WIDTH(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // stability of stage 2 at the sampling edge
  realtime last_change = 0;
  logic [31:0] stage2_prev = '0;
  always @(posedge clk_src) begin
    #1;
    if (dut.stage2_q != stage2_prev) begin
      last_change = $realtime - 1.0;
      stage2_prev = dut.stage2_q;
    end
  end
  always @(posedge clk_dst) if (rst_dst_n && $realtime > 300)
    check($realtime - last_change >= 20.0, "stage 2 stable before the slow edge");

  // whole words, counter monotonic
  logic [15:0] last_cnt = '0;
  always @(posedge clk_dst) if (rst_dst_n) begin
    #1;
    check(data_out[31:16] == ~data_out[15:0] || data_out == '0, "output word is whole");
    check(data_out[15:0] >= last_cnt, "counter does not go backwards");
    last_cnt = data_out[15:0];
  end

  logic [15:0] cnt = '0;
  initial begin
    int edges;
    repeat (3) @(posedge clk_dst);
    rst_src_n = 1'b1;
    rst_dst_n = 1'b1;
    // phase 1: fast random changes
    repeat (3000) begin
      @(posedge clk_src);
      if ($urandom_range(3) == 0) begin
        cnt++;
        data_in <= {~cnt, cnt};
      end
    end
    // phase 2: latency of held values
    repeat (40) begin
      repeat ($urandom_range(20)) @(posedge clk_src);
      cnt = cnt + 16'd7;
      data_in <= {~cnt, cnt};
      edges = 0;
      while (data_out != {~cnt, cnt} && edges < 10) begin
        @(posedge clk_dst);
        #1;
        edges++;
      end
      check(edges <= 3, "held value arrives within three slow edges");
      check(data_out == {~cnt, cnt}, "held value arrives");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk_src);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
