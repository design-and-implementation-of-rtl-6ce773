// Clock-domain crossing for a bus that goes from a fast clock to a slow one.
//
// The bus is registered in the fast source domain (stage 1), copied into a
// second source-domain register (stage 2) only while a window signal is high,
// and then sampled by the slow destination clock (stage 3). The window is the
// destination clock itself, sampled by two flip-flops that run on the falling
// edge of the source clock. Stage 2 therefore loads while the slow clock is
// high and is frozen for the last part of its low phase, so it never changes
// near the slow clock's rising edge and stage 3 cannot go metastable. All
// bits of the bus move through the same registers with the same enable, so
// the destination always sees a word that was present at the input as a whole.
//
// Interface: data_in is sampled on clk_src; data_out is a clk_dst register.
// Timing: a value held on data_in for at least two clk_dst periods appears
// on data_out within two clk_dst periods plus three clk_src periods. The
// scheme needs clk_src to be several times faster than clk_dst (ten times in
// the 100 MHz / 10 MHz bridge) and clk_dst edges apart from clk_src falling
// edges.
//
// The four-register structure, the clock-sampling enable chain and the
// inverted source clock on that chain follow the bridge's fast-to-slow
// synchronizer drawing. The asynchronous active-low resets are this
// implementation's addition, so that nothing random leaves the synchronizer
// after reset.
module sync_fast_to_slow #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk_src,    // fast clock (CLK1)
  input  logic             rst_src_n,
  input  logic             clk_dst,    // slow clock (CLK2)
  input  logic             rst_dst_n,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] stage1_q;
  logic [WIDTH-1:0] stage2_q;
  logic [1:0]       window_q;   // clk_dst sampled twice on falling clk_src

  always_ff @(posedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n) stage1_q <= '0;
    else            stage1_q <= data_in;
  end

  always_ff @(negedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n) window_q <= '0;
    else            window_q <= {window_q[0], clk_dst};
  end

  always_ff @(posedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n)       stage2_q <= '0;
    else if (window_q[1]) stage2_q <= stage1_q;
  end

  always_ff @(posedge clk_dst or negedge rst_dst_n) begin
    if (!rst_dst_n) data_out <= '0;
    else            data_out <= stage2_q;
  end

endmodule
