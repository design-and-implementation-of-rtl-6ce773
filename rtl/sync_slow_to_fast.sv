// Clock-domain crossing for a bus that goes from a slow clock to a fast one.
//
// The bus is registered in the slow source domain (stage 1). In the fast
// destination domain, a second register (stage 2) copies stage 1 only while
// a window signal is high, and a third register (stage 3) drives the output.
// The window is the slow source clock sampled by two flip-flops on the
// falling edge of the destination clock: it is high during the later part of
// the source clock's high phase, when stage 1 has long settled, and low
// around the source clock's rising edge, when stage 1 changes. All bits move
// through the same registers with the same enable, so a word is never seen
// half old and half new.
//
// Interface: data_in is sampled on clk_src; data_out is a clk_dst register.
// Timing: a change of data_in reaches data_out within one clk_src period
// plus four clk_dst periods. clk_dst must be several times faster than
// clk_src and its falling edges apart from clk_src edges.
//
// The register structure, the clock-sampling enable chain and its inverted
// clock follow the bridge's slow-to-fast synchronizer drawing. The
// asynchronous active-low resets are this implementation's addition.
module sync_slow_to_fast #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk_src,    // slow clock (CLK1)
  input  logic             rst_src_n,
  input  logic             clk_dst,    // fast clock (CLK2)
  input  logic             rst_dst_n,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] stage1_q;
  logic [WIDTH-1:0] stage2_q;
  logic [1:0]       window_q;   // clk_src sampled twice on falling clk_dst

  always_ff @(posedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n) stage1_q <= '0;
    else            stage1_q <= data_in;
  end

  always_ff @(negedge clk_dst or negedge rst_dst_n) begin
    if (!rst_dst_n) window_q <= '0;
    else            window_q <= {window_q[0], clk_src};
  end

  always_ff @(posedge clk_dst or negedge rst_dst_n) begin
    if (!rst_dst_n) begin
      stage2_q <= '0;
      data_out <= '0;
    end else begin
      if (window_q[1]) stage2_q <= stage1_q;
      data_out <= stage2_q;
    end
  end

endmodule
