// Synchronisation module for driving the serial interface from another clock
// domain (for example an IEEE 1149.1 boundary-scan controller).
//
// `async_in` passes through two flip-flops to remove metastability; a third
// flip-flop and an AND gate form a one-shot, so each rising edge of the input
// gives `pulse` high for exactly one clock. Latency from a rising input to
// the pulse: two to three clocks. The two-flip-flop synchroniser and one-shot
// are the document's description; the one-shot's construction is this
// design's.
module sync_oneshot (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic pulse
);

  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s1 <= async_in;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign pulse = s2 && !s3;

endmodule
