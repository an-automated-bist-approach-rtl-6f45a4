// Absolute value subtractor of the output response analyser.
//
// Computes |dac - adc|, the distance between the test word sent to the DAC
// and the word returned by the ADC. The two words are first brought to the
// same full scale: the narrower one is shifted left so that both are
// W = max(N_DAC, N_ADC) bits wide with their MSBs aligned. Combinational.
// The subtractor and its sizing by N_DAC and N_ADC are the document's; the
// full-scale alignment of unequal widths is this design's choice.
module abs_subtractor #(
  parameter int unsigned N_DAC = 8,
  parameter int unsigned N_ADC = 8,
  localparam int unsigned W    = (N_DAC > N_ADC) ? N_DAC : N_ADC
) (
  input  logic [N_DAC-1:0] dac,
  input  logic [N_ADC-1:0] adc,
  output logic [W-1:0]     diff
);

  logic [W-1:0] a, b;

  always_comb begin
    a    = W'(dac) << (W - N_DAC);
    b    = W'(adc) << (W - N_ADC);
    diff = (a >= b) ? a - b : b - a;
  end

endmodule
