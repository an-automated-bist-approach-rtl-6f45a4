// Bit reversal multiplexer of the test pattern generator.
//
// Passes the N-bit counter value unchanged, or with its bit order reversed
// (bit 0 becomes bit N-1 and so on) when `rev` is high. Feeding a reversed
// count to the DAC moves the energy of a ramp to high frequencies.
// Purely combinational. Function as described in the document.
module bit_reverse_mux #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] d,
  input  logic         rev,
  output logic [N-1:0] q
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      q[i] = rev ? d[N-1-i] : d[i];
    end
  end

endmodule
