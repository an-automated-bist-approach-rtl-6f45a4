// Programmable Shift Register of the test pattern generator.
//
// An N_PSR-stage shift register that delays the Counter/LFSR carry-out by
// N_PSR clocks before it loads the Count Value Holding Register; the number
// of stages sets the step between successive start values of a frequency
// sweep. `q` is the last stage. `clr` (synchronous, active high) empties the
// register; it is this design's addition, used to drop a carry still in
// flight when a sweep restarts. The stage count N_PSR is the document's
// design parameter.
module prog_shift_reg #(
  parameter int unsigned N_PSR = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic d,
  output logic q
);

  logic [N_PSR-1:0] sr;

  initial begin
    if (N_PSR < 1) $error("prog_shift_reg: N_PSR must be at least 1");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sr <= '0;
    else if (clr) sr <= '0;
    else          sr <= N_PSR'({sr, d});
  end

  assign q = sr[N_PSR-1];

endmodule
