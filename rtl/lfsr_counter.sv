// Counter/LFSR of the test pattern generator.
//
// An N-bit register that, depending on `mode`, counts up, counts down or
// steps as a maximal-length linear feedback shift register. In LFSR mode it
// is a Galois (internal-XOR) register shifting towards the MSB: when the MSB
// is 1 the shifted value is XORed with the feedback mask of a primitive
// polynomial of degree N, so it visits all 2^N-1 non-zero states.
//
// Interface and timing: `load` (active high, synchronous) takes `load_val`
// and has priority over `en`; with `en` high the register advances one step
// per clock. `co` (active high, combinational) marks the last state of the
// count period: all ones when counting up, zero when counting down, and in
// LFSR mode the state whose successor is the seed value 1.
//
// The up/down counter with parallel load and carry-out, its second use as an
// LFSR and the 4 to 24 bit range follow the document; the Galois form, the
// seed and the particular polynomials are this design's choice.
module lfsr_counter
  import bist_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  cnt_mode_e        mode,
  input  logic             load,
  input  logic [N-1:0]     load_val,
  output logic [N-1:0]     q,
  output logic             co
);

  localparam logic [N-1:0] MASK = N'(lfsr_mask(N));
  localparam logic [N-1:0] SEED = N'(1);

  logic [N-1:0] lfsr_next;

  initial begin
    if (N < 4 || N > MAX_LFSR) $error("lfsr_counter: N must be 4 to 24");
  end

  always_comb begin
    lfsr_next = {q[N-2:0], 1'b0};
    if (q[N-1]) lfsr_next = lfsr_next ^ MASK;
  end

  always_comb begin
    unique case (mode)
      CNT_UP:   co = (q == '1);
      CNT_DOWN: co = (q == '0);
      CNT_LFSR: co = (lfsr_next == SEED);
      default:  co = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (load) begin
      q <= load_val;
    end else if (en) begin
      unique case (mode)
        CNT_UP:   q <= q + 1'b1;
        CNT_DOWN: q <= q - 1'b1;
        CNT_LFSR: q <= lfsr_next;
        default:  q <= q;
      endcase
    end
  end

endmodule
