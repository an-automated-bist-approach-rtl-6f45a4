// Double-precision accumulator of the output response analyser.
//
// Two N_ACUM-bit registers, ACLO and ACHI, together form a 2*N_ACUM-bit sum.
// Every clock with `en` high, ACLO adds the W_IN-bit input and its carry-out
// increments ACHI. Both registers can be written (normally with zeros) through
// their own active-high write enable; a write takes priority over
// accumulation. With CARRY_FF = 1 the ACLO carry-out goes through one
// flip-flop before it reaches ACHI, which shortens the critical path; the
// pending carry is still added one clock after `en` falls, so the signature
// is final one clock later.
//
// The two registers, their write enables, the enable from BEN and the
// optional carry flip-flop are the document's; write priority is this
// design's choice.
module ora_accumulator #(
  parameter int unsigned W_IN     = 8,
  parameter int unsigned N_ACUM   = 8,
  parameter bit          CARRY_FF = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [W_IN-1:0]   din,
  input  logic              aclo_we,
  input  logic [N_ACUM-1:0] aclo_wdata,
  output logic [N_ACUM-1:0] aclo_q,
  input  logic              achi_we,
  input  logic [N_ACUM-1:0] achi_wdata,
  output logic [N_ACUM-1:0] achi_q
);

  logic [N_ACUM:0] lo_sum;
  logic            carry, carry_q, hi_inc;

  initial begin
    if (W_IN > N_ACUM) $error("ora_accumulator: N_ACUM must be at least the input width");
  end

  assign lo_sum = {1'b0, aclo_q} + (N_ACUM+1)'(din);
  assign carry  = en && lo_sum[N_ACUM];
  assign hi_inc = CARRY_FF ? carry_q : carry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       aclo_q <= '0;
    else if (aclo_we) aclo_q <= aclo_wdata;
    else if (en)      aclo_q <= lo_sum[N_ACUM-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       carry_q <= 1'b0;
    else if (aclo_we || achi_we) carry_q <= 1'b0;
    else              carry_q <= carry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       achi_q <= '0;
    else if (achi_we) achi_q <= achi_wdata;
    else if (hi_inc)  achi_q <= achi_q + 1'b1;
  end

endmodule
