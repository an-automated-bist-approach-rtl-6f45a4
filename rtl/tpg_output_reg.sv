// Output data multiplexer, Output Data Register and TCO register of the
// test pattern generator.
//
// Each clock the register to the DAC takes one of three N_DAC-bit sources,
// chosen by `sel`: normal system data, the Count Value Holding Register or
// the Magnitude Register. When `zero` is high the register takes all zeros
// instead; the TPG uses this for the low half of a frequency sweep (TFF = 0)
// and for the off time of the pulse and step waveforms. The TPG carry-out
// TCO is registered alongside, so that it is high with the last sample of a
// waveform cycle. `test` records whether the word now at the DAC is test
// data (any source but system data).
//
// Timing: one clock from inputs to `dac_data`, `tco` and `test`.
// The 3-to-1 multiplexer, the register and TCO follow the document; the
// separate zero control is this design's way of realising the "logic" the
// document places beside the multiplexers.
module tpg_output_reg
  import bist_pkg::*;
#(
  parameter int unsigned N_DAC = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  osel_e            sel,
  input  logic             zero,
  input  logic [N_DAC-1:0] hold_val,
  input  logic [N_DAC-1:0] mag_val,
  input  logic [N_DAC-1:0] sys_data,
  input  logic             tco_in,
  output logic [N_DAC-1:0] dac_data,
  output logic             tco,
  output logic             test
);

  logic [N_DAC-1:0] mux_out;

  always_comb begin
    unique case (sel)
      OSEL_HOLD: mux_out = hold_val;
      OSEL_MAG:  mux_out = mag_val;
      default:   mux_out = sys_data;
    endcase
    if (zero && sel != OSEL_SYSTEM) mux_out = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_data <= '0;
      tco      <= 1'b0;
      test     <= 1'b0;
    end else begin
      dac_data <= mux_out;
      tco      <= tco_in && sel != OSEL_SYSTEM;
      test     <= sel != OSEL_SYSTEM;
    end
  end

endmodule
