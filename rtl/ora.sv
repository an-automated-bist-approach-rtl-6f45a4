// Output response analyser (ORA) of the loopback BIST.
//
// Compacts the response of the analog circuitry into a 2*N_ACUM-bit
// signature. The function register selects what is summed each clock while
// BEN is high:
//   mode 0  the TPG output (the DAC input word): self-test of the digital BIST
//   mode 1  the ADC output word
//   mode 2  |DAC input - ADC output| from the absolute value subtractor
//   mode 3  nothing
// and also holds the N_LPBK loopback control bits that drive the analog
// loopback multiplexers. With PIPE = 1 (default) the multiplexer output and
// BEN pass through one pipeline register before the accumulator; with
// CARRY_FF = 1 the accumulator's inner carry is registered as well.
//
// Interface. The function register, ACLO and ACHI each have an active-high
// write enable, an input bus and an output bus. Function register layout:
// bits [1:0] mode, bits [N_LPBK+1:2] LPBK. Latency from `dac_data`/`adc_data`
// to the accumulator registers: 1 + PIPE clocks. When BEN falls the
// signature holds until the registers are rewritten.
//
// Structure, the three modes, LPBK, the double-precision accumulator and the
// pipeline option follow the document; the register layout and mode codes
// are this design's.
module ora
  import bist_pkg::*;
#(
  parameter int unsigned N_DAC    = 8,
  parameter int unsigned N_ADC    = 8,
  parameter int unsigned N_ACUM   = 8,
  parameter int unsigned N_LPBK   = 2,
  parameter bit          PIPE     = 1'b1,
  parameter bit          CARRY_FF = 1'b0,
  localparam int unsigned N_FUNC  = N_LPBK + 2,
  localparam int unsigned W       = (N_DAC > N_ADC) ? N_DAC : N_ADC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              func_we,
  input  logic [N_FUNC-1:0] func_wdata,
  output logic [N_FUNC-1:0] func_q,
  input  logic              aclo_we,
  input  logic [N_ACUM-1:0] aclo_wdata,
  output logic [N_ACUM-1:0] aclo_q,
  input  logic              achi_we,
  input  logic [N_ACUM-1:0] achi_wdata,
  output logic [N_ACUM-1:0] achi_q,
  input  logic [N_DAC-1:0]  dac_data,
  input  logic [N_ADC-1:0]  adc_data,
  input  logic              ben,
  output logic [N_LPBK-1:0] lpbk
);

  logic [W-1:0] diff, sel_data, acc_in;
  logic         acc_en;
  ora_mode_e    mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       func_q <= '0;
    else if (func_we) func_q <= func_wdata;
  end

  assign mode = ora_mode_e'(func_q[1:0]);
  assign lpbk = func_q[N_FUNC-1:2];

  abs_subtractor #(.N_DAC(N_DAC), .N_ADC(N_ADC)) u_abs (
    .dac  (dac_data),
    .adc  (adc_data),
    .diff (diff)
  );

  always_comb begin
    unique case (mode)
      ORA_TPG:     sel_data = W'(dac_data);
      ORA_ADC:     sel_data = W'(adc_data);
      ORA_ABSDIFF: sel_data = diff;
      default:     sel_data = '0;
    endcase
  end

  generate
    if (PIPE) begin : g_pipe
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          acc_in <= '0;
          acc_en <= 1'b0;
        end else begin
          acc_in <= sel_data;
          acc_en <= ben;
        end
      end
    end else begin : g_nopipe
      assign acc_in = sel_data;
      assign acc_en = ben;
    end
  endgenerate

  ora_accumulator #(.W_IN(W), .N_ACUM(N_ACUM), .CARRY_FF(CARRY_FF)) u_acc (
    .clk, .rst_n,
    .en         (acc_en),
    .din        (acc_in),
    .aclo_we, .aclo_wdata, .aclo_q,
    .achi_we, .achi_wdata, .achi_q
  );

endmodule
