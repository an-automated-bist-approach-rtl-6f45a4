// Mixed-signal DAC/ADC loopback BIST with the Serial processor interface.
//
// This is the complete BIST as it is added to a mixed-signal system: the test
// pattern generator drives the DAC input in place of the normal system data,
// an analog loopback multiplexer can return the DAC output straight to the
// ADC, and the output response analyser compacts what comes back from the
// ADC into a signature that the system reads after the test.
//
// Serial interface. All eight BIST registers are reached through four
// signals. An N_ACUM+4-bit shift register takes a command on PDI, one bit per
// clock while PE=1 and PSL=0: first the N_ACUM data bits, LSB first, then the
// 3 address bits, LSB first, then the R/W bit. A clock with PE=1 and PSL=1
// executes the command: with R/W=1 the data is written to the addressed
// register; with R/W=0 the addressed register is loaded into the data bits
// of the shift register, from where it is shifted out on PDO (bit 0 of the
// shift register, LSB first) by further clocks with PE=1 and PSL=0. A
// command therefore takes N_ACUM+4 shift clocks and one execute clock.
// With SYNC_PE = 1 the PE input first passes through a two-flip-flop
// synchroniser and one-shot, so that each rising edge of PE, for example
// from a boundary-scan controller on another clock, counts as one clock of
// PE=1; PSL and PDI must then be held steady around it.
//
// Analog side. `dac_vout` is the DAC's output voltage, `cut_vout` the output
// of the analog circuitry under test, `adc_vin` the voltage presented to the
// ADC. LPBK[0] drives the loopback multiplexer between them (behavioural
// model); the other LPBK bits are brought out on `lpbk` for further
// multiplexers.
//
// The serial protocol, the register set, the structure and the parameters
// follow the document; the default sizes N_DAC = N_ADC = N_ACUM = 8 are one
// of its synthesised configurations. The address map, the order of the
// address bits and the sizes N_ICNT = N_BCNT = 8, N_LPBK = 2 are this
// design's choices.
module mixed_signal_bist
  import bist_pkg::*;
#(
  parameter int unsigned N_DAC    = 8,
  parameter int unsigned N_ADC    = 8,
  parameter int unsigned N_ACUM   = 8,
  parameter int unsigned N_PSR    = 1,
  parameter int unsigned N_ICNT   = 8,
  parameter int unsigned N_BCNT   = 8,
  parameter int unsigned N_LPBK   = 2,
  parameter bit          ORA_PIPE = 1'b1,
  parameter bit          ACC_CARRY_FF = 1'b0,
  parameter bit          SYNC_PE  = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // serial processor interface
  input  logic              pe,
  input  logic              psl,
  input  logic              pdi,
  output logic              pdo,
  // digital side of the mixed-signal system
  input  logic [N_DAC-1:0]  sys_data,
  output logic [N_DAC-1:0]  dac_data,
  input  logic [N_ADC-1:0]  adc_data,
  output logic [N_LPBK-1:0] lpbk,
  output logic              test_mode,
  output logic              ben,
  output logic              tco,
  // analog side (behavioural)
  input  real               dac_vout,
  input  real               cut_vout,
  output real               adc_vin
);

  localparam int unsigned SR_W = N_ACUM + 4;

  logic            pe_i;
  logic [SR_W-1:0] sr;
  logic [2:0]      addr;
  logic            rw_bit, wr;
  logic [N_ACUM-1:0] dout;

  generate
    if (SYNC_PE) begin : g_sync
      sync_oneshot u_sync (.clk, .rst_n, .async_in(pe), .pulse(pe_i));
    end else begin : g_nosync
      assign pe_i = pe;
    end
  endgenerate

  assign addr   = sr[N_ACUM +: 3];
  assign rw_bit = sr[SR_W-1];
  assign wr     = pe_i && psl && rw_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
    end else if (pe_i) begin
      if (!psl)        sr <= {pdi, sr[SR_W-1:1]};
      else if (!rw_bit) sr[N_ACUM-1:0] <= dout;
    end
  end

  assign pdo = sr[0];

  parallel_if #(
    .N_DAC(N_DAC), .N_ADC(N_ADC), .N_ACUM(N_ACUM), .N_PSR(N_PSR),
    .N_ICNT(N_ICNT), .N_BCNT(N_BCNT), .N_LPBK(N_LPBK),
    .ORA_PIPE(ORA_PIPE), .ACC_CARRY_FF(ACC_CARRY_FF)
  ) u_par (
    .clk, .rst_n,
    .addr (addr),
    .rw   (wr),
    .din  (sr[N_ACUM-1:0]),
    .dout (dout),
    .sys_data, .dac_data, .adc_data, .lpbk, .test_mode, .tco, .ben
  );

  analog_loopback_mux u_lpbk (
    .normal_in (cut_vout),
    .loop_in   (dac_vout),
    .lpbk      (lpbk[0]),
    .out       (adc_vin)
  );

endmodule
