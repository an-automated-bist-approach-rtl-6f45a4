// BIST core with the Custom processor interface.
//
// Wires the test pattern generator (TPG), the test controller and the output
// response analyser (ORA) into the DAC/ADC loopback BIST: the TPG drives the
// DAC in place of the normal system data while a test runs, the ORA compacts
// the DAC input word and/or the ADC output word while the controller's BEN
// is high, and the controller counts the TPG's TCO pulses to time the
// initialisation and BIST sequences.
//
// Custom interface: each of the eight registers (FS, Magnitude, CONT, ICNT,
// BCNT, ORA function, ACLO, ACHI) has its own active-high write enable, input
// bus and output bus, so a system can map them into its own register file
// in any grouping. `test_mode` is high while the TPG is running (ENABLE and
// BIST set); `tco` and `ben` are brought out for observation.
//
// The partition into TPG, test controller and ORA and the custom interface
// follow the document.
module bist_core
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
  localparam int unsigned N_FUNC  = N_LPBK + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // register access (Custom interface)
  input  logic              fs_we,
  input  logic [3:0]        fs_wdata,
  output logic [3:0]        fs_q,
  input  logic              mag_we,
  input  logic [N_DAC-1:0]  mag_wdata,
  output logic [N_DAC-1:0]  mag_q,
  input  logic              cont_we,
  input  logic [3:0]        cont_wdata,
  output logic [3:0]        cont_q,
  input  logic              icnt_we,
  input  logic [N_ICNT-1:0] icnt_wdata,
  output logic [N_ICNT-1:0] icnt_q,
  input  logic              bcnt_we,
  input  logic [N_BCNT-1:0] bcnt_wdata,
  output logic [N_BCNT-1:0] bcnt_q,
  input  logic              func_we,
  input  logic [N_FUNC-1:0] func_wdata,
  output logic [N_FUNC-1:0] func_q,
  input  logic              aclo_we,
  input  logic [N_ACUM-1:0] aclo_wdata,
  output logic [N_ACUM-1:0] aclo_q,
  input  logic              achi_we,
  input  logic [N_ACUM-1:0] achi_wdata,
  output logic [N_ACUM-1:0] achi_q,
  // mixed-signal data path
  input  logic [N_DAC-1:0]  sys_data,
  output logic [N_DAC-1:0]  dac_data,
  input  logic [N_ADC-1:0]  adc_data,
  output logic [N_LPBK-1:0] lpbk,
  output logic              test_mode,
  output logic              tco,
  output logic              ben
);

  logic run, tpg_active;

  tpg #(.N_DAC(N_DAC), .N_PSR(N_PSR)) u_tpg (
    .clk, .rst_n,
    .fs_we, .fs_wdata, .fs_q,
    .mag_we, .mag_wdata, .mag_q,
    .run         (run),
    .sys_data    (sys_data),
    .dac_data    (dac_data),
    .tco         (tco),
    .test_active (tpg_active)
  );

  test_controller #(.N_ICNT(N_ICNT), .N_BCNT(N_BCNT)) u_ctrl (
    .clk, .rst_n,
    .cont_we, .cont_wdata, .cont_q,
    .icnt_we, .icnt_wdata, .icnt_q,
    .bcnt_we, .bcnt_wdata, .bcnt_q,
    .tco        (tco),
    .tpg_active (tpg_active),
    .run        (run),
    .ben        (ben)
  );

  ora #(
    .N_DAC(N_DAC), .N_ADC(N_ADC), .N_ACUM(N_ACUM), .N_LPBK(N_LPBK),
    .PIPE(ORA_PIPE), .CARRY_FF(ACC_CARRY_FF)
  ) u_ora (
    .clk, .rst_n,
    .func_we, .func_wdata, .func_q,
    .aclo_we, .aclo_wdata, .aclo_q,
    .achi_we, .achi_wdata, .achi_q,
    .dac_data (dac_data),
    .adc_data (adc_data),
    .ben      (ben),
    .lpbk     (lpbk)
  );

  assign test_mode = run;

endmodule
