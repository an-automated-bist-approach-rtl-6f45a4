// BIST with the Parallel processor interface.
//
// Puts an address decoder and a read multiplexer in front of the BIST core so
// that its eight registers share one N_ACUM-bit input bus and one N_ACUM-bit
// output bus. While `rw` is high the register named by `addr` is written from
// `din` at the clock edge (rw acts as a level write strobe). `dout` always
// shows the register named by `addr`, combinationally. Registers narrower
// than N_ACUM use the low bits of `din` and read back with zeros above.
//
// Address map: 0 FS, 1 Magnitude, 2 CONT, 3 ICNT, 4 BCNT, 5 ORA function,
// 6 ACLO, 7 ACHI (see bist_pkg). The decoder, the read multiplexer, the bus
// width N_ACUM and the zero-filling follow the document; the address map is
// this design's choice.
module parallel_if
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
  parameter bit          ACC_CARRY_FF = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        addr,
  input  logic              rw,
  input  logic [N_ACUM-1:0] din,
  output logic [N_ACUM-1:0] dout,
  input  logic [N_DAC-1:0]  sys_data,
  output logic [N_DAC-1:0]  dac_data,
  input  logic [N_ADC-1:0]  adc_data,
  output logic [N_LPBK-1:0] lpbk,
  output logic              test_mode,
  output logic              tco,
  output logic              ben
);

  localparam int unsigned N_FUNC = N_LPBK + 2;

  initial begin
    if (N_ACUM < N_DAC || N_ACUM < N_ADC || N_ACUM < N_ICNT ||
        N_ACUM < N_BCNT || N_ACUM < N_FUNC || N_ACUM < 4)
      $error("parallel_if: N_ACUM must be at least as wide as every register");
  end

  logic [7:0] we;
  logic [3:0]        fs_q, cont_q;
  logic [N_DAC-1:0]  mag_q;
  logic [N_ICNT-1:0] icnt_q;
  logic [N_BCNT-1:0] bcnt_q;
  logic [N_FUNC-1:0] func_q;
  logic [N_ACUM-1:0] aclo_q, achi_q;

  // address decoder
  always_comb begin
    we       = '0;
    we[addr] = rw;
  end

  bist_core #(
    .N_DAC(N_DAC), .N_ADC(N_ADC), .N_ACUM(N_ACUM), .N_PSR(N_PSR),
    .N_ICNT(N_ICNT), .N_BCNT(N_BCNT), .N_LPBK(N_LPBK),
    .ORA_PIPE(ORA_PIPE), .ACC_CARRY_FF(ACC_CARRY_FF)
  ) u_core (
    .clk, .rst_n,
    .fs_we   (we[A_FS]),   .fs_wdata   (din[3:0]),        .fs_q,
    .mag_we  (we[A_MAG]),  .mag_wdata  (din[N_DAC-1:0]),  .mag_q,
    .cont_we (we[A_CONT]), .cont_wdata (din[3:0]),        .cont_q,
    .icnt_we (we[A_ICNT]), .icnt_wdata (din[N_ICNT-1:0]), .icnt_q,
    .bcnt_we (we[A_BCNT]), .bcnt_wdata (din[N_BCNT-1:0]), .bcnt_q,
    .func_we (we[A_FUNC]), .func_wdata (din[N_FUNC-1:0]), .func_q,
    .aclo_we (we[A_ACLO]), .aclo_wdata (din),             .aclo_q,
    .achi_we (we[A_ACHI]), .achi_wdata (din),             .achi_q,
    .sys_data, .dac_data, .adc_data, .lpbk, .test_mode, .tco, .ben
  );

  // read multiplexer
  always_comb begin
    unique case (reg_addr_e'(addr))
      A_FS:    dout = N_ACUM'(fs_q);
      A_MAG:   dout = N_ACUM'(mag_q);
      A_CONT:  dout = N_ACUM'(cont_q);
      A_ICNT:  dout = N_ACUM'(icnt_q);
      A_BCNT:  dout = N_ACUM'(bcnt_q);
      A_FUNC:  dout = N_ACUM'(func_q);
      A_ACLO:  dout = aclo_q;
      default: dout = achi_q;
    endcase
  end

endmodule
