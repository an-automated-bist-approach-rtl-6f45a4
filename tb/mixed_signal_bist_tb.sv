// End-to-end testbench for mixed_signal_bist at its default parameters
// (N_DAC = N_ADC = N_ACUM = 8, N_PSR = 1).
//
// The analog side is modelled here: an ideal 8-bit DAC (code * 5 V / 256),
// an inverting first-order high-pass filter biased at 2.5 V as the analog
// circuit under test, and an 8-bit ADC that samples on every clock. All
// register accesses go through the serial interface (PE, PSL, PDI, PDO).
//
// For each of the sixteen waveforms a complete BIST is run: registers
// written, ENABLE and BIST set, one initialisation cycle and one BIST cycle
// of the waveform, signature read back. The ORA mode and the loopback are
// varied between runs. The testbench records the words at the DAC and ADC
// and, from the TCO pulses and the start time, works out which samples fall
// in the BIST window and what the signature must be. Further runs check the
// digital self-test signature of a ramp in closed form (0+1+...+255 = 32640),
// a transient and a steady-state run as in the saw-tooth/high-pass example,
// and that a CUT with a gain fault gives a different signature from the good
// one. Each mechanism is counted and one that never happened is a failure.
module mixed_signal_bist_tb;
  import bist_pkg::*;
  localparam int NA = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic pe, psl, pdi, pdo;
  logic [7:0] sys_data, dac_data, adc_data;
  logic [1:0] lpbk;
  logic test_mode, ben, tco;
  real dac_vout, cut_vout, adc_vin;

  mixed_signal_bist dut (.*);

  // ------------------------------------------------------ analog models
  real hp_y = 0.0, hp_xprev = 0.0, hp_a = 0.97, cut_gain = 1.0;
  assign dac_vout = real'(dac_data) * 5.0 / 256.0;
  assign cut_vout = 2.5 - cut_gain * hp_y;

  always @(posedge clk) begin
    int code;
    hp_y     <= hp_a * (hp_y + dac_vout - hp_xprev);
    hp_xprev <= dac_vout;
    code = int'($floor(adc_vin * 256.0 / 5.0));
    if (code < 0) code = 0;
    if (code > 255) code = 255;
    adc_data <= 8'(code);
  end

  // ---------------------------------------------------- mechanism counters
  typedef enum int {M_SER_WRITE, M_SER_READ, M_PROTECT, M_INIT_SEQ, M_BIST_SEQ,
                    M_MODE_TPG, M_MODE_ADC, M_MODE_ABS, M_LOOPBACK, M_CUT_PATH,
                    M_ACHI_CARRY, M_FREEZE, M_FAULT_DETECT, M_SYS_DATA, M_NUM} mech_e;
  int mech [M_NUM];
  int wave_tco [16];

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // --------------------------------------------------- serial interface
  task automatic shift_bit(input logic b);
    pe = 1; psl = 0; pdi = b;
    @(negedge clk);
  endtask

  task automatic ser_cmd(input reg_addr_e a, input bit rw, input logic [NA-1:0] d);
    for (int i = 0; i < NA; i++) shift_bit(d[i]);
    for (int i = 0; i < 3; i++) shift_bit(a[i]);
    shift_bit(rw);
    pe = 1; psl = 1;
    @(negedge clk);
    pe = 0; psl = 0;
  endtask

  task automatic ser_write(input reg_addr_e a, input logic [NA-1:0] d);
    ser_cmd(a, 1'b1, d);
    mech[M_SER_WRITE]++;
  endtask

  task automatic ser_read(input reg_addr_e a, output logic [NA-1:0] d);
    ser_cmd(a, 1'b0, '0);
    for (int i = 0; i < NA; i++) begin
      d[i] = pdo;
      shift_bit(1'b0);
    end
    pe = 0;
    mech[M_SER_READ]++;
  endtask

  // ------------------------------------------------ window and signature
  bit    armed = 0;
  int    age, n_tco, icnt_set, bcnt_set, win_samples;
  ora_mode_e mode_set;
  longint unsigned exp_sig;
  int    cur_fs;

  always @(posedge clk) begin
    if (armed) begin
      age++;
      if (age >= 3) begin
        if (n_tco >= icnt_set && n_tco < icnt_set + bcnt_set) begin
          win_samples++;
          case (mode_set)
            ORA_TPG: exp_sig += dac_data;
            ORA_ADC: exp_sig += adc_data;
            ORA_ABSDIFF: exp_sig += (dac_data > adc_data) ? dac_data - adc_data : adc_data - dac_data;
            default: ;
          endcase
        end
        if (tco) begin n_tco++; wave_tco[cur_fs]++; end
      end
    end
  end

  task automatic run_bist(input int fs, input int mag, input int ic, input int bc,
                          input ora_mode_e m, input bit loop, output logic [15:0] sig);
    logic [NA-1:0] lo, hi, c, lo2, hi2;
    int waited, ben_clocks;
    ser_write(A_CONT, 8'h00);               // stop the previous test
    ser_write(A_FS, NA'(fs));
    ser_write(A_MAG, NA'(mag));
    ser_write(A_ICNT, NA'(ic));
    ser_write(A_BCNT, NA'(bc));
    ser_write(A_FUNC, {5'b0, loop, m});
    ser_write(A_ACLO, 0);
    ser_write(A_ACHI, 0);
    ser_write(A_CONT, 8'h01);               // ENABLE
    icnt_set = ic; bcnt_set = bc; mode_set = m; cur_fs = fs;
    n_tco = 0; exp_sig = 0; win_samples = 0;
    ser_cmd(A_CONT, 1'b1, 8'h03);           // ENABLE + BIST
    mech[M_SER_WRITE]++;
    armed = 1; age = 0;
    chk(test_mode, "test mode after BIST is set");
    chk(lpbk[0] == loop, "loopback control");
    waited = 0; ben_clocks = 0;
    while (n_tco < ic + bc && waited < 200_000) begin
      @(negedge clk);
      if (ben) ben_clocks++;
      waited++;
    end
    repeat (4) @(negedge clk);
    armed = 0;
    ser_read(A_CONT, c);
    chk(c == 8'h0f, $sformatf("FS=%0d CONT=%02h after the test", fs, c));
    ser_read(A_ACLO, lo);
    ser_read(A_ACHI, hi);
    sig = {hi, lo};
    chk(sig == 16'(exp_sig), $sformatf("FS=%0d mode=%0d loop=%0d signature %0d expected %0d",
                                        fs, m, loop, sig, 16'(exp_sig)));
    chk(ben_clocks == win_samples, $sformatf("FS=%0d BEN clocks %0d window %0d", fs, ben_clocks, win_samples));
    // the signature stays frozen after BDONE
    repeat (50) @(negedge clk);
    ser_read(A_ACLO, lo2);
    ser_read(A_ACHI, hi2);
    chk({hi2, lo2} == sig, "signature frozen after BDONE");
    if ({hi2, lo2} == sig) mech[M_FREEZE]++;
    if (ic > 0 && c[CONT_IDONE]) mech[M_INIT_SEQ]++;
    if (c[CONT_BDONE]) mech[M_BIST_SEQ]++;
    if (hi != 0) mech[M_ACHI_CARRY]++;
    case (m)
      ORA_TPG: mech[M_MODE_TPG]++;
      ORA_ADC: mech[M_MODE_ADC]++;
      ORA_ABSDIFF: mech[M_MODE_ABS]++;
      default: ;
    endcase
    if (loop) mech[M_LOOPBACK]++; else mech[M_CUT_PATH]++;
  endtask

  initial begin
    logic [15:0] sig, sig_t, sig_s, sig_good, sig_bad;
    logic [NA-1:0] r;
    pe = 0; psl = 0; pdi = 0; sys_data = 8'h5a;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // normal operation: system data reaches the DAC
    repeat (2) @(negedge clk);
    chk(dac_data == 8'h5a && !test_mode, "system data in normal operation");
    if (dac_data == 8'h5a) mech[M_SYS_DATA]++;
    // write protection of the control register
    ser_write(A_CONT, 8'h0e);
    ser_read(A_CONT, r);
    chk(r == 8'h00, "BIST cannot be set while ENABLE=0");
    if (r == 8'h00) mech[M_PROTECT]++;
    // digital self-test of a ramp: 0+1+...+255
    run_bist(FS_RAMP_UP, 0, 0, 1, ORA_TPG, 1'b1, sig);
    chk(sig == 16'd32640, $sformatf("ramp self-test signature %0d", sig));
    // all sixteen waveforms
    for (int fs = 0; fs < 16; fs++) begin
      run_bist(fs, 200, 1, 1, ora_mode_e'(fs % 3), fs[0], sig);
      chk(wave_tco[fs] >= 2, $sformatf("FS=%0d produced %0d TCO", fs, wave_tco[fs]));
    end
    // saw-tooth into the high-pass filter: transient (ICNT=0, BCNT=6) and
    // steady state (ICNT=6, BCNT=6)
    run_bist(FS_RAMP_DOWN, 0, 0, 6, ORA_ADC, 1'b0, sig_t);
    run_bist(FS_RAMP_DOWN, 0, 6, 6, ORA_ADC, 1'b0, sig_s);
    chk(sig_t != sig_s, "transient and steady-state signatures differ");
    // fault detection: gain fault in the analog circuit
    run_bist(FS_TRIANGLE, 0, 1, 2, ORA_ABSDIFF, 1'b0, sig_good);
    cut_gain = 0.8;
    run_bist(FS_TRIANGLE, 0, 1, 2, ORA_ABSDIFF, 1'b0, sig_bad);
    cut_gain = 1.0;
    chk(sig_good != sig_bad, "faulty circuit gives a different signature");
    if (sig_good != sig_bad) mech[M_FAULT_DETECT]++;
    // back to normal operation
    ser_write(A_CONT, 8'h00);
    sys_data = 8'ha6;
    repeat (3) @(negedge clk);
    chk(dac_data == 8'ha6 && !test_mode, "system data after the tests");
    for (int i = 0; i < M_NUM; i++) begin
      mech_e e;
      e = mech_e'(i);
      $display("mechanism %-15s happened %0d times", e.name(), mech[i]);
      chk(mech[i] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
