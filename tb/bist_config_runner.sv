// Test driver for one instance of mixed_signal_bist at a given size.
//
// Instantiates the BIST with the given parameters, loops the DAC word back
// to the ADC digitally (rescaled to N_ADC bits with the full scales aligned,
// delayed by two clocks) and runs three complete BIST sessions over the
// serial interface: a ramp in TPG mode, whose signature must be
// 0+1+...+(2^N_DAC-1), and a ramp and a triangle in ADC and |DAC-ADC| mode,
// whose signatures are summed here from the recorded words over the BIST
// window. With SYNC_PE = 1 the PE line is driven like a slow boundary-scan
// clock (several clocks high, several low) and each high phase must count
// once. Reports its check and failure counts and raises `done`.
module bist_config_runner #(
  parameter int unsigned N_DAC  = 8,
  parameter int unsigned N_ADC  = 8,
  parameter int unsigned N_ACUM = 8,
  parameter bit          SYNC_PE  = 1'b0,
  parameter bit          ORA_PIPE = 1'b1,
  parameter bit          ACC_CARRY_FF = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import bist_pkg::*;
  localparam int unsigned W = (N_DAC > N_ADC) ? N_DAC : N_ADC;

  logic pe, psl, pdi, pdo, test_mode, ben, tco;
  logic [N_DAC-1:0] sys_data, dac_data;
  logic [N_ADC-1:0] adc_data, adc_d1;
  logic [1:0] lpbk;
  real adc_vin;

  mixed_signal_bist #(
    .N_DAC(N_DAC), .N_ADC(N_ADC), .N_ACUM(N_ACUM),
    .SYNC_PE(SYNC_PE), .ORA_PIPE(ORA_PIPE), .ACC_CARRY_FF(ACC_CARRY_FF)
  ) dut (
    .clk, .rst_n, .pe, .psl, .pdi, .pdo, .sys_data, .dac_data, .adc_data, .lpbk,
    .test_mode, .ben, .tco, .dac_vout(0.0), .cut_vout(0.0), .adc_vin);

  function automatic logic [N_ADC-1:0] to_adc(input logic [N_DAC-1:0] d);
    logic [W-1:0] full;
    full = W'(d) << (W - N_DAC);
    return N_ADC'(full >> (W - N_ADC));
  endfunction

  always_ff @(posedge clk) begin
    adc_d1   <= to_adc(dac_data);
    adc_data <= adc_d1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (N_DAC=%0d N_ADC=%0d N_ACUM=%0d): %s", N_DAC, N_ADC, N_ACUM, what);
    end
  endtask

  // one PE "clock": a single cycle, or a slow pulse through the synchroniser
  task automatic pe_step(input logic s, input logic b);
    psl = s; pdi = b;
    if (SYNC_PE) begin
      pe = 1; repeat (4) @(negedge clk);
      pe = 0; repeat (4) @(negedge clk);
    end else begin
      pe = 1; @(negedge clk);
      pe = 0;
    end
  endtask

  task automatic ser_shift(input reg_addr_e a, input bit rw, input logic [N_ACUM-1:0] d);
    for (int i = 0; i < int'(N_ACUM); i++) pe_step(1'b0, d[i]);
    for (int i = 0; i < 3; i++) pe_step(1'b0, a[i]);
    pe_step(1'b0, rw);
  endtask

  task automatic ser_cmd(input reg_addr_e a, input bit rw, input logic [N_ACUM-1:0] d);
    ser_shift(a, rw, d);
    pe_step(1'b1, 1'b0);
  endtask

  task automatic ser_read(input reg_addr_e a, output logic [N_ACUM-1:0] d);
    ser_cmd(a, 1'b0, '0);
    for (int i = 0; i < int'(N_ACUM); i++) begin
      d[i] = pdo;
      pe_step(1'b0, 1'b0);
    end
  endtask

  // BIST window bookkeeping, as the ORA should see it
  bit armed = 0;
  int age, n_tco, win_bc;
  ora_mode_e mode_set;
  longint unsigned exp_sig;

  always @(posedge clk) begin
    if (armed) begin
      age++;
      if (test_mode && age >= 3) begin
        if (n_tco >= 1 && n_tco < 1 + win_bc) begin
          logic [W-1:0] a, b;
          a = W'(dac_data) << (W - N_DAC);
          b = W'(adc_data) << (W - N_ADC);
          case (mode_set)
            ORA_TPG:     exp_sig += dac_data;
            ORA_ADC:     exp_sig += adc_data;
            ORA_ABSDIFF: exp_sig += (a > b) ? a - b : b - a;
            default: ;
          endcase
        end
        if (tco) n_tco++;
      end
    end
  end

  task automatic session(input fs_e fs, input int ic, input int bc, input ora_mode_e m,
                         input longint unsigned closed_form);
    logic [N_ACUM-1:0] lo, hi, c;
    longint unsigned sig, mask;
    int waited;
    ser_cmd(A_CONT, 1'b1, '0);
    ser_cmd(A_FS, 1'b1, N_ACUM'(fs));
    ser_cmd(A_ICNT, 1'b1, N_ACUM'(ic));
    ser_cmd(A_BCNT, 1'b1, N_ACUM'(bc));
    ser_cmd(A_FUNC, 1'b1, N_ACUM'({2'b01, m}));
    ser_cmd(A_ACLO, 1'b1, '0);
    ser_cmd(A_ACHI, 1'b1, '0);
    ser_cmd(A_CONT, 1'b1, N_ACUM'(1));
    win_bc = bc; mode_set = m; n_tco = 0; exp_sig = 0;
    // set BIST; the window count starts at the edge that executes this
    // command, which the synchroniser delays when SYNC_PE = 1
    ser_shift(A_CONT, 1'b1, N_ACUM'(3));
    psl = 1; pdi = 0; pe = 1;
    if (SYNC_PE) begin
      while (!test_mode) @(negedge clk);
    end else begin
      @(negedge clk);
    end
    pe = 0;
    armed = 1; age = 0;
    waited = 0;
    while (n_tco < ic + bc && waited < 1_000_000) begin @(negedge clk); waited++; end
    repeat (4) @(negedge clk);
    armed = 0;
    ser_read(A_CONT, c);
    chk(c == N_ACUM'(4'hf), $sformatf("control register %0h after the test", c));
    ser_read(A_ACLO, lo);
    ser_read(A_ACHI, hi);
    sig  = longint'({hi, lo});
    mask = (2 * N_ACUM >= 64) ? '1 : (64'(1) << (2 * N_ACUM)) - 1;
    chk(sig == (exp_sig & mask), $sformatf("FS=%0d mode=%0d signature %0d expected %0d", fs, m, sig, exp_sig & mask));
    if (closed_form != 0)
      chk(sig == (closed_form & mask), $sformatf("signature %0d, closed form %0d", sig, closed_form & mask));
  endtask

  initial begin
    longint unsigned ramp_sum;
    logic [N_ACUM-1:0] r;
    done = 0; checks = 0; failures = 0;
    pe = 0; psl = 0; pdi = 0; sys_data = '0;
    @(posedge rst_n);
    repeat (4) @(negedge clk);
    // register read-back through the serial interface
    ser_cmd(A_MAG, 1'b1, N_ACUM'(5));
    ser_read(A_MAG, r);
    chk(r == N_ACUM'(5), "Magnitude read-back");
    ramp_sum = (longint'(1) << (N_DAC - 1)) * ((longint'(1) << N_DAC) - 1);
    session(FS_RAMP_UP, 1, 1, ORA_TPG, ramp_sum);
    session(FS_RAMP_UP, 1, 2, ORA_ADC, 0);
    session(FS_TRIANGLE, 1, 1, ORA_ABSDIFF, 0);
    done = 1;
  end
endmodule
