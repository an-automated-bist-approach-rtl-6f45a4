// Runs the BIST at every size the synthesis tables list (N_DAC / N_ADC /
// N_ACUM = 4/4/12, 4/8/12, 4/12/12, 8/4/12, 12/4/12, 12/12/12, 8/8/8), and
// the default size with the options: PE synchroniser, registered
// accumulator carry, and no ORA pipeline. Each size gets complete BIST
// sessions over the serial interface with digitally looped-back data (see
// bist_config_runner); the results of all instances are added up.
module table_configs_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 10;
  logic done [NCFG];
  int   ch [NCFG], fl [NCFG];

  bist_config_runner #(.N_DAC(4),  .N_ADC(4),  .N_ACUM(12)) r0 (.clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  bist_config_runner #(.N_DAC(4),  .N_ADC(8),  .N_ACUM(12)) r1 (.clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  bist_config_runner #(.N_DAC(4),  .N_ADC(12), .N_ACUM(12)) r2 (.clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fl[2]));
  bist_config_runner #(.N_DAC(8),  .N_ADC(4),  .N_ACUM(12)) r3 (.clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fl[3]));
  bist_config_runner #(.N_DAC(12), .N_ADC(4),  .N_ACUM(12)) r4 (.clk, .rst_n, .done(done[4]), .checks(ch[4]), .failures(fl[4]));
  bist_config_runner #(.N_DAC(12), .N_ADC(12), .N_ACUM(12)) r5 (.clk, .rst_n, .done(done[5]), .checks(ch[5]), .failures(fl[5]));
  bist_config_runner #(.N_DAC(8),  .N_ADC(8),  .N_ACUM(8))  r6 (.clk, .rst_n, .done(done[6]), .checks(ch[6]), .failures(fl[6]));
  bist_config_runner #(.SYNC_PE(1'b1))      r7 (.clk, .rst_n, .done(done[7]), .checks(ch[7]), .failures(fl[7]));
  bist_config_runner #(.ACC_CARRY_FF(1'b1)) r8 (.clk, .rst_n, .done(done[8]), .checks(ch[8]), .failures(fl[8]));
  bist_config_runner #(.ORA_PIPE(1'b0))     r9 (.clk, .rst_n, .done(done[9]), .checks(ch[9]), .failures(fl[9]));

  int checks, failures;

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin checks += ch[i]; failures += fl[i]; end
  endfunction

  initial begin
    #100_000_000;
    total();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NCFG; i++) if (!done[i]) all_done = 0;
    end while (!all_done);
    total();
    for (int i = 0; i < NCFG; i++)
      $display("configuration %0d: %0d checks, %0d failures", i, ch[i], fl[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
