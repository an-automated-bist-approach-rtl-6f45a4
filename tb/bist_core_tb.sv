// Self-checking testbench for bist_core (Custom interface).
//
// The ADC input is the DAC word looped back with a delay of D = 3 clocks.
// With FS = ramp up, ICNT = 1 and BCNT = 2 the BIST window covers exactly
// the second and third 256-sample ramps, so the signatures are known in
// closed form:
//   TPG mode   2 * (0+1+...+255)              = 65280
//   ADC mode   the same sum, delayed          = 65280
//   |DAC-ADC|  per ramp D*(256-D) twice       = 2 * 2*3*253 = 3036
// The test also checks that BDONE sets on the (ICNT+BCNT)*256 + 2nd clock edge
// after the edge that writes BIST, the DAC words of the ramp, the LPBK bits and that normal
// system data reaches the DAC once BIST is cleared.
module bist_core_tb;
  import bist_pkg::*;
  localparam int D = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic fs_we, mag_we, cont_we, icnt_we, bcnt_we, func_we, aclo_we, achi_we;
  logic [3:0] fs_wdata, fs_q, cont_wdata, cont_q, func_wdata, func_q;
  logic [7:0] mag_wdata, mag_q, icnt_wdata, icnt_q, bcnt_wdata, bcnt_q;
  logic [7:0] aclo_wdata, aclo_q, achi_wdata, achi_q;
  logic [7:0] sys_data, dac_data, adc_data;
  logic [1:0] lpbk;
  logic test_mode, tco, ben;
  logic [7:0] dly [D];

  bist_core dut (.*);

  always_ff @(posedge clk) begin
    dly[0] <= dac_data;
    for (int i = 1; i < D; i++) dly[i] <= dly[i-1];
  end
  assign adc_data = dly[D-1];

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_test(input ora_mode_e m, input int exp_sig);
    int cyc, sample, bad;
    @(negedge clk);
    fs_we = 1; fs_wdata = FS_RAMP_UP;
    icnt_we = 1; icnt_wdata = 1; bcnt_we = 1; bcnt_wdata = 2;
    func_we = 1; func_wdata = {2'b10, m};
    aclo_we = 1; aclo_wdata = 0; achi_we = 1; achi_wdata = 0;
    cont_we = 1; cont_wdata = 4'b0001;
    @(negedge clk);
    {fs_we, icnt_we, bcnt_we, func_we, aclo_we, achi_we} = '0;
    chk(lpbk == 2'b10 && func_q == {2'b10, m}, "function register and LPBK");
    cont_wdata = 4'b0011;            // start
    @(negedge clk);
    cont_we = 0;
    cyc = 1; sample = 0; bad = 0;
    while (!cont_q[CONT_BDONE] && cyc < 2000) begin
      if (cyc >= 3) begin
        if (dac_data != 8'(sample)) bad++;
        sample++;
      end
      @(negedge clk);
      cyc++;
    end
    chk(bad == 0, $sformatf("ramp words at the DAC, %0d wrong", bad));
    // cyc counts from the half clock after the edge that writes BIST
    chk(cyc == 3 * 256 + 3, $sformatf("BDONE after %0d clocks, expected %0d", cyc, 3 * 256 + 3));
    repeat (4) @(negedge clk);
    chk({achi_q, aclo_q} == 16'(exp_sig),
        $sformatf("mode %0d signature %0d expected %0d", m, {achi_q, aclo_q}, exp_sig));
    chk(cont_q == 4'b1111 && !ben, "control register after the test");
    // back to normal operation
    @(negedge clk); cont_we = 1; cont_wdata = 4'b0001;
    @(negedge clk); cont_we = 0; sys_data = 8'h3c;
    repeat (3) @(negedge clk);
    chk(dac_data == 8'h3c && !test_mode, "system data after the test");
  endtask

  initial begin
    {fs_we, mag_we, cont_we, icnt_we, bcnt_we, func_we, aclo_we, achi_we} = '0;
    fs_wdata = 0; cont_wdata = 0; func_wdata = 0; mag_wdata = 0; icnt_wdata = 0;
    bcnt_wdata = 0; aclo_wdata = 0; achi_wdata = 0; sys_data = 8'h11;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    mag_we = 1; mag_wdata = 8'h99;
    @(negedge clk);
    mag_we = 0;
    chk(mag_q == 8'h99 && fs_q == 0, "magnitude register");
    chk(dac_data == 8'h11, "system data passes before the test");
    one_test(ORA_TPG, 2 * 32640);
    one_test(ORA_ADC, 2 * 32640);
    one_test(ORA_ABSDIFF, 2 * 2 * D * (256 - D));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
