// Self-checking testbench for test_controller. TCO pulses are driven at
// random intervals; a reference here counts them from the start of the test
// and predicts BEN, IDONE and BDONE every clock for several ICNT/BCNT
// settings, including zero counts. It also checks that BIST cannot be set
// while ENABLE is clear, that clearing ENABLE stops the test, and that ICNT
// and BCNT read back and count down to zero.
module test_controller_tb;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic cont_we, icnt_we, bcnt_we, tco, tpg_active, run, ben;
  logic [3:0] cont_wdata, cont_q;
  logic [7:0] icnt_wdata, icnt_q, bcnt_wdata, bcnt_q;

  test_controller #(.N_ICNT(8), .N_BCNT(8)) dut (
    .clk, .rst_n, .cont_we, .cont_wdata, .cont_q, .icnt_we, .icnt_wdata, .icnt_q,
    .bcnt_we, .bcnt_wdata, .bcnt_q, .tco, .tpg_active, .run, .ben);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_cont(input logic [3:0] v);
    @(negedge clk); cont_we = 1; cont_wdata = v;
    @(negedge clk); cont_we = 0;
  endtask

  task automatic run_test(input int ic, input int bc);
    int n_tco, ben_cycles, exp_ben_cycles;
    @(negedge clk);
    icnt_we = 1; icnt_wdata = 8'(ic); bcnt_we = 1; bcnt_wdata = 8'(bc);
    @(negedge clk);
    icnt_we = 0; bcnt_we = 0;
    chk(icnt_q == 8'(ic) && bcnt_q == 8'(bc), "ICNT/BCNT read-back");
    write_cont(4'b0001);             // ENABLE, clear BIST/IDONE/BDONE
    write_cont(4'b0011);             // ENABLE + BIST
    // the TPG output becomes test data two clocks after BIST is set
    tpg_active = 0;
    n_tco = 0; ben_cycles = 0; exp_ben_cycles = 0;
    for (int c = 0; c < 40 * (ic + bc + 2); c++) begin
      bit exp_ben;
      if (c >= 1) tpg_active = 1;
      tco = tpg_active && ($urandom_range(5) == 0);
      #1;
      // IDONE after ICNT waveform cycles, BDONE after BCNT more
      exp_ben = tpg_active && n_tco >= ic && n_tco < ic + bc;
      chk(ben == exp_ben, $sformatf("ICNT=%0d BCNT=%0d clock %0d tco count %0d: ben=%0d exp %0d",
                                    ic, bc, c, n_tco, ben, exp_ben));
      chk(run, "run while ENABLE and BIST");
      if (ben) ben_cycles++;
      if (exp_ben) exp_ben_cycles++;
      @(negedge clk);
      if (tco) n_tco++;
    end
    chk(cont_q == 4'b1111, $sformatf("control register at end %b", cont_q));
    chk(icnt_q == 0 && bcnt_q == 0, "counters at zero");
    chk(ben_cycles == exp_ben_cycles, "BEN clock count");
    tco = 0;
  endtask

  initial begin
    cont_we = 0; icnt_we = 0; bcnt_we = 0; tco = 0; tpg_active = 0;
    cont_wdata = 0; icnt_wdata = 0; bcnt_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // write protection
    write_cont(4'b1110);
    chk(cont_q == 4'b0000 && !run, "BIST/IDONE/BDONE not writable while ENABLE=0");
    run_test(2, 3);
    run_test(0, 6);
    run_test(6, 6);
    run_test(0, 1);
    run_test(3, 0);
    // clearing ENABLE stops the TPG and BEN
    write_cont(4'b0001);
    write_cont(4'b0011);
    write_cont(4'b0000);
    chk(!run && !ben, "ENABLE=0 stops the test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
