// Self-checking testbench for parallel_if. Writes every register through
// the address decoder and reads it back through the read multiplexer
// (narrow registers must read back zero-filled), checks that rw=0 writes
// nothing, then runs a DC test (Magnitude 5, ICNT 0, BCNT 1, TPG mode):
// the signature is 256 samples of 5 = 1280, i.e. ACHI = 5, ACLO = 0, which
// also exercises the carry from ACLO into ACHI.
module parallel_if_tb;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [2:0] addr;
  logic rw;
  logic [7:0] din, dout, sys_data, dac_data, adc_data;
  logic [1:0] lpbk;
  logic test_mode, tco, ben;

  parallel_if dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input reg_addr_e a, input logic [7:0] v);
    @(negedge clk); addr = a; din = v; rw = 1;
    @(negedge clk); rw = 0;
  endtask

  task automatic rd(input reg_addr_e a, input logic [7:0] exp, input string what);
    @(negedge clk); addr = a; rw = 0; #1;
    checks++;
    if (dout != exp) begin failures++; $display("FAIL: %s read %02h expected %02h", what, dout, exp); end
  endtask

  initial begin
    rw = 0; addr = 0; din = 0; sys_data = 8'h42; adc_data = 8'h00;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wr(A_FS, 8'hf7);   rd(A_FS, 8'h07, "FS (4 bits)");
    wr(A_MAG, 8'ha5);  rd(A_MAG, 8'ha5, "Magnitude");
    wr(A_ICNT, 8'h12); rd(A_ICNT, 8'h12, "ICNT");
    wr(A_BCNT, 8'h34); rd(A_BCNT, 8'h34, "BCNT");
    wr(A_FUNC, 8'hfe); rd(A_FUNC, 8'h0e, "ORA function (4 bits)");
    wr(A_ACLO, 8'h56); rd(A_ACLO, 8'h56, "ACLO");
    wr(A_ACHI, 8'h78); rd(A_ACHI, 8'h78, "ACHI");
    wr(A_CONT, 8'hfe); rd(A_CONT, 8'h00, "CONT protected while ENABLE=0");
    // rw low writes nothing
    @(negedge clk); addr = A_MAG; din = 8'h00; rw = 0;
    @(negedge clk);
    rd(A_MAG, 8'ha5, "Magnitude unchanged with rw=0");
    checks++;
    if (lpbk != 2'b11) begin failures++; $display("FAIL: lpbk"); end
    // DC test
    wr(A_FS, FS_DC); wr(A_MAG, 8'd5); wr(A_ICNT, 0); wr(A_BCNT, 1);
    wr(A_FUNC, {6'b0, ORA_TPG}); wr(A_ACLO, 0); wr(A_ACHI, 0);
    wr(A_CONT, 8'h01); wr(A_CONT, 8'h03);
    checks++;
    if (!test_mode) begin failures++; $display("FAIL: test not started"); end
    repeat (300) @(negedge clk);
    rd(A_CONT, 8'h0f, "CONT after test");
    rd(A_ACHI, 8'd5, "ACHI signature");
    rd(A_ACLO, 8'd0, "ACLO signature");
    rd(A_ICNT, 8'd0, "ICNT after test");
    wr(A_CONT, 8'h00);
    repeat (3) @(negedge clk);
    checks++;
    if (dac_data != 8'h42) begin failures++; $display("FAIL: system data after test"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
