// Self-checking testbench for prog_shift_reg: the output equals the input
// delayed by N_PSR clocks, for N_PSR = 1 and 3, and clr empties the register.
module prog_shift_reg_tb;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, d = 1'b0;
  logic q1, q3;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prog_shift_reg #(.N_PSR(1)) dut1 (.clk, .rst_n, .clr, .d, .q(q1));
  prog_shift_reg #(.N_PSR(3)) dut3 (.clk, .rst_n, .clr, .d, .q(q3));

  logic [15:0] hist;  // hist[k] = d k clocks ago

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i >= 4) begin
        checks += 2;
        if (q1 != hist[0]) begin failures++; $display("FAIL: N_PSR=1 at %0d", i); end
        if (q3 != hist[2]) begin failures++; $display("FAIL: N_PSR=3 at %0d", i); end
      end
      d = 1'($urandom);
      @(posedge clk);
      hist = {hist[14:0], d};
    end
    // clear
    @(negedge clk); d = 1'b1;
    @(negedge clk); d = 1'b0; clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    repeat (3) begin
      checks++;
      if (q3 !== 1'b0 || q1 !== 1'b0) begin failures++; $display("FAIL: clr"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
