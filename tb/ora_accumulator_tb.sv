// Self-checking testbench for ora_accumulator: random inputs summed into the
// 2*N_ACUM-bit ACHI:ACLO pair against an integer model, with and without the
// carry flip-flop, including register writes and the hold when en is low.
module ora_accumulator_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic en;
  logic [7:0] din;
  logic aclo_we, achi_we;
  logic [7:0] aclo_wdata, achi_wdata;
  logic [7:0] lo0, hi0, lo1, hi1;

  ora_accumulator #(.W_IN(8), .N_ACUM(8), .CARRY_FF(1'b0)) dut0 (
    .clk, .rst_n, .en, .din, .aclo_we, .aclo_wdata, .aclo_q(lo0),
    .achi_we, .achi_wdata, .achi_q(hi0));
  ora_accumulator #(.W_IN(8), .N_ACUM(8), .CARRY_FF(1'b1)) dut1 (
    .clk, .rst_n, .en, .din, .aclo_we, .aclo_wdata, .aclo_q(lo1),
    .achi_we, .achi_wdata, .achi_q(hi1));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sum(input int unsigned exp, input string what);
    checks += 2;
    if ({hi0, lo0} != 16'(exp)) begin
      failures++; $display("FAIL: %s no carry FF: %0d exp %0d", what, {hi0, lo0}, exp);
    end
    if ({hi1, lo1} != 16'(exp)) begin
      failures++; $display("FAIL: %s carry FF: %0d exp %0d", what, {hi1, lo1}, exp);
    end
  endtask

  initial begin
    int unsigned sum;
    en = 0; din = 0; aclo_we = 0; achi_we = 0; aclo_wdata = 0; achi_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      // write initial values (zero, then a non-zero start)
      @(negedge clk);
      aclo_we = 1; achi_we = 1;
      aclo_wdata = (run == 2) ? 8'd200 : 8'd0;
      achi_wdata = (run == 2) ? 8'd3 : 8'd0;
      sum = (run == 2) ? 3 * 256 + 200 : 0;
      @(negedge clk);
      aclo_we = 0; achi_we = 0;
      check_sum(sum, "after write");
      for (int i = 0; i < 150; i++) begin
        en  = 1'($urandom_range(3) != 0);
        din = 8'($urandom);
        if (run == 1) din = 8'hff;
        if (en) sum += din;
        @(negedge clk);
      end
      en = 0;
      @(negedge clk);  // carry flip-flop settles
      check_sum(sum, $sformatf("run %0d", run));
      repeat (5) @(negedge clk);
      check_sum(sum, "hold with en=0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
