// Self-checking testbench for sync_oneshot: each rising edge of a slow
// input gives exactly one one-clock pulse, two to three clocks later.
module sync_oneshot_tb;
  logic clk = 1'b0, rst_n = 1'b0, async_in = 1'b0, pulse;
  int checks = 0, failures = 0;
  int pulses = 0;
  always #5 clk = ~clk;

  sync_oneshot dut (.clk, .rst_n, .async_in, .pulse);

  always @(posedge clk) if (rst_n && pulse) pulses++;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 20; k++) begin
      int hi, lo, n_prev, lat;
      hi = int'($urandom_range(2, 9));
      lo = int'($urandom_range(2, 9));
      #($urandom_range(1, 9));       // edge at an arbitrary point in the clock period
      n_prev = pulses;
      async_in = 1'b1;
      lat = 0;
      while (!pulse && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat < 2 || lat > 3) begin failures++; $display("FAIL: latency %0d", lat); end
      @(negedge clk);
      checks++;
      if (pulse) begin failures++; $display("FAIL: pulse longer than one clock"); end
      repeat (hi) @(negedge clk);
      async_in = 1'b0;
      repeat (lo + 3) @(negedge clk);
      checks++;
      if (pulses != n_prev + 1) begin failures++; $display("FAIL: %0d pulses", pulses - n_prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
