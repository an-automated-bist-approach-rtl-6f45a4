// Self-checking testbench for abs_subtractor: exhaustive for 8/8 bits and
// random for unequal widths (6-bit DAC, 10-bit ADC), where the DAC word is
// scaled to the ADC's full scale before subtracting.
module abs_subtractor_tb;
  int checks = 0, failures = 0;
  logic [7:0] a8, b8, d8;
  logic [5:0] a6;
  logic [9:0] b10, d10;

  abs_subtractor #(.N_DAC(8), .N_ADC(8))  dut8  (.dac(a8), .adc(b8),  .diff(d8));
  abs_subtractor #(.N_DAC(6), .N_ADC(10)) dut6  (.dac(a6), .adc(b10), .diff(d10));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int e;
        a8 = 8'(x); b8 = 8'(y);
        #1;
        e = (x > y) ? x - y : y - x;
        checks++;
        if (int'(d8) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: |%0d-%0d| gave %0d", x, y, d8);
        end
      end
    end
    repeat (2000) begin
      int x, y, e;
      x = int'($urandom_range(63)); y = int'($urandom_range(1023));
      a6 = 6'(x); b10 = 10'(y);
      #1;
      e = (x * 16 > y) ? x * 16 - y : y - x * 16;
      checks++;
      if (int'(d10) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: 6/10 |%0d*16-%0d| gave %0d", x, y, d10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
