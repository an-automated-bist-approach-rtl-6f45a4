// Self-checking testbench for the analog_loopback_mux model: the output
// follows the selected input voltage.
module analog_loopback_mux_tb;
  int checks = 0, failures = 0;
  real normal_in, loop_in, out;
  logic lpbk;

  analog_loopback_mux dut (.normal_in, .loop_in, .lpbk, .out);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      normal_in = real'($urandom_range(5000)) / 1000.0;
      loop_in   = -real'($urandom_range(5000)) / 1000.0;
      lpbk      = 1'(i);
      #1;
      checks++;
      if (out != (lpbk ? loop_in : normal_in)) begin
        failures++;
        $display("FAIL: lpbk=%0d out=%f", lpbk, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
