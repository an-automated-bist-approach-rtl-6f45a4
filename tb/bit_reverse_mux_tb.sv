// Self-checking testbench for bit_reverse_mux: every 8-bit value with and
// without reversal, and random 12-bit values, against a reference loop.
module bit_reverse_mux_tb;
  int checks = 0, failures = 0;
  logic [7:0]  d8, q8;
  logic [11:0] d12, q12;
  logic        rev;

  bit_reverse_mux #(.N(8))  dut8  (.d(d8),  .rev, .q(q8));
  bit_reverse_mux #(.N(12)) dut12 (.d(d12), .rev, .q(q12));

  function automatic logic [11:0] ref_rev(input logic [11:0] v, input int n);
    logic [11:0] r = '0;
    for (int i = 0; i < n; i++) r[n-1-i] = v[i];
    return r;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      rev = r[0];
      for (int v = 0; v < 256; v++) begin
        d8 = 8'(v);
        #1;
        checks++;
        if (q8 != (rev ? 8'(ref_rev(12'(v), 8)) : 8'(v))) begin
          failures++;
          $display("FAIL: N=8 rev=%0d d=%02h q=%02h", rev, d8, q8);
        end
      end
      repeat (200) begin
        d12 = 12'($urandom);
        #1;
        checks++;
        if (q12 != (rev ? ref_rev(d12, 12) : d12)) begin
          failures++;
          $display("FAIL: N=12 rev=%0d d=%03h q=%03h", rev, d12, q12);
        end
      end
    end
    // a spot value worked by hand: 8'b0000_0001 -> 8'b1000_0000
    rev = 1; d8 = 8'h01; #1;
    checks++; if (q8 != 8'h80) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
