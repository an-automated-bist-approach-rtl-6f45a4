// Self-checking testbench for the ORA. For each compaction mode (TPG data,
// ADC data, |DAC-ADC|) it writes the function register, clears ACLO/ACHI,
// feeds random DAC and ADC words with a random BEN pattern, and compares the
// signature with a sum computed here. Also checks LPBK, the read-back of the
// function register, the 1+PIPE clock latency and the hold after BEN falls.
// A second instance (6-bit DAC, 10-bit ADC, 12-bit accumulator, no pipeline,
// carry flip-flop) covers unequal widths.
module ora_tb;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       func_we, aclo_we, achi_we, ben;
  logic [3:0] func_wdata, func_q;
  logic [7:0] aclo_wdata, achi_wdata, aclo_q, achi_q, dac, adc;
  logic [1:0] lpbk;

  ora #(.N_DAC(8), .N_ADC(8), .N_ACUM(8), .N_LPBK(2)) dut (
    .clk, .rst_n, .func_we, .func_wdata, .func_q, .aclo_we, .aclo_wdata, .aclo_q,
    .achi_we, .achi_wdata, .achi_q, .dac_data(dac), .adc_data(adc), .ben, .lpbk);

  logic [3:0]  f2_q;
  logic [11:0] lo2, hi2;
  logic [5:0]  dac6;
  logic [9:0]  adc10;
  logic [1:0]  lpbk2;
  ora #(.N_DAC(6), .N_ADC(10), .N_ACUM(12), .N_LPBK(2), .PIPE(1'b0), .CARRY_FF(1'b1)) dut2 (
    .clk, .rst_n, .func_we, .func_wdata, .func_q(f2_q), .aclo_we, .aclo_wdata(12'(aclo_wdata)),
    .aclo_q(lo2), .achi_we, .achi_wdata(12'(achi_wdata)), .achi_q(hi2),
    .dac_data(dac6), .adc_data(adc10), .ben, .lpbk(lpbk2));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    func_we = 0; aclo_we = 0; achi_we = 0; ben = 0; dac = 0; adc = 0; dac6 = 0; adc10 = 0;
    func_wdata = 0; aclo_wdata = 0; achi_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 4; m++) begin
      longint unsigned s1, s2;
      @(negedge clk);
      func_we = 1; func_wdata = {2'(m + 1), 2'(m)};
      aclo_we = 1; achi_we = 1; aclo_wdata = 0; achi_wdata = 0;
      @(negedge clk);
      func_we = 0; aclo_we = 0; achi_we = 0;
      chk(func_q == {2'(m + 1), 2'(m)}, "function register read-back");
      chk(lpbk == 2'(m + 1) && lpbk2 == 2'(m + 1), "LPBK bits");
      s1 = 0; s2 = 0;
      for (int i = 0; i < 300; i++) begin
        int x, y, x6, y10;
        ben   = 1'($urandom_range(4) != 0);
        x = int'($urandom_range(255)); y = int'($urandom_range(255));
        x6 = int'($urandom_range(63)); y10 = int'($urandom_range(1023));
        dac = 8'(x); adc = 8'(y); dac6 = 6'(x6); adc10 = 10'(y10);
        if (ben) begin
          case (m)
            0: begin s1 += x; s2 += x6; end
            1: begin s1 += y; s2 += y10; end
            2: begin s1 += (x > y) ? x - y : y - x;
                     s2 += (x6 * 16 > y10) ? x6 * 16 - y10 : y10 - x6 * 16; end
            default: ;
          endcase
        end
        @(negedge clk);
      end
      ben = 0; dac = 8'hff; adc = 8'h00;
      repeat (2) @(negedge clk);
      chk({achi_q, aclo_q} == 16'(s1), $sformatf("mode %0d signature %0d exp %0d", m, {achi_q, aclo_q}, s1));
      chk({hi2, lo2} == 24'(s2), $sformatf("mode %0d wide signature %0d exp %0d", m, {hi2, lo2}, s2));
      repeat (4) @(negedge clk);
      chk({achi_q, aclo_q} == 16'(s1), "signature held after BEN falls");
    end
    // latency: a single BEN clock reaches ACLO after 1 + PIPE = 2 edges
    @(negedge clk);
    func_we = 1; func_wdata = {2'b00, ORA_ADC};
    aclo_we = 1; achi_we = 1; aclo_wdata = 0; achi_wdata = 0;
    @(negedge clk);
    func_we = 0; aclo_we = 0; achi_we = 0;
    ben = 1; adc = 8'd7;
    @(negedge clk);
    ben = 0; adc = 8'd0;
    chk(aclo_q == 0, "no result after one edge (pipeline)");
    @(negedge clk);
    chk(aclo_q == 8'd7, $sformatf("result after two edges, got %0d", aclo_q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
