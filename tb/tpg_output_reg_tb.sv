// Self-checking testbench for tpg_output_reg: random select, zero and data
// values; the DAC word, TCO and the test flag must follow one clock later.
module tpg_output_reg_tb;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  osel_e sel;
  logic zero, tco_in, tco, test;
  logic [7:0] hold_val, mag_val, sys_data, dac_data;

  tpg_output_reg #(.N_DAC(8)) dut (.clk, .rst_n, .sel, .zero, .hold_val, .mag_val,
                                   .sys_data, .tco_in, .dac_data, .tco, .test);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_d;
    logic exp_t, exp_test;
    sel = OSEL_SYSTEM; zero = 0; tco_in = 0; hold_val = 0; mag_val = 0; sys_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      sel      = osel_e'($urandom_range(2));
      zero     = 1'($urandom);
      tco_in   = 1'($urandom);
      hold_val = 8'($urandom);
      mag_val  = 8'($urandom);
      sys_data = 8'($urandom);
      case (sel)
        OSEL_HOLD: exp_d = zero ? 8'h00 : hold_val;
        OSEL_MAG:  exp_d = zero ? 8'h00 : mag_val;
        default:   exp_d = sys_data;
      endcase
      exp_t    = tco_in && sel != OSEL_SYSTEM;
      exp_test = sel != OSEL_SYSTEM;
      @(negedge clk);
      checks++;
      if (dac_data != exp_d || tco != exp_t || test != exp_test) begin
        failures++;
        $display("FAIL: sel=%0d zero=%0d d=%02h exp %02h tco=%0d exp %0d",
                 sel, zero, dac_data, exp_d, tco, exp_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
