// Self-checking testbench for lfsr_counter.
// Checks, for N = 8, up and down counting with parallel load and the
// carry-out positions, and for every N from 4 to 16 that the LFSR mode runs
// through all 2^N-1 non-zero states with exactly one carry-out per period.
module lfsr_counter_tb;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- N = 8: counter behaviour
  logic en, load, co;
  cnt_mode_e mode;
  logic [7:0] load_val, q;

  lfsr_counter #(.N(8)) dut (.clk, .rst_n, .en, .mode, .load, .load_val, .q, .co);

  // ---- N = 4..16: LFSR periods
  localparam int NMIN = 4, NMAX = 16;
  logic lf_load = 1'b1;
  logic lf_co [NMIN:NMAX];
  int   lf_period [NMIN:NMAX];
  bit   lf_seen_zero [NMIN:NMAX];

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_l
    logic [n-1:0] lq;
    lfsr_counter #(.N(n)) u (.clk, .rst_n, .en(1'b1), .mode(CNT_LFSR), .load(lf_load),
                             .load_val(n'(1)), .q(lq), .co(lf_co[n]));
    always @(posedge clk) if (!lf_load && rst_n && lq == '0) lf_seen_zero[n] = 1'b1;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; load = 0; mode = CNT_UP; load_val = '0;
    for (int n = NMIN; n <= NMAX; n++) begin lf_period[n] = 0; lf_seen_zero[n] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // up count from 250
    load = 1; load_val = 8'd250; mode = CNT_UP;
    @(negedge clk);
    load = 0; en = 1;
    for (int i = 0; i < 10; i++) begin
      check(q == 8'(250 + i), $sformatf("up count step %0d q=%0d", i, q));
      check(co == (q == 8'd255), "up carry-out");
      @(negedge clk);
    end
    // down count from 3
    load = 1; load_val = 8'd3; mode = CNT_DOWN;
    @(negedge clk);
    load = 0;
    for (int i = 0; i < 6; i++) begin
      check(q == 8'(3 - i), $sformatf("down count step %0d q=%0d", i, q));
      check(co == (q == 8'd0), "down carry-out");
      @(negedge clk);
    end
    // hold when disabled
    en = 0;
    begin
      logic [7:0] keep;
      keep = q;
      repeat (3) @(negedge clk);
      check(q == keep, "hold when en=0");
    end
    // load has priority over enable
    en = 1; load = 1; load_val = 8'h5a;
    @(negedge clk);
    check(q == 8'h5a, "load priority");
    load = 0;
    // LFSR mode, N = 8: all 255 states distinct, co once
    load = 1; load_val = 8'd1; mode = CNT_LFSR;
    @(negedge clk);
    load = 0;
    begin
      bit seen [256];
      int cos = 0;
      int distinct = 0;
      for (int i = 0; i < 256; i++) seen[i] = 0;
      for (int i = 0; i < 255; i++) begin
        if (!seen[q]) distinct++;
        seen[q] = 1;
        if (co) cos++;
        @(negedge clk);
      end
      check(distinct == 255 && !seen[0], $sformatf("LFSR8 distinct states %0d", distinct));
      check(cos == 1, $sformatf("LFSR8 carry-outs per period %0d", cos));
      check(q == 8'd1, "LFSR8 back to seed after 255 clocks");
    end
    // periods for N = 4..16
    lf_load = 0;
    begin
      int cyc = 0;
      int first [NMIN:NMAX];
      for (int n = NMIN; n <= NMAX; n++) first[n] = -1;
      while (cyc < 2 * (1 << NMAX) + 10) begin
        @(negedge clk);
        cyc++;
        for (int n = NMIN; n <= NMAX; n++) begin
          if (lf_co[n]) begin
            if (first[n] < 0) first[n] = cyc;
            else if (lf_period[n] == 0) lf_period[n] = cyc - first[n];
          end
        end
      end
      for (int n = NMIN; n <= NMAX; n++) begin
        check(lf_period[n] == (1 << n) - 1,
              $sformatf("LFSR N=%0d period %0d", n, lf_period[n]));
        check(!lf_seen_zero[n], $sformatf("LFSR N=%0d reached zero", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
