// Self-checking testbench for the test pattern generator.
//
// Two generators run side by side: N_DAC=8, N_PSR=1 and N_DAC=6, N_PSR=3.
// For every Function Select code the test stops the generator, writes FS and
// the Magnitude register, starts it, and compares every DAC word and TCO
// with a cycle-level reference written here from the waveform definitions:
// LFSR noise (Galois form, x^8+x^6+x^5+x^4+1 and x^6+x^5+1), ramps,
// triangle, bit-reversed counts, frequency sweeps whose start value grows by
// N_PSR per count sequence, parabolic ramp, pulse, DC and step. It also
// checks that system data reaches the DAC while stopped, that the first test
// word arrives two clocks after start, the document's sweep example
// (N_DAC=8, N_PSR=1: start values 0, 1, 2, ..., 254, i.e. a sweep of 32895
// clocks), the 3870-clock period of the bit-reversed sweeps, and that each
// waveform produced its TCO.
module tpg_tb;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       fs_we, mag_we, run;
  logic [3:0] fs_wdata, fs_qa, fs_qb;
  logic [7:0] mag_wdata, mag_qa, sys_a, dac_a;
  logic [5:0] mag_qb, sys_b, dac_b;
  logic       tco_a, tco_b, act_a, act_b;

  tpg #(.N_DAC(8), .N_PSR(1)) dut_a (
    .clk, .rst_n, .fs_we, .fs_wdata, .fs_q(fs_qa), .mag_we, .mag_wdata, .mag_q(mag_qa),
    .run, .sys_data(sys_a), .dac_data(dac_a), .tco(tco_a), .test_active(act_a));
  tpg #(.N_DAC(6), .N_PSR(3)) dut_b (
    .clk, .rst_n, .fs_we, .fs_wdata, .fs_q(fs_qb), .mag_we, .mag_wdata(mag_wdata[5:0]),
    .mag_q(mag_qb), .run, .sys_data(sys_b), .dac_data(dac_b), .tco(tco_b), .test_active(act_b));

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  typedef struct {
    int n, npsr, mx, fs, mag;
    int c, dir, h, tff, age, cap, stepped, k;
  } ref_t;

  function automatic int rv(input int v, input int n);
    int r = 0;
    for (int i = 0; i < n; i++) if (v[i]) r |= 1 << (n - 1 - i);
    return r;
  endfunction

  function automatic int lfsr_next(input int v, input int n);
    int m = (n == 8) ? 'h71 : 'h21;   // x^8+x^6+x^5+x^4+1, x^6+x^5+1 without x^n
    int r = (v << 1) & ((1 << n) - 1);
    if (v[n-1]) r ^= m;
    return r;
  endfunction

  function automatic void ref_init(ref ref_t r, input int n, input int npsr, input int fs, input int mag);
    r.n = n; r.npsr = npsr; r.mx = (1 << n) - 1; r.fs = fs; r.mag = mag;
    r.c = (fs == 0) ? 1 : (fs == 2 || fs == 10) ? r.mx : 0;
    r.dir = 1; r.h = 0; r.tff = 0; r.age = 0; r.cap = 0; r.stepped = 0; r.k = 0;
  endfunction

  // produce the sample and TCO of the current clock, then advance one clock
  function automatic void ref_step(ref ref_t r, output int d, output bit t);
    int fs = r.fs;
    bit br = fs inside {[9:14]};
    if (fs inside {4, 5, 6, 12, 13, 14}) begin
      case (fs)
        4, 12:  d = r.tff ? r.h : 0;
        5, 13:  d = r.tff ? r.mag : 0;
        default: d = r.h;
      endcase
      t = (r.c == r.mx) && !r.cap;
      if (r.c == r.mx) begin
        if (r.cap) r.c = r.h;
        else begin r.c = 0; r.h = 0; r.tff = 0; end
        r.cap = 0; r.age = 0;
      end else begin
        if (r.age == r.npsr) begin
          r.h = br ? rv(r.c, r.n) : r.c; r.tff ^= 1; r.cap = 1;
        end
        r.c++; r.age++;
      end
    end else begin
      case (fs)
        0: begin d = r.c; t = lfsr_next(r.c, r.n) == 1; r.c = lfsr_next(r.c, r.n); end
        1, 9: begin d = br ? rv(r.c, r.n) : r.c; t = r.c == r.mx; r.c = (r.c + 1) & r.mx; end
        2, 10: begin d = br ? rv(r.c, r.n) : r.c; t = r.c == 0; r.c = (r.c - 1) & r.mx; end
        3, 11: begin
          d = br ? rv(r.c, r.n) : r.c;
          t = !r.dir && r.c == 1;
          if (r.dir) begin r.c++; if (r.c == r.mx) r.dir = 0; end
          else begin r.c--; if (r.c == 0) r.dir = 1; end
        end
        7: begin d = (r.c == 0) ? r.mag : 0; t = r.c == r.mx; r.c = (r.c + 1) & r.mx; end
        8: begin d = r.mag; t = r.c == r.mx; r.c = (r.c + 1) & r.mx; end
        default: begin  // 15: step
          d = r.stepped ? r.mag : 0; t = r.c == r.mx;
          if (r.c == r.mx) r.stepped = 1;
          r.c = (r.c + 1) & r.mx;
        end
      endcase
    end
    r.k++;
  endfunction

  // ------------------------------------------------------------- stimulus
  int tco_count_a [16], tco_count_b [16];

  initial begin
    ref_t ra, rb;
    fs_we = 0; mag_we = 0; run = 0; fs_wdata = 0; mag_wdata = 0; sys_a = 0; sys_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int fs = 0; fs < 16; fs++) begin
      int mag, nsamp, lat, prev_par, steps, starts_ok, first_tco;
      bit sweep;
      sweep = fs inside {4, 5, 6, 12, 13, 14};
      mag = int'($urandom_range(1, 255));
      @(negedge clk);
      run = 0; fs_we = 1; fs_wdata = 4'(fs); mag_we = 1; mag_wdata = 8'(mag);
      @(negedge clk);
      fs_we = 0; mag_we = 0;
      checks++;
      if (fs_qa != 4'(fs) || mag_qa != 8'(mag) || mag_qb != 6'(mag)) begin
        failures++; $display("FAIL: register read-back");
      end
      // system data passes while stopped
      repeat (3) begin
        sys_a = 8'($urandom); sys_b = 6'($urandom);
        @(negedge clk);
        checks++;
        if (act_a || dac_a != sys_a || dac_b != sys_b) begin
          failures++; $display("FAIL: system data not passed while stopped");
        end
      end
      ref_init(ra, 8, 1, fs, mag);
      ref_init(rb, 6, 3, fs, mag & 63);
      // sweep outputs come from the holding register, which is one clock
      // behind the counter: the first DAC word shows the state after one step
      if (sweep) begin
        int dd;
        bit tt;
        ref_step(ra, dd, tt);
        ref_step(rb, dd, tt);
      end
      run = 1;
      lat = 0;
      do begin @(negedge clk); lat++; end while (!act_a && lat < 10);
      checks++;
      if (lat != 2 || !act_b) begin failures++; $display("FAIL: first test word after %0d clocks", lat); end
      nsamp = sweep ? 66000 : 1100;
      prev_par = -1; steps = 0; starts_ok = 1; first_tco = 0;
      for (int i = 0; i < nsamp; i++) begin
        int da, db;
        bit ta, tb;
        ref_step(ra, da, ta);
        ref_step(rb, db, tb);
        checks += 2;
        if (int'(dac_a) != da || tco_a != ta) begin
          failures++;
          if (failures < 20) $display("FAIL: FS=%0d N=8 sample %0d: %0d/%0d exp %0d/%0d", fs, i, dac_a, tco_a, da, ta);
        end
        if (int'(dac_b) != db || tco_b != tb) begin
          failures++;
          if (failures < 20) $display("FAIL: FS=%0d N=6 sample %0d: %0d/%0d exp %0d/%0d", fs, i, dac_b, tco_b, db, tb);
        end
        if (tco_a) tco_count_a[fs]++;
        if (tco_b) tco_count_b[fs]++;
        // document example: parabolic ramp holds the start values 0,1,2,...,254
        if (fs == 6 && tco_count_a[fs] == 0) begin
          if (int'(dac_a) != prev_par) begin
            if (int'(dac_a) != prev_par + 1) starts_ok = 0;
            prev_par = int'(dac_a); steps++;
          end
        end
        // a whole sweep (N_DAC=8, N_PSR=1) lasts 256+255+...+2 = 32895 clocks
        // with bit reversal the start values jump (0, 128, 129, 65, ...) and
        // the sweep ends after 30 sequences, 3870 clocks
        if (sweep && tco_a) begin
          if (tco_count_a[fs] == 1) first_tco = i;
          if (tco_count_a[fs] == 2) begin
            checks++;
            if (i - first_tco != (fs < 7 ? 32895 : 3870)) begin
              failures++; $display("FAIL: FS=%0d sweep period %0d", fs, i - first_tco);
            end
          end
        end
        @(negedge clk);
      end
      if (fs == 6) begin
        checks++;
        if (!starts_ok || steps != 255) begin
          failures++; $display("FAIL: sweep example: %0d start values, in order %0d", steps, starts_ok);
        end
      end
      checks += 2;
      if (tco_count_a[fs] == 0) begin failures++; $display("FAIL: FS=%0d N=8 no TCO", fs); end
      if (tco_count_b[fs] == 0) begin failures++; $display("FAIL: FS=%0d N=6 no TCO", fs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
