// Test pattern generator (TPG) for DAC/ADC loopback BIST.
//
// Produces the sixteen test waveforms selected by the 4-bit Function Select
// (FS) register, as N_DAC-bit words for the DAC, and the TPG carry-out TCO
// that marks the last sample of every waveform cycle.
//
// How it works. An N_DAC-bit Counter/LFSR is the source of every waveform.
// Its value passes through the bit reversal multiplexer into the Count Value
// Holding Register, and from there through the output data multiplexer into
// the Output Data Register that drives the DAC:
//  * noise, ramps, saw-tooth, triangle (FS 0-3, 9-11): the holding register
//    takes the (optionally bit-reversed) count every clock;
//  * frequency sweeps and parabolic ramp (FS 4-6, 12-14): the counter counts
//    up from a start value to all ones and then reloads the start value held
//    in the holding register. The carry-out, registered and then delayed by
//    the N_PSR-stage Programmable Shift Register, makes the holding register
//    capture the counter N_PSR counts after the start value, so each count
//    sequence starts N_PSR higher and is shorter than the one before. A
//    toggle flip-flop (TFF) flips on every capture; the DAC sees the holding
//    register (varying amplitude) or the Magnitude register (constant
//    amplitude) while TFF=1 and zero while TFF=0. For the parabolic ramp TFF
//    is forced to 1. When a sequence ends before a new start value has been
//    captured, the sweep is complete and starts again from 0;
//  * DC, pulse and step (FS 8, 7, 15) send the Magnitude register; the
//    counter only serves as a timebase of 2^N_DAC clocks: the pulse is one
//    clock long at the start of every period, the step is low for the first
//    period and high afterwards.
//
// Interface. Each of the FS and Magnitude registers has an active-high write
// enable, an input bus and an output bus. While `run` is low the generator is
// held in its initial state and `sys_data` passes to the DAC. When `run` goes
// high the first test sample reaches `dac_data` two clocks later (counter,
// holding register, output register); `test_active` is high while the word at
// the DAC is test data. `tco` is high for one clock with the last sample of
// each waveform cycle. FS should only be changed while `run` is low.
//
// The block structure, the waveforms and the roles of N_DAC and N_PSR are the
// document's. The exact capture timing, the end of a sweep, the pulse and
// step timing, the triangle turning points and where TCO falls for each
// waveform are this design's own choices.
module tpg
  import bist_pkg::*;
#(
  parameter int unsigned N_DAC = 8,
  parameter int unsigned N_PSR = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // Function Select register
  input  logic             fs_we,
  input  logic [3:0]       fs_wdata,
  output logic [3:0]       fs_q,
  // Magnitude register
  input  logic             mag_we,
  input  logic [N_DAC-1:0] mag_wdata,
  output logic [N_DAC-1:0] mag_q,
  // operation
  input  logic             run,
  input  logic [N_DAC-1:0] sys_data,
  output logic [N_DAC-1:0] dac_data,
  output logic             tco,
  output logic             test_active
);

  localparam logic [N_DAC-1:0] MAXV = '1;

  initial begin
    if (N_PSR + 1 >= (1 << N_DAC) - 1) $error("tpg: N_PSR too large for N_DAC");
  end

  fs_e              fs;
  logic [N_DAC-1:0] mag;

  // waveform classes
  logic is_noise, is_down, is_tri, is_sweep, rev;

  always_comb begin
    is_noise    = (fs == FS_NOISE);
    is_down     = (fs == FS_RAMP_DOWN) || (fs == FS_BR_DOWN);
    is_tri      = (fs == FS_TRIANGLE)  || (fs == FS_BR_UPDOWN);
    is_sweep    = (fs inside {FS_SWEEP_VAR, FS_SWEEP_CONST, FS_PARABOLIC,
                              FS_BR_SWEEP_VAR, FS_BR_SWEEP_CON, FS_BR_PARABOLIC});
    rev         = (fs inside {FS_BR_UP, FS_BR_DOWN, FS_BR_UPDOWN,
                              FS_BR_SWEEP_VAR, FS_BR_SWEEP_CON, FS_BR_PARABOLIC});
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs  <= FS_NOISE;
      mag <= '0;
    end else begin
      if (fs_we)  fs  <= fs_e'(fs_wdata);
      if (mag_we) mag <= mag_wdata;
    end
  end

  assign fs_q  = fs;
  assign mag_q = mag;

  // ------------------------------------------------------------ Counter/LFSR
  cnt_mode_e        cmode;
  logic             cload, tc;
  logic [N_DAC-1:0] cload_val, cnt, cnt_rev;
  logic             dir_up;      // triangle direction
  logic [N_DAC-1:0] hold;        // Count Value Holding Register
  logic             sweep_end;

  always_comb begin
    if (is_noise)    cmode = CNT_LFSR;
    else if (is_down) cmode = CNT_DOWN;
    else if (is_tri)  cmode = dir_up ? CNT_UP : CNT_DOWN;
    else              cmode = CNT_UP;
  end

  always_comb begin
    cload     = 1'b0;
    cload_val = hold;
    if (!run) begin
      cload = 1'b1;
      if (is_noise)     cload_val = N_DAC'(1);
      else if (is_down) cload_val = MAXV;
      else              cload_val = '0;
    end else if (is_sweep && tc) begin
      cload     = 1'b1;
      cload_val = sweep_end ? '0 : hold;
    end
  end

  lfsr_counter #(.N(N_DAC)) u_cnt (
    .clk, .rst_n,
    .en       (run),
    .mode     (cmode),
    .load     (cload),
    .load_val (cload_val),
    .q        (cnt),
    .co       (tc)
  );

  bit_reverse_mux #(.N(N_DAC)) u_rev (
    .d   (cnt),
    .rev (rev),
    .q   (cnt_rev)
  );

  // triangle turning points: 0 .. max .. 1, 0 .. max ..
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  dir_up <= 1'b1;
    else if (!run)                               dir_up <= 1'b1;
    else if (dir_up && cnt == MAXV - 1'b1)       dir_up <= 1'b0;
    else if (!dir_up && cnt == N_DAC'(1))        dir_up <= 1'b1;
  end

  // ------------------------------------------------- frequency-sweep control
  logic co_q, psr_q, capture, captured, tff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    co_q <= 1'b0;
    else if (!run) co_q <= 1'b1;   // as if a count sequence had just begun
    else           co_q <= tc;
  end

  prog_shift_reg #(.N_PSR(N_PSR)) u_psr (
    .clk, .rst_n,
    .clr (!run || sweep_end),
    .d   (co_q && is_sweep),
    .q   (psr_q)
  );

  // a capture on the carry-out clock itself comes too late for this sequence
  assign capture   = run && is_sweep && psr_q && !tc;
  assign sweep_end = run && is_sweep && tc && !captured;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      captured <= 1'b0;
      tff      <= 1'b0;
    end else if (!run || sweep_end) begin
      captured <= 1'b0;
      tff      <= 1'b0;
    end else begin
      if (tc)           captured <= 1'b0;
      else if (capture) captured <= 1'b1;
      if (capture)      tff      <= ~tff;
    end
  end

  // ------------------------------------------------ Count Value Holding Reg.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       hold <= '0;
    else if (!run || sweep_end)       hold <= '0;
    else if (is_sweep ? capture : 1'b1) hold <= cnt_rev;
  end

  // ------------------------------------- TCO and timebase, hold-stage aligned
  logic tco_raw, tco_hq, tco_h, v_h, pulse_h, step_seen, step_h;

  always_comb begin
    if (is_tri) tco_raw = !dir_up && cnt == N_DAC'(1);
    else        tco_raw = tc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_h       <= 1'b0;
      tco_hq    <= 1'b0;
      pulse_h   <= 1'b0;
      step_seen <= 1'b0;
      step_h    <= 1'b0;
    end else begin
      v_h       <= run;
      tco_hq    <= run && !is_sweep && tco_raw;
      pulse_h   <= run && cnt == '0;
      step_h    <= run && step_seen;
      if (!run)    step_seen <= 1'b0;
      else if (tc) step_seen <= 1'b1;
    end
  end

  assign tco_h = is_sweep ? sweep_end : tco_hq;

  // ------------------------------------------------------ output selection
  osel_e osel;
  logic  ozero;

  always_comb begin
    osel  = OSEL_HOLD;
    ozero = 1'b0;
    unique case (fs)
      FS_SWEEP_VAR, FS_BR_SWEEP_VAR: begin osel = OSEL_HOLD; ozero = !tff; end
      FS_SWEEP_CONST, FS_BR_SWEEP_CON: begin osel = OSEL_MAG; ozero = !tff; end
      FS_PULSE: begin osel = OSEL_MAG; ozero = !pulse_h; end
      FS_DC:    begin osel = OSEL_MAG; end
      FS_STEP:  begin osel = OSEL_MAG; ozero = !step_h; end
      default:  begin osel = OSEL_HOLD; end  // counter modes, parabolic ramp
    endcase
    if (!v_h) osel = OSEL_SYSTEM;
  end

  tpg_output_reg #(.N_DAC(N_DAC)) u_out (
    .clk, .rst_n,
    .sel      (osel),
    .zero     (ozero),
    .hold_val (hold),
    .mag_val  (mag),
    .sys_data (sys_data),
    .tco_in   (tco_h),
    .dac_data (dac_data),
    .tco      (tco),
    .test     (test_active)
  );

endmodule
