// Shared types and constants of the mixed-signal loopback BIST.
//
// Holds the waveform codes of the Function Select register, the output
// response analysis modes, the register address map of the parallel and
// serial processor interfaces, the bit positions of the 4-bit control
// register, and the table of primitive LFSR polynomials for register
// lengths 4 to 24.
//
// The sixteen waveform codes are the document's. The address map, the
// control-register bit order, the ORA mode codes and the particular
// primitive polynomials are this design's own choices.
package bist_pkg;

  // Function Select register codes: one test waveform each.
  typedef enum logic [3:0] {
    FS_NOISE        = 4'd0,   // pseudorandom noise (LFSR)
    FS_RAMP_UP      = 4'd1,   // saw-tooth / ramp up
    FS_RAMP_DOWN    = 4'd2,   // saw-tooth / ramp down
    FS_TRIANGLE     = 4'd3,   // triangle
    FS_SWEEP_VAR    = 4'd4,   // frequency sweep, varying amplitude
    FS_SWEEP_CONST  = 4'd5,   // frequency sweep, constant amplitude
    FS_PARABOLIC    = 4'd6,   // parabolic ramp
    FS_PULSE        = 4'd7,   // pulse
    FS_DC           = 4'd8,   // DC level
    FS_BR_UP        = 4'd9,   // count up, bit reversed
    FS_BR_DOWN      = 4'd10,  // count down, bit reversed
    FS_BR_UPDOWN    = 4'd11,  // count up/down, bit reversed
    FS_BR_SWEEP_VAR = 4'd12,  // sweep with varying amplitude, bit reversed
    FS_BR_SWEEP_CON = 4'd13,  // sweep with constant amplitude, bit reversed
    FS_BR_PARABOLIC = 4'd14,  // parabolic ramp, bit reversed
    FS_STEP         = 4'd15   // step
  } fs_e;

  // Operating modes of the Counter/LFSR.
  typedef enum logic [1:0] {
    CNT_UP   = 2'd0,
    CNT_DOWN = 2'd1,
    CNT_LFSR = 2'd2
  } cnt_mode_e;

  // Source selected by the output data multiplexer.
  typedef enum logic [1:0] {
    OSEL_SYSTEM = 2'd0,   // normal system data
    OSEL_HOLD   = 2'd1,   // Count Value Holding Register
    OSEL_MAG    = 2'd2    // Magnitude Register
  } osel_e;

  // ORA compaction modes (low two bits of the ORA function register).
  typedef enum logic [1:0] {
    ORA_TPG     = 2'd0,   // TPG output: self-test of the digital BIST
    ORA_ADC     = 2'd1,   // sum of ADC samples
    ORA_ABSDIFF = 2'd2,   // sum of |DAC input - ADC output|
    ORA_NONE    = 2'd3    // nothing accumulated
  } ora_mode_e;

  // Register addresses of the parallel and serial interfaces.
  typedef enum logic [2:0] {
    A_FS   = 3'd0,
    A_MAG  = 3'd1,
    A_CONT = 3'd2,
    A_ICNT = 3'd3,
    A_BCNT = 3'd4,
    A_FUNC = 3'd5,
    A_ACLO = 3'd6,
    A_ACHI = 3'd7
  } reg_addr_e;

  // Control register bit positions.
  localparam int unsigned CONT_ENABLE = 0;
  localparam int unsigned CONT_BIST   = 1;
  localparam int unsigned CONT_IDONE  = 2;
  localparam int unsigned CONT_BDONE  = 3;

  localparam int unsigned MAX_LFSR = 24;

  // Feedback mask of a primitive polynomial of degree n (4..24). Bit k set
  // means the term x^k is present, for k < n; bit 0 (the constant term) is
  // always set. Used by a Galois LFSR shifting towards the MSB.
  function automatic logic [MAX_LFSR-1:0] lfsr_mask(int unsigned n);
    logic [MAX_LFSR-1:0] m;
    m = '0;
    unique case (n)
      4:  m = (1 << 3);
      5:  m = (1 << 3);
      6:  m = (1 << 5);
      7:  m = (1 << 6);
      8:  m = (1 << 6) | (1 << 5) | (1 << 4);
      9:  m = (1 << 5);
      10: m = (1 << 7);
      11: m = (1 << 9);
      12: m = (1 << 6) | (1 << 4) | (1 << 1);
      13: m = (1 << 4) | (1 << 3) | (1 << 1);
      14: m = (1 << 5) | (1 << 3) | (1 << 1);
      15: m = (1 << 14);
      16: m = (1 << 15) | (1 << 13) | (1 << 4);
      17: m = (1 << 14);
      18: m = (1 << 11);
      19: m = (1 << 6) | (1 << 2) | (1 << 1);
      20: m = (1 << 17);
      21: m = (1 << 19);
      22: m = (1 << 21);
      23: m = (1 << 18);
      24: m = (1 << 23) | (1 << 22) | (1 << 17);
      default: m = '0;
    endcase
    return m | 1;
  endfunction

endpackage
