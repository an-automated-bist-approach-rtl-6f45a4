// Test controller of the loopback BIST.
//
// Holds the 4-bit control register CONT (ENABLE, BIST, IDONE, BDONE) and two
// binary down-counters: ICNT sets the length of the initialisation sequence
// and BCNT the length of the BIST sequence, both counted in waveform cycles,
// i.e. in TCO pulses from the test pattern generator.
//
// Operation. Before a test the system writes ICNT and BCNT like ordinary
// registers, then sets ENABLE, then BIST. With ENABLE and BIST set the TPG
// runs; ICNT decrements on every TCO until it is 0, which sets IDONE. With
// IDONE set BCNT decrements on every TCO until it is 0, which sets BDONE. The
// ORA compacts while BEN = IDONE and not BDONE (and the word at the DAC is
// test data), so the signature is frozen when BDONE sets. A count written as
// 0 gives a sequence of zero waveform cycles.
//
// Interface. Each of CONT, ICNT and BCNT has an active-high write enable, an
// input and an output bus. ENABLE can always be written; the other three
// bits of CONT are only written while ENABLE is already 1. CONT bit order:
// bit 0 ENABLE, bit 1 BIST, bit 2 IDONE, bit 3 BDONE. `tpg_active` is the
// TPG's test_active output. All outputs are registers except `ben` and `run`,
// which are gates of register bits.
//
// The register, the two counters, the meaning of each bit and the write
// protection are the document's; the bit order, the gating of BEN with
// tpg_active and the treatment of a zero count are this design's.
module test_controller
  import bist_pkg::*;
#(
  parameter int unsigned N_ICNT = 8,
  parameter int unsigned N_BCNT = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cont_we,
  input  logic [3:0]        cont_wdata,
  output logic [3:0]        cont_q,
  input  logic              icnt_we,
  input  logic [N_ICNT-1:0] icnt_wdata,
  output logic [N_ICNT-1:0] icnt_q,
  input  logic              bcnt_we,
  input  logic [N_BCNT-1:0] bcnt_wdata,
  output logic [N_BCNT-1:0] bcnt_q,
  input  logic              tco,
  input  logic              tpg_active,
  output logic              run,
  output logic              ben
);

  logic enable, bist, idone, bdone;
  logic icnt_dec, bcnt_dec, idone_set, bdone_set;

  always_comb begin
    icnt_dec  = enable && bist && !idone && tco && icnt_q != '0;
    idone_set = enable && bist && !idone &&
                (icnt_q == '0 || (tco && icnt_q == N_ICNT'(1)));
    bcnt_dec  = enable && idone && !bdone && tco && bcnt_q != '0;
    // a zero BCNT completes together with the initialisation sequence
    bdone_set = enable && !bdone &&
                ((idone_set && bcnt_q == '0) ||
                 (idone && (bcnt_q == '0 || (tco && bcnt_q == N_BCNT'(1)))));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0;
      bist   <= 1'b0;
      idone  <= 1'b0;
      bdone  <= 1'b0;
    end else begin
      if (idone_set) idone <= 1'b1;
      if (bdone_set) bdone <= 1'b1;
      if (cont_we) begin
        enable <= cont_wdata[CONT_ENABLE];
        if (enable) begin
          bist  <= cont_wdata[CONT_BIST];
          idone <= cont_wdata[CONT_IDONE];
          bdone <= cont_wdata[CONT_BDONE];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        icnt_q <= '0;
    else if (icnt_we)  icnt_q <= icnt_wdata;
    else if (icnt_dec) icnt_q <= icnt_q - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        bcnt_q <= '0;
    else if (bcnt_we)  bcnt_q <= bcnt_wdata;
    else if (bcnt_dec) bcnt_q <= bcnt_q - 1'b1;
  end

  always_comb begin
    cont_q              = '0;
    cont_q[CONT_ENABLE] = enable;
    cont_q[CONT_BIST]   = bist;
    cont_q[CONT_IDONE]  = idone;
    cont_q[CONT_BDONE]  = bdone;
  end

  assign run = enable && bist;
  assign ben = enable && idone && !bdone && tpg_active;

endmodule
