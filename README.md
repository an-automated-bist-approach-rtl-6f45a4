# Mixed-signal loopback BIST

Analog circuitry inside a mixed-signal chip is hard to test from the pins. This design tests it
from the digital side, using the converters the chip already has. A test pattern generator (TPG)
replaces the normal data at the DAC input. The resulting analog waveform passes through the
analog circuitry, or through an analog loopback switch straight back, and is digitised by the
ADC. An output response analyser (ORA) sums what comes back into a signature. The only addition
on the analog side is the loopback multiplexers. Everything else is ordinary synthesizable logic,
sized by parameters, so it can be dropped into any design with a 4- to 24-bit DAC and ADC.

A signature from an analog path is never bit-exact from run to run: converter noise, process
tolerance, temperature and supply all move it. So the ORA does not use an LFSR signature register,
which magnifies every one-bit difference. It uses an accumulator. The sum moves only slightly
with small analog variations, so software can compare it against a tolerance band.

```
             normal system data
                     |
   +-----------------v------------------+          +---------------------+
   | TPG                                |  DAC     | analog circuitry    |
   |  FS reg, Magnitude reg             |--word--->| DAC -> circuit -> + |
   |  Counter/LFSR -> bit reversal ->   |          |        loopback mux |
   |  holding reg -> output MUX/reg     |          |   (LPBK) -> ADC     |
   |  PSR, TFF, TCO                     |          +----------+----------+
   +---------+--------------------------+                     | ADC word
             | TCO               DAC word                     |
   +---------v----------+     +-----------v-------------------v---------+
   | test controller    | BEN | ORA: MUX(TPG | ADC | |DAC-ADC|) ->      |
   |  CONT, ICNT, BCNT  |---->|      pipeline reg -> ACHI:ACLO          |
   +--------------------+     +-----------------------------------------+
             ^  eight registers, reached through the processor interface
             |  (custom / parallel / serial: PE, PSL, PDI, PDO)
```

## Files and hierarchy

| module | role |
|---|---|
| `mixed_signal_bist` | top: serial processor interface, parallel interface, BIST core, loopback multiplexer model |
| `parallel_if` | address decoder and read multiplexer over the eight registers |
| `bist_core` | TPG + test controller + ORA with one write enable / input / output bus per register |
| `tpg` | test pattern generator |
| `lfsr_counter`, `bit_reverse_mux`, `prog_shift_reg`, `tpg_output_reg` | TPG parts |
| `test_controller` | control register and ICNT/BCNT sequence counters |
| `ora`, `abs_subtractor`, `ora_accumulator` | output response analyser |
| `sync_oneshot` | synchroniser and one-shot for a PE line from another clock domain |
| `analog_loopback_mux` | behavioural model (real-valued) of one analog loopback switch |
| `bist_pkg` | waveform codes, ORA modes, register map, control bits, LFSR polynomials |

Each file starts with a description of its interface and timing. Reset is asynchronous and active
low (`rst_n`) everywhere. There is one clock domain, `clk`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_DAC` | 8 | DAC word width, 4 to 24 |
| `N_ADC` | 8 | ADC word width |
| `N_ACUM` | 8 | width of ACLO and of ACHI (signature is 2*N_ACUM bits); also the processor data bus width. Must be at least every other register width |
| `N_PSR` | 1 | stages of the programmable shift register (frequency-sweep step) |
| `N_ICNT`, `N_BCNT` | 8, 8 | widths of the initialisation and BIST sequence counters |
| `N_LPBK` | 2 | number of loopback control bits |
| `ORA_PIPE` | 1 | register between the ORA multiplexer and the accumulator |
| `ACC_CARRY_FF` | 0 | register the ACLO carry before it reaches ACHI |
| `SYNC_PE` | 0 | pass PE through `sync_oneshot` |

The default 8/8/8 is one of the configurations the architecture was originally synthesised in.
Those configurations are 4/4/12, 4/8/12, 4/12/12, 8/4/12, 12/4/12, 12/12/12 and 8/8/8 for
N_DAC/N_ADC/N_ACUM. `N_ICNT`, `N_BCNT` and `N_LPBK` have no published values. Their defaults here
are this design's choice.

## Register map

All registers are reached at these 3-bit addresses. Registers narrower than `N_ACUM` use the low
bits of the data bus and read back with zeros above.

| addr | register | width | contents |
|---|---|---|---|
| 0 | FS | 4 | waveform code (table below) |
| 1 | Magnitude | N_DAC | amplitude for DC, pulse, step and constant-amplitude sweeps |
| 2 | CONT | 4 | bit 0 ENABLE, bit 1 BIST, bit 2 IDONE, bit 3 BDONE |
| 3 | ICNT | N_ICNT | initialisation length, in waveform cycles; counts down during the test |
| 4 | BCNT | N_BCNT | BIST length, in waveform cycles; counts down during the test |
| 5 | ORA function | N_LPBK+2 | bits [1:0] mode, bits [N_LPBK+1:2] LPBK |
| 6 | ACLO | N_ACUM | low half of the signature |
| 7 | ACHI | N_ACUM | high half of the signature |

The address map, the CONT bit order and the function-register layout are this design's choices.
The original description gives the registers but not their encoding.

## Test pattern generator

Every waveform comes from one N_DAC-bit Counter/LFSR. Its value passes through a bit-reversal
multiplexer into the Count Value Holding Register. From there it goes through the output data
multiplexer into the Output Data Register that drives the DAC. The multiplexer chooses between
the holding register, the Magnitude register and normal system data, and can force zero. The
first test word reaches the DAC two clocks after the TPG starts, having passed through the
counter, the holding register and the output register. TCO is high for one clock with the last sample
of every waveform cycle. The test controller counts these pulses.

| FS | waveform | source at the DAC | one waveform cycle (TCO at its end) |
|---|---|---|---|
| 0 | pseudorandom noise | LFSR state | 2^N-1 clocks |
| 1 | saw-tooth / ramp up | count 0..2^N-1 | 2^N clocks |
| 2 | saw-tooth / ramp down | count 2^N-1..0 | 2^N clocks |
| 3 | triangle | 0..2^N-1..1 | 2(2^N-1) clocks |
| 4 | frequency sweep, varying amplitude | holding reg while TFF=1, else 0 | one whole sweep |
| 5 | frequency sweep, constant amplitude | Magnitude while TFF=1, else 0 | one whole sweep |
| 6 | parabolic ramp | holding reg (TFF forced to 1) | one whole sweep |
| 7 | pulse | Magnitude for the first clock, then 0 | 2^N clocks |
| 8 | DC | Magnitude | 2^N clocks |
| 9-11 | as 1-3, bit reversed | reversed count | as 1-3 |
| 12-14 | as 4-6, bit reversed | see below | one whole sweep |
| 15 | step | 0 for the first 2^N clocks, then Magnitude | 2^N clocks |

Bit reversal makes the LSB the MSB. A slow ramp then becomes a word sequence full of
high-frequency content. For pulse, DC and step the counter only serves as a 2^N-clock timebase.
It paces TCO and places the pulse and the step.

### Frequency sweep (FS 4-6, 12-14)

This is the least obvious mechanism. The counter counts up from a *start value* to all ones. Its
carry-out then reloads it with the start value kept in the holding register. So each count
sequence is one "half period" of a square wave, and its length sets the frequency. The carry-out
is also registered and sent down the `N_PSR`-stage programmable shift register. When it leaves
the last stage, the holding register captures the counter, which by then has counted `N_PSR`
past the start value. The next sequence therefore starts `N_PSR` higher and is shorter. With
`N_DAC=8, N_PSR=1` the counter runs 0-255, 1-255, 2-255, ..., 254-255. One whole sweep is
256+255+...+2 = 32895 clocks. A larger `N_PSR` sweeps faster.

A toggle flip-flop (TFF) flips on every capture. So the output alternates between zero and an
amplitude for successively shorter times:

* FS 4: amplitude = holding register, so the frequency and the amplitude rise together;
* FS 5: amplitude = Magnitude register;
* FS 6: TFF forced to 1, so the output is the holding register itself. It is a staircase whose
  steps get shorter, approximating a parabola.

A sweep ends when a count sequence reaches all ones before a new start value has been captured.
That is the first start value above `2^N-1-N_PSR`. The generator then restarts from 0 with TFF=0
and raises TCO. A capture due on the carry-out clock itself counts as too late. This rule gives
exactly the 0…254 sequence above.

In the bit-reversed sweeps the holding register is loaded through the bit-reversal multiplexer,
and the counter reloads from the holding register as it is. The start values therefore jump
around instead of climbing: for 8 bits and `N_PSR=1` they are 0, 128, 129, 65, 66, 194, … The
sweep still ends by the rule above, after 3870 clocks in that case. This follows the datapath as
drawn in the original block diagram. The resulting sequence is this design's reading of it.

The capture timing (registered carry, then `N_PSR` stages), the end-of-sweep rule, the reset of
TFF at the end of a sweep, and the pulse, step and triangle details are this design's choices.
The original gives the structure and the 0-255, 1-255, … example, but not the clock-level timing.

### LFSR

Noise mode uses a Galois (internal XOR) LFSR seeded with 1. It uses a primitive polynomial chosen
from a table in `bist_pkg::lfsr_mask` for every width from 4 to 24. These are well-known
maximal-length polynomials. Each was checked to give period 2^N-1, and the testbench re-checks
widths 4 to 16. The original design takes its polynomials from a published table that is not
reproduced here, so the noise sequence differs from the original's.

## Test controller and the test sequence

A test runs like this, through any of the interfaces:

1. Write FS, Magnitude, ICNT, BCNT and the ORA function register, and clear ACLO and ACHI.
2. Write CONT = ENABLE. BIST, IDONE and BDONE can only be written while ENABLE is already set.
   This guards against starting a test by accident, so ENABLE must be set in a separate write.
3. Write CONT = ENABLE | BIST. The TPG starts from its initial state and takes over the DAC.
4. ICNT counts down on every TCO. When it is 0, IDONE sets. This initialisation sequence lets
   the analog circuit settle, so the BIST window can look at the steady-state response rather
   than the transient.
5. With IDONE set, BCNT counts down on every TCO. When it is 0, BDONE sets.
6. The ORA accumulates while BEN = ENABLE & IDONE & !BDONE (and the word at the DAC is test
   data). The signature is frozen once BDONE is set.
7. Poll CONT for BDONE, read ACHI and ACLO, and write CONT = ENABLE (or 0) to return the DAC to
   system data.

A count written as 0 means zero waveform cycles. ICNT=0 starts the BIST window with the first
test word. BCNT=0 gives an empty window. With a ramp, ICNT=0 and BCNT=1 cover exactly one ramp.
BDONE sets on the (ICNT+BCNT)·(cycle length)+2nd clock edge after the edge that writes BIST.

For example, take a saw-tooth into a high-pass filter. ICNT=0, BCNT=6 captures the transient
response. ICNT=6, BCNT=6 captures the steady state. ICNT=0, BCNT=12 captures both.

## Output response analyser

| mode | summed each BEN clock | use |
|---|---|---|
| 0 | the DAC word (TPG output) | self-test of the digital BIST before testing the analog part |
| 1 | the ADC word | the response itself |
| 2 | \|DAC word − ADC word\| | sensitive to phase shift, noise, ringing and overshoot |
| 3 | nothing | |

If `N_DAC` ≠ `N_ADC`, the absolute-value subtractor first shifts the narrower word left so both
have the same full scale. This is this design's choice.

ACLO adds the selected word each clock and its carry increments ACHI. Together they form a
2·N_ACUM-bit sum, so choose `N_ACUM` larger than the converter widths when long windows are
summed. Otherwise the signature wraps. The signature stays deterministic when it wraps, but
wrapping reduces the chance of detecting a fault. With `ORA_PIPE=1` (default) the selected word
and BEN are registered before the accumulator, which breaks the subtractor–multiplexer–adder
path. `ACC_CARRY_FF=1` also registers the ACLO→ACHI carry. The last carry is then added one
clock after BEN falls.

The ORA function register also holds the LPBK bits for the analog loopback multiplexers.

## Processor interfaces

Three interface options are built, each wrapping the previous one:

* **Custom** (`bist_core`): every register has its own write enable, input bus and output bus,
  to be merged into an existing register file.
* **Parallel** (`parallel_if`): 3-bit `addr`, `rw`, `din`, `dout`, all N_ACUM wide. While `rw=1`
  the addressed register is written on each clock edge. `dout` shows the addressed register
  combinationally.
* **Serial** (`mixed_signal_bist`, the top): an N_ACUM+4-bit shift register and four pins.

Serial protocol:

```
PE=1, PSL=0 : shift one bit in from PDI (enters at the MSB end); PDO = shift register bit 0
order in    : data[0] data[1] ... data[N_ACUM-1] addr[0] addr[1] addr[2] R/W
PE=1, PSL=1 : execute.  R/W=1 -> write data to addr
                        R/W=0 -> load the addressed register into the data bits
then PE=1, PSL=0 for N_ACUM clocks shifts the read data out on PDO, LSB first
```

Sending a command takes N_ACUM+5 clocks. Reading the result takes N_ACUM more, and the next
command can be shifted in at the same time. The address bits go LSB first. That order is this
design's choice.

With `SYNC_PE=1`, PE may come from another clock domain, for example a boundary-scan TAP running
on TCK. `sync_oneshot` synchronises it with two flip-flops and turns each rising edge into one
clock of PE. PSL and PDI must be held stable while PE is high. The alternative arrangement is not
built: there, the shift register runs on TCK and the synchroniser sits on the R/W strobe of the
parallel interface.

## Analog side

`mixed_signal_bist` has three `real` ports: `dac_vout` (DAC output), `cut_vout` (output of the
analog circuitry) and `adc_vin` (ADC input). They connect through an ideal loopback switch
controlled by LPBK[0]: with LPBK[0]=1 the DAC output goes straight to the ADC, so the converters
can be tested apart from the rest of the circuit. The other LPBK bits come out on `lpbk` for
further switches. Where these switches sit depends on the system, and it decides how precisely a
fault can be located. The switch model is only for simulation. Synthesis tools that reject `real`
ports need the three ports and `analog_loopback_mux` removed, or replaced by the real analog cell.

The DAC, ADC, analog circuit and the normal digital function belong to the host system and are
not part of this RTL. The testbenches model them.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. A minimal run:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module mixed_signal_bist_tb rtl/bist_pkg.sv tb/mixed_signal_bist_tb.sv
./obj_dir/Vmixed_signal_bist_tb
```

* `tpg_tb` compares every DAC word and TCO of all 16 waveforms against a cycle-level reference,
  for N_DAC=8/N_PSR=1 and N_DAC=6/N_PSR=3. It also checks the 0…254 start-value sequence, the
  32895-clock sweep period and the 3870-clock bit-reversed sweep period.
* `lfsr_counter_tb`: counting, loading, carry-out, and the LFSR period for widths 4–16.
* `test_controller_tb`: BEN/IDONE/BDONE checked every clock against a TCO-counting reference for
  several ICNT/BCNT values, including zeros, plus the write protection.
* `ora_tb`, `ora_accumulator_tb`, `abs_subtractor_tb`: all modes, unequal widths, the carry
  flip-flop, and pipeline latency.
* `bist_core_tb`, `parallel_if_tb`: complete tests with closed-form signatures. For example, a
  ramp summed over two BIST cycles is 2·32640. With a 3-clock loopback delay, |DAC−ADC| is
  2·2·3·253.
* `mixed_signal_bist_tb` (default parameters) drives the top through the serial pins, with
  models of an 8-bit DAC, an inverting high-pass filter and an 8-bit ADC. It runs all 16
  waveforms, all ORA modes, loopback on and off, transient versus steady-state windows, and a
  gain fault that changes the signature. It counts each mechanism and fails if one never
  happened.
* `table_configs_tb` runs complete serial-interface sessions at every published N_DAC/N_ADC/N_ACUM
  configuration and with the `SYNC_PE`, `ACC_CARRY_FF` and `ORA_PIPE=0` options.

What is not verified: behaviour with real converters, timing closure at any clock rate, and LFSR
widths above 16 in simulation.

## Departures and open points

* LFSR polynomials: standard primitive polynomials, not the original's table.
* The clock-level timing of the sweep, the TCO positions, and the pulse, step and triangle
  details are this design's own. Only the structure and one sweep example were given.
* BEN is also gated by "test data at the DAC", so the window starts with the first test word and
  not with the system data still in the output register.
* FS should only be changed while the TPG is stopped. Every start restarts the waveform from its
  initial state.
* Only one loopback switch is modelled. The original system diagram with the switch positions
  was not available.
* Not built: the TCK-clocked shift register variant of the serial interface, the boundary-scan
  TAP itself, and the analog parts.
