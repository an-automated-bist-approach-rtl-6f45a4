// Behavioural model of an analog loopback multiplexer (not synthesizable
// logic: the real part is an analog switch in the analog domain).
//
// Chooses what reaches the ADC input: with `lpbk` low the output of the
// analog system circuitry (`normal_in`), with `lpbk` high the DAC output
// looped back directly (`loop_in`), so that the DAC and ADC can be tested
// apart from the rest of the analog circuitry. Voltages are `real` values;
// the switch is ideal and has no delay. One such multiplexer is driven by
// each LPBK bit of the ORA function register. The loopback function is the
// document's; the ideal switch is this model's simplification.
module analog_loopback_mux (
  input  real  normal_in,
  input  real  loop_in,
  input  logic lpbk,
  output real  out
);

  assign out = lpbk ? loop_in : normal_in;

endmodule
