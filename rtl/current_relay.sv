// current_relay: overcurrent measuring element (one of KA1.1 .. KA3.3).
//
// The relay outputs 1 while the measured phase current is at or above its
// pickup setting and 0 otherwise, as the overcurrent relays of the stepwise
// protection do when a short circuit raises the current. It is a plain
// magnitude comparator with no state, so it answers in the same cycle as its
// input; the input is the unsigned current magnitude from the ADC.
//
// Interface: i_meas is the phase current code, setting the pickup code,
// pickup the relay output. The "at or above" threshold rule and the unsigned
// magnitude coding are this design's choice; the source article only says the relay
// gives a one when the current rises in a short circuit.
module current_relay #(
  parameter int unsigned W = relay_pkg::ADC_W
) (
  input  logic [W-1:0] i_meas,
  input  logic [W-1:0] setting,
  output logic         pickup
);

  always_comb pickup = (i_meas >= setting);

endmodule
