// Behavioural model, not synthesizable logic: the propagation delay of one
// LUT or one routing hop at one place on the die.
//
// On silicon this delay is whatever the process gives each site, and its
// spread across the die (within-die variation) is what the whole design sets
// out to measure and exploit. Here it is a continuous assignment delayed by
// DELAY_PS picoseconds, so that configured ring oscillators oscillate and
// configured paths have a finite speed in simulation. The assignment is
// inertial: a pulse shorter than DELAY_PS does not pass. Synthesis drops the
// delay and keeps a wire.
`timescale 1ps/1ps
module clb_delay #(
  parameter int unsigned DELAY_PS = 250
) (
  input  logic a,
  output logic y
);
  assign #(DELAY_PS) y = a;
endmodule
