`timescale 1ps/1fs
// prog_not: behavioural model of an inverter whose propagation delay is
// programmable with three control bits A, B and C (not synthesizable: it
// models an analog timing property with a delay).
//
// Setting A, B and C to 1 switches in extra pull-up / pull-down transistors in
// parallel, which speeds the gate up; this lets each NOT be trimmed after
// fabrication to cancel process variation (about +/-20 % of the 12 ps nominal).
// The delay is NOM_PS times jm_pkg::prog_factor(prog); prog = 3'b100 (A only)
// is the nominal setting. NOM_PS is 12 ps for a plain chain NOT and is set
// larger for the first NOT of a phase-shifted chain.
//
// Interface: a_in -> y = ~a_in after the programmed delay (transport delay,
// every input edge is propagated). prog = {A, B, C}.
module prog_not #(
  parameter real NOM_PS = jm_pkg::TAU_PS_DEF
) (
  input  logic       a_in,
  input  logic [2:0] prog,
  output logic       y
);
  realtime dly;
  always_comb dly = NOM_PS * jm_pkg::prog_factor(prog);

  // Evaluated once at time 0, then on every input edge (transport delay).
  always begin
    y <= #(dly) ~a_in;
    @(a_in);
  end
endmodule
