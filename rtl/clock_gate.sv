// clock_gate: glitch-free clock gate (latch plus AND) that produces the
// clock of the circuit under test from the system clock.
//
// The enable is captured by a latch that is transparent while clk is low,
// so it is stable during the high phase and gclk = clk & enable_latched
// has only full-width pulses. The circuit under test is thus clocked by
// the same edges as the controller: patterns, captured outputs and
// signature samples all change on one common edge, as in any synchronous
// design. The level-sensitive latch is intended; it is the standard
// integrated-clock-gate structure.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
