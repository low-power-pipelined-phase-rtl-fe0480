// Glitch-free clock gate: a latch that is transparent while the clock is low,
// followed by an AND gate.
//
// The enable is sampled during the low phase of clk and held while clk is
// high, so gclk carries whole clock pulses only: gclk pulses on a rising edge
// of clk exactly when en was high just before that edge. With en driven by
// flip-flops on the same clk this gives the behaviour of the AND-gate clock
// gating of the sequential gated clock generator without the glitch a bare
// AND gate would produce when en changes while clk is high.
//
// Ports: clk (free-running clock), en (enable, synchronous to clk),
// gclk (gated clock).
//
// The level-sensitive latch is intended: it is the storage element of a
// standard integrated clock-gating cell. A tool's latch warning for en_l
// stands for that reason.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
