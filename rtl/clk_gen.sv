// clk_gen: clock generator for the wrapped IP.
//
// The wrapper drives the black-box IP with its own clock so that the IP advances only
// when the control logic has a word for it and room for its result; the IP itself needs
// no enable or handshake pins. gclk is the system clock with whole cycles removed.
//
// How it works: the enable is sampled on the falling clk edge into en_q, while clk is
// low, and gclk = clk & en_q. en_q therefore only changes while clk is low, so gclk
// carries complete high pulses and no glitches even though en changes right after
// rising clk edges. (This is the usual glitch-free clock gate; a falling-edge flop is
// used in place of the usual low-transparent latch, which behaves the same when en comes
// from rising-edge logic.)
//
// Interface and timing: set en after rising edge t (from a rising-edge flop); gclk then
// rises together with clk at edge t+1. Clearing en after edge t suppresses the pulse at
// t+1. So every cycle en is high yields exactly one gclk pulse, one cycle later.
//
// The block name and its place between the IP and the control logic follow the source
// design; the gating scheme is this design's own choice. gclk is derived from clk, so a
// flow that uses it must treat it as a generated clock.
module clk_gen (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_q;

  always_ff @(negedge clk) en_q <= en;

  assign gclk = clk & en_q;

endmodule
