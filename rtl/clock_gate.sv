// clock_gate: lets the user stop the LFSR clock.
//
// A latch that is transparent while ref_clk is low captures clk_en; the
// gated clock is ref_clk AND the latched enable. Because the enable can only
// change while ref_clk is low, gclk never carries a shortened pulse. With
// clk_en low the gated clock stays low, which holds the wave-pipelined clock
// high, so every register cell keeps its value.
//
// Ports: ref_clk (system clock), clk_en (1 = run), gclk (gated clock).
// Timing: clk_en must be stable around the rising edge of ref_clk; a change
// takes effect from the next rising edge.
//
// That the clock can be disabled is part of the described design; this
// latch-and-AND gate is the usual glitch-free way to do it and is this
// design's own choice.
module clock_gate (
  input  logic ref_clk,
  input  logic clk_en,
  output logic gclk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic en_lat;

  always_latch begin
    if (!ref_clk) en_lat = clk_en;
  end

  assign gclk = ref_clk & en_lat;
endmodule
