// wp_clk_gen: behavioural model of the wave-pipelined clock generator.
// This is a transistor circuit whose pulse shape is set by device sizing; it
// is modelled here with delays and is not synthesizable logic.
//
// Circuit: ref_clk drives an inverter (P0/N0) whose output node is A. A
// second inverter gives A_bar, a copy of ref_clk delayed by two gate delays,
// the same delay a data value sees through the register cell (two stages in
// series). The output node wp_clk is pulled to 1 by P1 while A_bar is low,
// and pulled to 0 through the series pair N1 (gate ref_clk) and N2 (gate
// A_bar) while both are high. With ref_clk low and A_bar high the node floats
// and keeps its charge; the model holds its last value then.
//
// Result: wp_clk stays high for T_A + T_ABAR after ref_clk rises, then falls;
// it floats low after ref_clk falls and returns high when A_bar falls. So
// wp_clk is an inverted copy of ref_clk delayed by the mimicked data-path
// delay, and the register cells (which shift while wp_clk is low) move their
// data one place shortly after each rising edge of ref_clk.
//
// Ports: ref_clk (system clock), wp_clk (wave-pipelined clock),
// a_bar (the delayed clock, brought out for observation).
// Parameters: T_A and T_ABAR, the two inverter delays in ps. Their values are
// this model's choice; the circuit topology follows the described generator.
module wp_clk_gen #(
  parameter int unsigned T_A    = 20,
  parameter int unsigned T_ABAR = 20
) (
  input  logic ref_clk,
  output logic wp_clk,
  output logic a_bar
);
  timeunit 1ps;
  timeprecision 1ps;

  logic node_a;

  initial begin
    node_a = 1'b1;
    a_bar  = 1'b0;
  end

  // P0/N0 inverter and the inverter that makes A_bar
  always @(ref_clk) node_a <= #(T_A) ~ref_clk;
  always @(node_a)  a_bar  <= #(T_ABAR) ~node_a;

  // P1 pull-up, N1-N2 pull-down, floating node otherwise
  always_latch begin
    if (!a_bar)       wp_clk = 1'b1;
    else if (ref_clk) wp_clk = 1'b0;
  end
endmodule
