// register_cell: the basic storage cell of the wave-pipelined shift register.
//
// The cell is a master-slave register made of two level-sensitive stages on
// the same clock wire. The input stage (an NMOS pass gate and an inverter in
// the transistor circuit) is transparent while wp_clk is high; the output
// stage (a PMOS pass gate and an inverter) is transparent while wp_clk is
// low. Data therefore enters the cell during the high phase, before the
// value already held is released to Q during the low phase, so two unrelated
// data values can sit in one cell at once. The two inversions cancel, so Q
// follows D without inversion. Net effect: Q takes the value D had when
// wp_clk fell, and holds it while wp_clk stays high.
//
// Ports: wp_clk (the wave-pipelined clock), d, q. Timing: q changes only
// while wp_clk is low; d is sampled at the falling edge of wp_clk.
//
// The structure (two pass gates and two inverters, both levels of one clock)
// follows the described cell. Storage on dynamic nodes is modelled by the
// latches holding their value. In a chain of such cells closed into a ring
// by feedback, a lint tool sees a loop through the latches; it is broken in
// time because the two latches of a cell are never open together. A lint
// tool may call the output latch "no latch"; the testbench shows that it
// holds q while wp_clk is high.
module register_cell (
  input  logic wp_clk,
  input  logic d,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic master_n;  // inverted value on the internal node after the first inverter

  // input stage: transparent while wp_clk is high
  always_latch begin
    if (wp_clk) master_n = ~d;
  end

  // output stage: transparent while wp_clk is low
  always_latch begin
    if (!wp_clk) q = ~master_n;
  end
endmodule
