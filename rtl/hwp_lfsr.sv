// hwp_lfsr: hybrid wave-pipelined Fibonacci linear feedback shift register.
//
// N register cells form a shift chain (Q1 -> Q2 -> ... -> QN). They are not
// clocked by the system clock directly: a clock generator derives a
// wave-pipelined clock wp_clk from ref_clk by passing it through a copy of the
// register cell's data path (two inversions), so the clock arrives at the
// cells with the same delay as the data it moves. Each cell takes its input
// while wp_clk is high and passes it on while wp_clk is low. The feedback bit
// for Q1 is the XOR of the selected stages, formed by a balanced XOR tree so
// that its delay grows with log2 of the stage count, not linearly.
//
// User controls:
//   tap_sel  run-time tap mask; bit k-1 selects stage Qk. The highest selected
//            tap closes the loop, so the mask also chooses the sequence length:
//            with highest tap m the sequence repeats after at most 2^m - 1
//            steps (stages above m only delay the sequence).
//   clk_en   0 stops ref_clk before the clock generator; wp_clk then stays
//            high and every cell holds its value.
//   prog     1 during one ref_clk cycle loads seed into all stages at once
//            (single-cycle initialization) instead of shifting.
// An all-zero state never changes (lock-up state of an XOR LFSR); the seed
// must hold at least one 1 within the tapped stages.
//
// Timing: the register shifts once per rising edge of ref_clk, after the
// generator delay (T_A + T_ABAR). prog, seed, tap_sel and clk_en should
// change while ref_clk is low, away from its rising edge.
//
// Following the described design: the cell structure, the clock generator
// circuit, the parallel feedback, Fibonacci form, 16 stages with taps
// 4, 13, 15, 16 as main example, and the three user controls. This design's
// own choices: the load multiplexer in front of each cell, the clock gate
// circuit, one clock generator shared by all cells, and the port names.
//
// Lint and synthesis tools report a combinational loop running through every
// cell and the feedback tree. It is a real property of a ring of two-phase
// latches and is left as it is: inside each cell the input and output
// latches are open on opposite levels of wp_clk, so no path is ever
// transparent end to end. A tool may also report that the output latch of a
// cell is not a latch, because inside the ring it cannot see the hold case
// as reachable; the cell test shows that it holds.
module hwp_lfsr #(
  parameter int unsigned N = lfsr_pkg::LFSR_N
) (
  input  logic         ref_clk,
  input  logic         clk_en,
  input  logic         prog,
  input  logic [N-1:0] seed,
  input  logic [N-1:0] tap_sel,
  output logic [N-1:0] q,
  output logic         fb,
  output logic         wp_clk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic         gclk;
  logic [N-1:0] d;

  clock_gate u_cg (
    .ref_clk (ref_clk),
    .clk_en  (clk_en),
    .gclk    (gclk)
  );

  wp_clk_gen u_clkgen (
    .ref_clk (gclk),
    .wp_clk  (wp_clk),
    .a_bar   ()
  );

  feedback_xor_tree #(.N(N)) u_fb (
    .q       (q),
    .tap_sel (tap_sel),
    .fb      (fb)
  );

  // stage inputs: seed on load, otherwise feedback into Q1 and shift right
  always_comb begin
    d[0] = prog ? seed[0] : fb;
    for (int unsigned i = 1; i < N; i++) d[i] = prog ? seed[i] : q[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    register_cell u_cell (
      .wp_clk (wp_clk),
      .d      (d[i]),
      .q      (q[i])
    );
  end
endmodule
