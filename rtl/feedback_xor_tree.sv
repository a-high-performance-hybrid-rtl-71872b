// feedback_xor_tree: parallel feedback network of the Fibonacci LFSR.
//
// Each stage output q[i] is masked by tap_sel[i] and all masked bits are
// combined by a balanced tree of two-input XOR gates. The tree has
// ceil(log2(N)) levels, so the feedback delay grows with the logarithm of the
// number of taps rather than linearly, as it would with XOR gates in series.
// The tree is laid out as a heap: leaves in node[P .. P+N-1] (P the next power
// of two >= N, unused leaves 0), node[i] = node[2i] ^ node[2i+1].
//
// Ports: q (stage outputs, q[0] = Q1), tap_sel (1 selects the stage as a
// tap), fb (feedback bit to stage 1). Purely combinational.
//
// The parallel arrangement follows the described design; the mask inputs
// that make taps selectable at run time are this design's way of giving the
// user tap selection.
module feedback_xor_tree #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] q,
  input  logic [N-1:0] tap_sel,
  output logic         fb
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned P = (N <= 1) ? 1 : (1 << $clog2(N));

  logic [2*P-1:0] node;

  always_comb begin
    node = '0;
    for (int unsigned i = 0; i < N; i++) node[P+i] = q[i] & tap_sel[i];
    for (int i = int'(P) - 1; i >= 1; i--) node[i] = node[2*i] ^ node[2*i+1];
  end

  assign fb = node[1];
endmodule
