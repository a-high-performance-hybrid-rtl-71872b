// Self-checking testbench for feedback_xor_tree.
//
// Three instances (16, 3 and 5 inputs, so power-of-two and ragged trees) get
// random stage values and tap masks; the output is compared with the parity
// of the selected bits, computed bit by bit in the testbench. The 3-input
// instance is also walked through the 3-stage sequence with taps Q2 and Q3
// (Q1 Q2 Q3: 100 010 101 110 111 011 001), whose feedback is known.
module tb_feedback_xor_tree;
  timeunit 1ps;
  timeprecision 1ps;

  logic [15:0] q16, t16;
  logic [2:0]  q3,  t3;
  logic [4:0]  q5,  t5;
  logic        f16, f3, f5;
  int checks = 0, failures = 0;

  feedback_xor_tree #(.N(16)) dut16 (.q(q16), .tap_sel(t16), .fb(f16));
  feedback_xor_tree #(.N(3))  dut3  (.q(q3),  .tap_sel(t3),  .fb(f3));
  feedback_xor_tree #(.N(5))  dut5  (.q(q5),  .tap_sel(t5),  .fb(f5));

  function automatic logic parity(input logic [15:0] v, input logic [15:0] m, input int n);
    logic p = 1'b0;
    for (int i = 0; i < n; i++) if (m[i]) p = (p != v[i]);
    return p;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows of the 3-stage sequence, written as {Q1,Q2,Q3}
  localparam logic [2:0] SEQ3 [8] = '{3'b100, 3'b010, 3'b101, 3'b110,
                                      3'b111, 3'b011, 3'b001, 3'b100};

  initial begin
    // the 3-stage example: feedback is the next Q1
    t3 = 3'b110;  // taps at Q2 (bit 1) and Q3 (bit 2)
    for (int r = 0; r < 7; r++) begin
      q3 = {SEQ3[r][0], SEQ3[r][1], SEQ3[r][2]};  // bit 0 = Q1
      #1 check(f3, SEQ3[r+1][2], "3-stage sequence feedback");
    end
    // the 16-stage main taps on a single 1 in each tap position
    t16 = 16'hD008;
    for (int i = 0; i < 16; i++) begin
      q16 = 16'(1) << i;
      #1 check(f16, (i == 3 || i == 12 || i == 14 || i == 15), "single bit at stage");
    end
    for (int i = 0; i < 3000; i++) begin
      q16 = 16'($urandom); t16 = 16'($urandom);
      q3  = 3'($urandom);  t3  = 3'($urandom);
      q5  = 5'($urandom);  t5  = 5'($urandom);
      #1;
      check(f16, parity(q16, t16, 16), "N=16 random");
      check(f3,  parity({13'b0, q3}, {13'b0, t3}, 3), "N=3 random");
      check(f5,  parity({11'b0, q5}, {11'b0, t5}, 5), "N=5 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
