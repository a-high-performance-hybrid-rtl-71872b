// Self-checking testbench for the wp_clk_gen behavioural model.
//
// ref_clk runs with a 1000 ps period (1 GHz). With the default inverter
// delays of 20 ps each, A_bar must follow ref_clk 40 ps later; wp_clk must
// stay high for 40 ps after each rising edge of ref_clk and then fall (pull-
// down through N1 and N2), and must stay low (floating node holds its
// charge) for 40 ps after each falling edge, then rise (pull-up P1). The
// expected times come from the two delays, not from the model.
module tb_wp_clk_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int D = 40;  // T_A + T_ABAR of the default model

  logic ref_clk = 1'b0;
  logic wp_clk, a_bar;
  int checks = 0, failures = 0;

  wp_clk_gen dut (.ref_clk(ref_clk), .wp_clk(wp_clk), .a_bar(a_bar));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200;
    check(wp_clk, 1'b1, "idle with ref_clk low");
    for (int c = 0; c < 50; c++) begin
      ref_clk = 1'b1;
      #(D - 2) check(wp_clk, 1'b1, "high just after rising edge");
      check(a_bar, 1'b0, "A_bar not yet risen");
      #4 check(wp_clk, 1'b0, "low after pull-down path opens");
      check(a_bar, 1'b1, "A_bar risen");
      #(500 - D - 2);
      ref_clk = 1'b0;
      #(D - 2) check(wp_clk, 1'b0, "floating node holds low");
      #4 check(wp_clk, 1'b1, "pulled up after A_bar falls");
      check(a_bar, 1'b0, "A_bar fallen");
      #(500 - D - 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
