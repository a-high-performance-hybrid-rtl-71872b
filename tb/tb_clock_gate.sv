// Self-checking testbench for clock_gate.
//
// ref_clk runs with a 1000 ps period. clk_en changes at random times, also
// inside the high phase. The expected gated clock is computed from the rule
// that the enable seen at a rising edge of ref_clk decides the whole high
// phase: gclk must equal that enable during the high phase and be 0 during
// the low phase, so no shortened pulse can appear.
module tb_clock_gate;
  timeunit 1ps;
  timeprecision 1ps;

  logic ref_clk = 1'b0;
  logic clk_en  = 1'b0;
  logic gclk;
  logic en_at_edge = 1'b0;
  int checks = 0, failures = 0;
  int pulses = 0, blocked = 0;

  clock_gate dut (.ref_clk(ref_clk), .clk_en(clk_en), .gclk(gclk));

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

  // random enable changes, anywhere in the cycle
  initial begin
    forever begin
      #($urandom_range(50, 1700));
      clk_en = ~clk_en;
    end
  end

  initial begin
    #300;
    for (int c = 0; c < 400; c++) begin
      en_at_edge = clk_en;
      ref_clk = 1'b1;
      if (en_at_edge) pulses++; else blocked++;
      repeat (4) begin
        #100 check(gclk, en_at_edge, "high phase follows enable at edge");
      end
      #100 ref_clk = 1'b0;
      repeat (4) begin
        #100 check(gclk, 1'b0, "low phase");
      end
      #100;
    end
    if (pulses == 0 || blocked == 0) begin
      failures++;
      $display("FAIL enable and disable not both exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
