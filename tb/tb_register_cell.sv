// Self-checking testbench for register_cell.
//
// Drives wp_clk and d by hand and checks the two-phase behaviour: q takes the
// value d had when wp_clk fell, q does not follow d while wp_clk is high, and
// q does not follow d while wp_clk is low (input stage closed). Expected
// values come from the stimulus itself. A watchdog ends a hung run.
module tb_register_cell;
  timeunit 1ps;
  timeprecision 1ps;

  logic wp_clk, d, q;
  int checks = 0, failures = 0;

  register_cell dut (.wp_clk(wp_clk), .d(d), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held, last;
    wp_clk = 1'b1;
    d      = 1'b1;
    #10 wp_clk = 1'b0;
    #10 check(1'b1, "capture 1 on falling edge");
    d = 1'b0;
    #10 check(1'b1, "input stage closed while wp_clk low");
    wp_clk = 1'b1;
    #10 d = 1'b1;
    #10 d = 1'b0;
    #10 check(1'b1, "output stage closed while wp_clk high");
    wp_clk = 1'b0;
    #10 check(1'b0, "capture 0 on falling edge");

    held = q;
    for (int i = 0; i < 500; i++) begin
      wp_clk = 1'b1;
      repeat (1 + $urandom_range(0, 3)) begin
        #7 d = 1'($urandom);
        #1 check(held, "q holds while wp_clk high");
      end
      last = d;
      #5 wp_clk = 1'b0;
      #5 check(last, "q takes d at falling edge");
      held = last;
      repeat ($urandom_range(0, 3)) begin
        #6 d = 1'($urandom);
        #1 check(held, "q holds while wp_clk low");
      end
      #5;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
