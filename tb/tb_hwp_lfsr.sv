// End-to-end self-checking testbench for hwp_lfsr at its default size
// (16 stages), with a 1 GHz reference clock.
//
// Inputs change on the falling edge of ref_clk; outputs are checked just
// before the next rising edge, against a software LFSR kept in the testbench
// (next Q1 = XOR of the tapped stages, every other stage takes its left
// neighbour). The run covers, and counts:
//   - single-cycle initialization (prog) of a seed,
//   - the 3-stage example sequence with taps Q2 and Q3, checked against its
//     table of states Q1 Q2 Q3: 100 010 101 110 111 011 001 100,
//   - a lone 1 walking through all 16 stages with no taps,
//   - clock disable: state frozen while clk_en is low, then resumes,
//   - the main configuration, taps 4, 13, 15, 16: the full 65535-step
//     period, every state compared and the first return to the seed found
//     exactly at step 65535,
//   - a sweep of shorter loops closed by the tap mask (3 stages / 2 taps,
//     4 stages / 2 taps, 8 stages / 4 taps), each with its maximal period,
//   - the all-zero lock-up state,
//   - shift latency: q still old 1 ps after the rising edge, new 60 ps after.
// Each mechanism that never happened counts as a failure.
module tb_hwp_lfsr;
  timeunit 1ps;
  timeprecision 1ps;
  import lfsr_pkg::*;

  localparam int unsigned N = LFSR_N;
  localparam int HALF = 500;

  logic         ref_clk = 1'b0;
  logic         clk_en  = 1'b1;
  logic         prog    = 1'b0;
  logic [N-1:0] seed    = '0;
  logic [N-1:0] tap_sel = '0;
  logic [N-1:0] q;
  logic         fb, wp_clk;

  logic [N-1:0] model;
  int checks = 0, failures = 0;
  int n_load = 0, n_disable = 0, n_tapcfg = 0, n_lockup = 0, n_walk = 0, n_period = 0, n_latency = 0, n_sweep = 0;

  hwp_lfsr dut (
    .ref_clk (ref_clk),
    .clk_en  (clk_en),
    .prog    (prog),
    .seed    (seed),
    .tap_sel (tap_sel),
    .q       (q),
    .fb      (fb),
    .wp_clk  (wp_clk)
  );

  always #(HALF) ref_clk = ~ref_clk;

  initial begin : watchdog
    #(longint'(200_000) * 2 * HALF);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model_next(input logic [N-1:0] s, input logic [N-1:0] t);
    logic f = 1'b0;
    for (int i = 0; i < int'(N); i++) if (t[i] && s[i]) f = ~f;
    return {s[N-2:0], f};
  endfunction

  task automatic check_q(input logic [N-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: q=%h expected %h at %0t", what, q, exp, $time);
    end
  endtask

  // one reference clock cycle: wait for the falling edge (inputs already set
  // by the caller before it), then the rising edge, then check before the
  // next falling edge
  task automatic cycle();
    @(posedge ref_clk);
    #(HALF - 10);
  endtask

  task automatic load(input logic [N-1:0] s);
    @(negedge ref_clk);
    prog = 1'b1;
    seed = s;
    cycle();
    @(negedge ref_clk);
    prog = 1'b0;
    model = s;
    check_q(s, "single-cycle load");
    n_load++;
  endtask

  // Sweep of shorter loops. The masks are known maximal polynomials
  // x^3+x^2+1, x^4+x^3+1 and x^8+x^6+x^5+x^4+1 (taps {2,3}, {3,4}, {4,5,6,8}).
  localparam logic [15:0] SWEEP_MASK [3] = '{16'h0006, 16'h000C, 16'h00B8};
  localparam int unsigned SWEEP_LEN  [3] = '{3, 4, 8};

  localparam logic [2:0] TABLE3 [8] = '{3'b100, 3'b010, 3'b101, 3'b110,
                                        3'b111, 3'b011, 3'b001, 3'b100};

  initial begin
    logic [N-1:0] start;
    longint unsigned step;
    longint unsigned first_return;

    // ---- 3-stage example (taps Q2, Q3) ----
    tap_sel = LFSR3_TAPS;
    n_tapcfg++;
    load(N'(1));  // Q1 = 1, others 0
    for (int r = 1; r < 8; r++) begin
      cycle();
      checks++;
      if ({q[0], q[1], q[2]} !== TABLE3[r]) begin
        failures++;
        $display("FAIL 3-stage row %0d: Q1Q2Q3=%b%b%b expected %b", r, q[0], q[1], q[2], TABLE3[r]);
      end
      model = model_next(model, tap_sel);
      check_q(model, "3-stage vs model");
    end

    // ---- lone 1 walking through all stages, no taps ----
    @(negedge ref_clk);
    tap_sel = '0;
    n_tapcfg++;
    load(N'(1));
    for (int i = 1; i < int'(N); i++) begin
      cycle();
      check_q(N'(1) << i, "walking one");
    end
    cycle();
    check_q('0, "walking one leaves the register");
    n_walk++;

    // ---- shift latency and clock disable, main taps ----
    @(negedge ref_clk);
    tap_sel = PAPER_TAPS;
    n_tapcfg++;
    load(N'(16'hACE1));
    start = q;
    @(posedge ref_clk);
    #1 check_q(start, "q unchanged 1 ps after rising edge");
    #59 check_q(model_next(start, tap_sel), "q shifted 60 ps after rising edge");
    n_latency++;
    model = model_next(start, tap_sel);
    #(HALF - 70);
    @(negedge ref_clk);
    clk_en = 1'b0;
    repeat (6) begin
      cycle();
      check_q(model, "frozen while clock disabled");
    end
    n_disable++;
    @(negedge ref_clk);
    clk_en = 1'b1;
    repeat (5) begin
      cycle();
      model = model_next(model, tap_sel);
      check_q(model, "resumes after enable");
    end

    // ---- length / tap sweep: 3, 4 and 8 stages closed by the tap mask ----
    for (int k = 0; k < 3; k++) begin
      logic [N-1:0] mask;
      int unsigned m;
      longint unsigned ret;
      mask = SWEEP_MASK[k];
      m    = SWEEP_LEN[k];
      @(negedge ref_clk);
      tap_sel = mask;
      n_tapcfg++;
      load(N'(1));
      ret = 0;
      for (step = 1; step <= max_period(m) + 2; step++) begin
        cycle();
        model = model_next(model, tap_sel);
        check_q(model, "sweep sequence");
        if (ret == 0 && (q & N'((longint'(1) << m) - 1)) == N'(1)) ret = step;
      end
      checks++;
      if (ret != max_period(m)) begin
        failures++;
        $display("FAIL %0d-stage sweep: period %0d, expected %0d", m, ret, max_period(m));
      end else n_sweep++;
    end

    // ---- full period of the 16-stage configuration ----
    @(negedge ref_clk);
    tap_sel = PAPER_TAPS;
    load(N'(16'hACE1));
    start = q;
    first_return = 0;
    for (step = 1; step <= max_period(N); step++) begin
      cycle();
      model = model_next(model, tap_sel);
      check_q(model, "main sequence");
      if (first_return == 0 && q == start) first_return = step;
    end
    checks++;
    if (first_return != max_period(N)) begin
      failures++;
      $display("FAIL period: first return after %0d steps, expected %0d", first_return, max_period(N));
    end else begin
      n_period++;
    end

    // ---- lock-up state ----
    load('0);
    repeat (20) begin
      cycle();
      check_q('0, "all-zero state stays");
    end
    n_lockup++;

    $display("mechanisms: load=%0d tap_configs=%0d walk=%0d latency=%0d disable=%0d period=%0d sweep=%0d lockup=%0d",
             n_load, n_tapcfg, n_walk, n_latency, n_disable, n_period, n_sweep, n_lockup);
    if (n_load == 0)    begin failures++; $display("FAIL load never happened"); end
    if (n_tapcfg < 2)   begin failures++; $display("FAIL tap selection not exercised"); end
    if (n_walk == 0)    begin failures++; $display("FAIL walk never happened"); end
    if (n_latency == 0) begin failures++; $display("FAIL latency never checked"); end
    if (n_disable == 0) begin failures++; $display("FAIL disable never happened"); end
    if (n_period == 0)  begin failures++; $display("FAIL full period not reached"); end
    if (n_sweep != 3)   begin failures++; $display("FAIL length sweep incomplete"); end
    if (n_lockup == 0)  begin failures++; $display("FAIL lock-up never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
