// Shared constants of the hybrid wave-pipelined LFSR.
//
// LFSR_N is the register length of the main configuration (16 stages).
// PAPER_TAPS is the tap mask of that configuration: stages 4, 13, 15 and 16
// feed the XOR network. Bit k-1 of a tap mask selects stage Q_k, so the
// mask below has bits 3, 12, 14 and 15 set. These taps realise the
// polynomial x^16 + x^15 + x^13 + x^4 + 1, which gives the maximal period
// 2^16 - 1. LFSR3_TAPS is the small 3-stage example (taps at Q2 and Q3).
package lfsr_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned LFSR_N = 16;
  localparam logic [LFSR_N-1:0] PAPER_TAPS = 16'hD008;
  localparam logic [LFSR_N-1:0] LFSR3_TAPS = 16'h0006;

  // Period of a maximal-length LFSR with n stages.
  function automatic longint unsigned max_period(input int unsigned n);
    return (longint'(1) << n) - 1;
  endfunction
endpackage
