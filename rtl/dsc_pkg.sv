// dsc_pkg: constants, types and helper functions shared by the dynamic
// scan-clock BIST design.
//
// The step threshold follows the analysis of the scheme: with N scan
// flip-flops, a peak activity factor k and v clock frequencies, the frequency
// is raised once every k*N/v net non-transitions have entered the scan chains.
// k is given here in percent. The quotient is rounded up, so a fractional
// threshold never lets the clock speed up earlier than the power budget
// allows; that rounding is this design's choice.
package dsc_pkg;

  // Test-per-scan BIST controller states.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for start
    ST_SCAN    = 3'd1,  // scan enable high: shift in next vector, shift out last response
    ST_SETTLE  = 3'd2,  // scan enable low: combinational response settles
    ST_CAPTURE = 3'd3,  // scan enable low: normal-mode capture into the scan flip-flops
    ST_DONE    = 3'd4   // session finished, signature valid
  } bist_state_e;

  // Feedback mask of the default 23-bit LFSR and signature register:
  // x^23 + x^18 + 1 (bits 22 and 17 of the state).
  localparam logic [22:0] POLY23_TAPS = 23'h420000;

  // Non-transitions per frequency step: ceil(k*N/v), at least 1.
  function automatic int unsigned step_threshold(int unsigned num_ff,
                                                 int unsigned num_freq,
                                                 int unsigned alpha_peak_pct);
    longint unsigned num, den, q;
    num = longint'(alpha_peak_pct) * longint'(num_ff);
    den = 100 * longint'(num_freq);
    q   = (num + den - 1) / den;
    return (q < 1) ? 1 : int'(q);
  endfunction

endpackage
