// bpu_pkg: types and helper functions shared by the branch-prediction unit
// (BPU) and its self-test logic.
//
// ctr_t is the 2-bit saturating counter that every Pattern History Table
// entry holds (states S0..S3; S0 = strongly not taken, S3 = strongly taken).
// The prediction is "taken" in S2 and S3. ctr_next() is the counter FSM:
// a taken branch moves one state up, a not-taken branch one state down,
// saturating at S0 and S3. These follow the counter the self-test method is
// built around.
//
// misr_poly() returns the feedback taps of the signature polynomial for the
// register widths the evaluation uses (8, 16, 32 bits). The polynomials are
// this design's choice; the method does not fix them. The 8-bit one is
// deliberately not primitive: a primitive degree-8 polynomial has period
// 255, exactly one traversal of a 256-entry table, so an error repeated in
// every traversal would cancel in the signature. (x+1)(x^7+x+1) has period
// 127, which divides none of the traversal lengths 2^n - 1 for n = 8..12.
package bpu_pkg;

  typedef enum logic [1:0] {
    S0 = 2'd0,  // strongly not taken
    S1 = 2'd1,  // weakly not taken
    S2 = 2'd2,  // weakly taken
    S3 = 2'd3   // strongly taken
  } ctr_t;

  // Prediction of a counter: its most significant bit.
  function automatic logic ctr_predict(input ctr_t s);
    return (s == S2) || (s == S3);
  endfunction

  // 2-bit saturating counter transition.
  function automatic ctr_t ctr_next(input ctr_t s, input logic taken);
    ctr_t n;
    if (taken) n = (s == S3) ? S3 : ctr_t'(s + 2'd1);
    else       n = (s == S0) ? S0 : ctr_t'(s - 2'd1);
    return n;
  endfunction

  // Feedback taps (polynomial without its x^W term):
  //   W=8 : x^8  + x^7  + x^2 + 1          = (x + 1)(x^7 + x + 1)
  //   W=16: x^16 + x^15 + x^13 + x^4 + 1
  //   W=32: x^32 + x^22 + x^2 + x + 1
  // (the 16- and 32-bit ones are primitive).
  // Other widths fall back to x^W + x + 1 (not necessarily primitive).
  function automatic logic [31:0] misr_poly(input int unsigned w);
    case (w)
      8:       return 32'h0000_0085;
      16:      return 32'h0000_A011;
      32:      return 32'h0040_0007;
      default: return 32'h0000_0003;
    endcase
  endfunction

endpackage
