// sbst_prog_pkg: behavioural model of the self-test program, for the
// testbenches.
//
// The program models an n-bit external-XOR LFSR whose feedback enters the
// least significant bit, and executes one conditional branch per LFSR step
// whose direction is the feedback bit, so the Global History Register of
// the predictor follows the LFSR. A forward sequence (F) uses the feedback
// bit, a reverse sequence (R) its complement; both take the GHR from 1
// through 2**n - 1 states and back to 1. The 17 sequences are applied in
// the order F F F R R F R R R F F R F F F R R.
//
// lfsr_fb() uses taps of primitive polynomials (x^n + ... ) listed for
// n = 3..16 (Xilinx XAPP052 tap table, bits numbered from 1 = LSB).
package sbst_prog_pkg;

  localparam int NUM_SEQ = 17;

  function automatic bit is_reverse(input int k);  // k = 1..17
    // F F F R R F R R R F F R F F F R R
    case (k)
      4, 5, 7, 8, 9, 12, 16, 17: return 1'b1;
      default:                   return 1'b0;
    endcase
  endfunction

  function automatic bit lfsr_fb(input int unsigned g, input int n);
    int unsigned taps;
    case (n)
      3:  taps = (1 << 2) | (1 << 1);
      4:  taps = (1 << 3) | (1 << 2);
      5:  taps = (1 << 4) | (1 << 2);
      6:  taps = (1 << 5) | (1 << 4);
      7:  taps = (1 << 6) | (1 << 5);
      8:  taps = (1 << 7) | (1 << 5) | (1 << 4) | (1 << 3);
      9:  taps = (1 << 8) | (1 << 4);
      10: taps = (1 << 9) | (1 << 6);
      11: taps = (1 << 10) | (1 << 8);
      12: taps = (1 << 11) | (1 << 5) | (1 << 3) | (1 << 0);
      13: taps = (1 << 12) | (1 << 3) | (1 << 2) | (1 << 0);
      14: taps = (1 << 13) | (1 << 4) | (1 << 2) | (1 << 0);
      15: taps = (1 << 14) | (1 << 13);
      16: taps = (1 << 15) | (1 << 14) | (1 << 12) | (1 << 3);
      default: taps = 0;
    endcase
    return ^(g & taps);
  endfunction

  // Expected "prediction equals outcome" for sequences 4..17.
  function automatic bit expect_equal(input int k);
    return (k == 8) || (k == 9) || (k == 14) || (k == 15);
  endfunction

endpackage
