// vr_pkg: types and constants shared by the vector-repeat decompression logic.
//
// The decompression logic is built for one of two kinds of tester:
//   ATE_RPG  the tester can repeat vectors on a group of its pins while the
//            other pins keep streaming (repeat-per-pin-group);
//   ATE_RPA  the tester repeats vectors on all of its pins or on none
//            (repeat-per-all-pins).
// The two sequential linear decompressors (common sequence generator, CSG,
// and unique sequence generator, USG) are LFSRs with tester data injected
// into some stages and an XOR phase shifter on the outputs. Their feedback
// polynomials and phase-shifter taps are not fixed by the scheme (any linear
// decompressor works); the choices below are this design's own:
//   * lfsr_taps(n): feedback mask for an n-stage LFSR. For the register sizes
//     this design uses, the taps come from the well-known table of
//     maximal-length LFSR taps; any other size falls back to taps {n, n-1}.
//     Bit k-1 of the mask is tap k (stage k is the k-th flip-flop of the shift).
//   * ps_tap(j, k, n): k-th (0..2) of the three distinct LFSR stages XORed
//     into output j.
//   * inj_stage(c, ch, n): stage that tester input c of ch is XORed into.
package vr_pkg;

  typedef enum logic {
    ATE_RPG = 1'b0,   // repeat-per-pin-group tester
    ATE_RPA = 1'b1    // repeat-per-all-pins tester 
  } ate_mode_e;

  localparam int MAX_LFSR = 512;

  function automatic logic [MAX_LFSR-1:0] tap_mask4(int a, int b, int c, int d);
    logic [MAX_LFSR-1:0] m;
    m = '0;
    m[a-1] = 1'b1;
    m[b-1] = 1'b1;
    if (c > 0) m[c-1] = 1'b1;
    if (d > 0) m[d-1] = 1'b1;
    return m;
  endfunction

  function automatic logic [MAX_LFSR-1:0] lfsr_taps(int n);
    case (n)
      27:      return tap_mask4(27, 5, 2, 1);
      28:      return tap_mask4(28, 25, 0, 0);
      41:      return tap_mask4(41, 38, 0, 0);
      48:      return tap_mask4(48, 47, 21, 20);
      78:      return tap_mask4(78, 77, 59, 58);
      86:      return tap_mask4(86, 85, 74, 73);
      93:      return tap_mask4(93, 91, 0, 0);
      112:     return tap_mask4(112, 110, 69, 67);
      115:     return tap_mask4(115, 114, 101, 100);
      142:     return tap_mask4(142, 121, 0, 0);
      145:     return tap_mask4(145, 93, 0, 0);
      150:     return tap_mask4(150, 97, 0, 0);
      default: return tap_mask4(n, n - 1, 0, 0);
    endcase
  endfunction

  // Three distinct stages per output: t0 = j mod n, t1 = t0 + d1 and
  // t2 = t0 + d2 (mod n) with 1 <= d1 <= n/2 - 1 < n/2 <= d2 <= n - 2, so the
  // three taps never coincide (needs n >= 4).
  function automatic int ps_tap(int j, int k, int n);
    int h;
    h = n / 2 - 1;
    case (k)
      0:       return j % n;
      1:       return (j % n + 1 + (7 * j + n / 3) % h) % n;
      default: return (j % n + n / 2 + (13 * j + 1) % h) % n;
    endcase
  endfunction

  function automatic int inj_stage(int c, int ch, int n);
    return (c * n) / ch;
  endfunction

endpackage
