// Shared constants and wiring rules of the compressed embedded diagnosis
// architecture.
//
// The default sizes are the largest configuration that was evaluated for this
// architecture: 64 internal scan chains. The scan chain length (27) follows
// from spreading the 1728 flip-flops of the largest benchmark core evaluated
// (s35932) over 64 chains; the input shift register length (32) and the mask
// code width (12 bits, 4096 masks) are this design's own choices. 12 bits are
// enough for every mask set reported for 64 chains (at most about 3300 masks).
//
// Two wiring rules live here so that RTL and any software that encodes test
// data share them:
//   * ps_tap()   : the three shift-register taps XORed into each phase
//                  shifter output. Output j (0 <= j < 2n) with R register
//                  bits uses q = j / R, t0 = j mod R and
//                  taps t0, (t0 + 1 + q) mod R, (t0 + 4 + 3q) mod R.
//   * misr_tap() : the feedback taps of the n-bit MISR, a table of known
//                  maximal-length LFSR tap sets (XNOR/XOR tap tables) for the
//                  chain counts of interest, falling back to (n, n-1).
package ced_pkg;

  localparam int unsigned N_CHAINS_DEF  = 64;
  localparam int unsigned CHAIN_LEN_DEF = 27;
  localparam int unsigned SR_LEN_DEF    = 32;
  localparam int unsigned CODE_W_DEF    = 12;

  // Shift-register bit feeding tap k (0..2) of phase shifter output j.
  function automatic int unsigned ps_tap(int unsigned j, int unsigned k, int unsigned r);
    int unsigned q, t0;
    q  = j / r;
    t0 = j % r;
    case (k)
      0:       return t0;
      1:       return (t0 + 1 + q) % r;
      default: return (t0 + 4 + 3 * q) % r;
    endcase
  endfunction

  // Feedback tap k (0..3) of an n-bit MISR, 0 meaning "no tap".
  // A tap value t feeds register bit n - t into the feedback XOR.
  function automatic int unsigned misr_tap(int unsigned n, int unsigned k);
    int unsigned t [4];
    case (n)
      4:       t = '{4, 3, 0, 0};
      8:       t = '{8, 6, 5, 4};
      12:      t = '{12, 6, 4, 1};
      16:      t = '{16, 15, 13, 4};
      24:      t = '{24, 23, 22, 17};
      32:      t = '{32, 22, 2, 1};
      40:      t = '{40, 38, 21, 19};
      48:      t = '{48, 47, 21, 20};
      56:      t = '{56, 55, 35, 34};
      64:      t = '{64, 63, 61, 60};
      default: t = '{n, n - 1, 0, 0};
    endcase
    return t[k];
  endfunction

endpackage
