// dwt_pkg: constants shared by the 9/7 DWT datapath.
//
// The low-pass coefficients are the CDF 9/7 analysis low-pass taps scaled by
// 128 and rounded to 8-bit two's complement, in the order the design pairs
// them with the pre-added samples u1..u5 (u1 = outermost pair, u5 = centre
// sample). The high-pass coefficients are the CDF 9/7 analysis high-pass taps
// scaled by 64 (so that the centre tap, 1.115, still fits in 8 signed bits),
// paired in the same order with r1..r4. The low-pass set is the published one;
// the high-pass set is this design's reconstruction (see README).
package dwt_pkg;

  // Input sample width of the first stage (unsigned samples 0..15).
  localparam int IN_W     = 4;
  // Width of each 1-D output (first stage) and each 2-D output (second stage).
  localparam int OUT1_W   = 12;
  localparam int OUT2_W   = 18;
  // Coefficient word length; the MDA bit-plane count equals this.
  localparam int COEF_W   = 8;
  // Delay-line depth: X(n-1) .. X(n-8).
  localparam int DEPTH    = 8;

  localparam int LPF_TAPS = 9;
  localparam int HPF_TAPS = 7;
  localparam int LPF_NU   = (LPF_TAPS + 1) / 2;   // 5 pre-added terms
  localparam int HPF_NU   = (HPF_TAPS + 1) / 2;   // 4 pre-added terms

  localparam int LPF_COEF [LPF_NU] = '{77, 34, -10, -2, 3};
  localparam int HPF_COEF [HPF_NU] = '{71, -38, -4, 6};

endpackage
