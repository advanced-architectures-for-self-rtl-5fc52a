// sic_pkg: shared constants and complex fixed-point types of the nonlinear
// digital self-interference canceller.
//
// Word formats (integer bits include the sign bit):
//   received / cancelled samples  Q1.15, 16 bits per I and Q
//   basis functions in memory     Q8.17, 25 bits per I and Q
//   canceller coefficients        Q1.24, 25 bits per I and Q
// The canceller runs at 130 MHz on a 26 MHz sample stream, so one sample
// arrives every 5 clock cycles. Four odd-order basis functions (orders 1, 3,
// 5 and 7) with 27 memory taps each (13 pre-cursor, 14 post-cursor) give 108
// complex coefficients; the step size is 2^-13, applied as a right shift. All of
// these numbers are the published configuration; the memory depth and the
// receive filter are this design's own choices.
package sic_pkg;

  // Fixed-point formats
  localparam int unsigned SAMP_W     = 16;  // Q1.15
  localparam int unsigned SAMP_FRAC  = 15;
  localparam int unsigned BASIS_W    = 25;  // Q8.17
  localparam int unsigned BASIS_FRAC = 17;
  localparam int unsigned COEF_W     = 25;  // Q1.24
  localparam int unsigned COEF_FRAC  = 24;

  // Model size
  localparam int unsigned P_ORDER    = 7;                 // highest nonlinearity order
  localparam int unsigned N_BASIS    = (P_ORDER + 1) / 2; // odd orders 1,3,5,7
  localparam int unsigned M1_TAPS    = 13;                // pre-cursor taps
  localparam int unsigned M2_TAPS    = 14;                // post-cursor taps
  localparam int unsigned N_TAPS     = M1_TAPS + M2_TAPS;  // 27 taps per basis
  localparam int unsigned MU_SHIFT   = 13;                // mu = 2^-13

  // Timing
  localparam int unsigned DECIM      = 5;                 // 130 MHz / 26 MHz
  localparam int unsigned LATENCY    = 17;                // canceller delay in clocks

  // Basis memory (sequence length is not published; chosen here)
  localparam int unsigned SEQ_DEPTH  = 4096;

  typedef struct packed {
    logic signed [SAMP_W-1:0] re;
    logic signed [SAMP_W-1:0] im;
  } samp_t;

  typedef struct packed {
    logic signed [BASIS_W-1:0] re;
    logic signed [BASIS_W-1:0] im;
  } basis_t;

  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  // One memory word: the orthogonalized basis values of one transmit sample,
  // element p holding order 2p+1.
  typedef basis_t [N_BASIS-1:0] basis_word_t;

  // Saturate a wide signed value to an n-bit signed range (n <= 62).
  function automatic logic signed [63:0] sat_s(input logic signed [63:0] v,
                                               input int unsigned n);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (n - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (n - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

endpackage
