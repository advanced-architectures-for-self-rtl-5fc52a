// lms_update: the LMS coefficient update of the canceller,
//   h(n+1) = h(n) + mu * conj(y_DC(n)) * u(n),
// applied to all N coefficients in parallel (N = 108 in the published
// configuration).
//
// The step size mu = 2^-MU_SH is a right shift (published: mu = 2^-13 as a
// bit shift). The error is the cancelled sample y_DC in Q1.15 after its
// truncation to 16 bits, the regressor u is in Q8.17 and the coefficients in
// Q1.24. The product conj(e)*u is exact (Q10.32); shifting it right by
// 15 + 17 - 24 + MU_SH bits aligns it to the coefficient LSB including mu.
// The shift rounds to nearest (half added first): plain truncation would
// add a bias of half an LSB to every coefficient on every update, which the
// loop can only balance by leaving a residual error correlated with u, a
// noise floor about 20 dB above the receiver noise. The sum is saturated to
// the 25-bit coefficient range. Using the truncated 16-bit error, the
// rounding and the saturation are this design's choices.
//
// Purely combinational: the caller registers h_next.
module lms_update
  import sic_pkg::*;
#(
  parameter int unsigned N     = N_BASIS * N_TAPS,
  parameter int unsigned MU_SH = MU_SHIFT
) (
  input  samp_t             e,
  input  basis_t [N-1:0]    u,
  input  coef_t  [N-1:0]    h,
  output coef_t  [N-1:0]    h_next
);

  localparam int unsigned PW    = SAMP_W + BASIS_W + 1;
  localparam int unsigned SHIFT = SAMP_FRAC + BASIS_FRAC - COEF_FRAC + MU_SH;
  localparam logic signed [PW-1:0] RND = PW'(1) <<< (SHIFT - 1);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic signed [PW-1:0] g_re, g_im;
      logic signed [63:0]   n_re, n_im;
      // conj(e) * u = (er*ur + ei*ui) + j (er*ui - ei*ur)
      g_re = PW'(e.re) * PW'(u[i].re) + PW'(e.im) * PW'(u[i].im);
      g_im = PW'(e.re) * PW'(u[i].im) - PW'(e.im) * PW'(u[i].re);
      n_re = 64'(h[i].re) + ((64'(g_re) + 64'(RND)) >>> SHIFT);
      n_im = 64'(h[i].im) + ((64'(g_im) + 64'(RND)) >>> SHIFT);
      h_next[i].re = COEF_W'(sat_s(n_re, COEF_W));
      h_next[i].im = COEF_W'(sat_s(n_im, COEF_W));
    end
  end

endmodule
