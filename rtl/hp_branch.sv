// hp_branch: the coefficient filter h_p of one basis function.
//
// Holds the NT complex coefficients (Q1.24) that weight one orthogonalized
// basis function over its NT memory taps, and computes that basis
// function's share of the self-interference estimate,
//   s_p(n) = sum_k conj(h_p[k]) * u_p[k],
// the part of h^H u that belongs to basis p. Coefficients start at zero and
// are replaced by the LMS update (h_load with h_next); clear zeroes them
// again, as the published initialisation h(0) = 0.
//
// Arithmetic: each complex product of a Q1.24 coefficient and a Q8.17 basis
// value is kept at full precision (Q10.41, PROD_W bits), and the NT products
// are summed with enough guard bits that nothing overflows (BR_W bits).
// No rounding happens here.
//
// Timing (this design's pipelining): in_valid at clock c registers the
// products of the coefficients and taps present in c; the sum is registered
// one clock later, so out_valid pulses two clocks after in_valid.
module hp_branch
  import sic_pkg::*;
#(
  parameter int unsigned NT      = N_TAPS,
  localparam int unsigned PROD_W = BASIS_W + COEF_W + 1,
  localparam int unsigned BR_W   = PROD_W + $clog2(NT)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  basis_t [NT-1:0]        u,
  input  logic                   h_load,
  input  coef_t  [NT-1:0]        h_next,
  output coef_t  [NT-1:0]        h,
  output logic                   out_valid,
  output logic signed [BR_W-1:0] s_re,
  output logic signed [BR_W-1:0] s_im
);

  logic signed [PROD_W-1:0] p_re [NT];
  logic signed [PROD_W-1:0] p_im [NT];
  logic                     p_valid;

  // conj(h) * u = (hr*ur + hi*ui) + j (hr*ui - hi*ur)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      for (int k = 0; k < NT; k++) begin
        p_re[k] <= '0;
        p_im[k] <= '0;
      end
    end else begin
      p_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < NT; k++) begin
          p_re[k] <= PROD_W'(h[k].re) * PROD_W'(u[k].re) + PROD_W'(h[k].im) * PROD_W'(u[k].im);
          p_im[k] <= PROD_W'(h[k].re) * PROD_W'(u[k].im) - PROD_W'(h[k].im) * PROD_W'(u[k].re);
        end
      end
    end
  end

  logic signed [BR_W-1:0] sum_re, sum_im;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int k = 0; k < NT; k++) begin
      sum_re += BR_W'(p_re[k]);
      sum_im += BR_W'(p_im[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      s_re      <= '0;
      s_im      <= '0;
    end else begin
      out_valid <= p_valid;
      if (p_valid) begin
        s_re <= sum_re;
        s_im <= sum_im;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      h <= '0;
    else if (clear)  h <= '0;
    else if (h_load) h <= h_next;
  end

endmodule
