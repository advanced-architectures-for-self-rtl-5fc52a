// sic_canceller: adaptive nonlinear digital self-interference canceller.
//
// For every received 26 MHz sample y_RF(n) the canceller subtracts its
// estimate of the self-interference and adapts its coefficients with LMS:
//   y_DC(n)  = y_RF(n) - h(n)^H u(n)
//   h(n+1)   = h(n) + mu * conj(y_DC(n)) * u(n)
// The regressor u(n) holds the orthogonalized basis functions of orders
// 1, 3, 5 and 7 of transmit samples n+M1 .. n-M2+1 (13 pre-cursor and 14
// post-cursor taps, the latter counting the current sample; 27 taps and 108
// complex coefficients), read from the pre-computed
// basis memory by basis_tapline. The coefficients are split by basis
// function into hp_branch instances (h_1 .. h_P), whose outputs are summed
// and subtracted from y_RF; lms_update forms the new coefficients. All of
// this, the word lengths (Q1.15 samples, Q8.17 basis, Q1.24 coefficients)
// and mu = 2^-13 follow the published design.
//
// Schedule (this design's own pipelining; the 130 MHz clock gives 5 clocks
// per sample and the loop below needs 4):
//   c0  in_valid: y_RF taken, products conj(h)*u registered in the branches
//   c1  per-branch sums registered
//   c2  branch sums added, y_DC formed, truncated to Q1.15 (floor) with
//       saturation, registered
//   c3  coefficient update h <= h_next and regressor shift to u(n+1)
// Samples must therefore be at least 4 clocks apart (asserted). The
// cancelled sample is then carried through an alignment delay line so that
// out_valid comes exactly LAT clocks after in_valid; LAT defaults to the
// published canceller delay of 17 clocks (130 ns).
//
// Control: sync restarts the transmit sequence (see basis_tapline); until
// the regressor is filled (ready low) samples pass through uncancelled and
// nothing adapts. adapt_en, sampled with each input sample, decides whether
// that sample updates the coefficients (low freezes them while cancellation
// goes on); coef_clear sets them all to zero and overrides an update in the
// same clock. coef_rd_idx/coef_rd_data read one
// coefficient (index p*NT + k for basis p, tap k) for monitoring. out_sat
// flags an output sample that was clipped to the 16-bit range.
module sic_canceller
  import sic_pkg::*;
#(
  parameter int unsigned M1    = M1_TAPS,
  parameter int unsigned M2    = M2_TAPS,
  parameter int unsigned MU_SH = MU_SHIFT,
  parameter int unsigned LAT   = LATENCY,
  parameter int unsigned DEPTH = SEQ_DEPTH,
  localparam int unsigned NT   = M1 + M2,
  localparam int unsigned NC   = N_BASIS * NT,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(NC)
) (
  input  logic           clk,
  input  logic           rst_n,
  // received, decimated samples
  input  logic           in_valid,
  input  samp_t          y_rf,
  // cancelled samples
  output logic           out_valid,
  output samp_t          y_dc,
  output logic           out_sat,
  // control
  input  logic [AW:0]    seq_len,
  input  logic           sync,
  input  logic           adapt_en,
  input  logic           coef_clear,
  output logic           ready,
  output logic           wrap,
  // coefficient monitor
  input  logic [CW-1:0]  coef_rd_idx,
  output coef_t          coef_rd_data,
  // basis memory read port
  output logic           mem_rd_en,
  output logic [AW-1:0]  mem_rd_addr,
  input  basis_word_t    mem_rd_data
);

  localparam int unsigned PROD_W = BASIS_W + COEF_W + 1;
  localparam int unsigned BR_W   = PROD_W + $clog2(NT);
  localparam int unsigned SUM_W  = BR_W + $clog2(N_BASIS) + 2;
  localparam int unsigned ALIGN  = BASIS_FRAC + COEF_FRAC - SAMP_FRAC;

  // ---------------------------------------------------------------- regressor
  basis_word_t [NT-1:0] taps;
  logic                 advance;

  basis_tapline #(.M1(M1), .M2(M2), .DEPTH(DEPTH)) u_tapline (
    .clk, .rst_n, .seq_len, .sync, .advance, .ready, .wrap, .taps,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data
  );

  // ---------------------------------------------------------------- control
  logic       act0;                 // c0: sample accepted with a filled regressor
  logic [2:0] vld_q, act_q, adp_q;  // valid / active / adapt flags of stages c1..c3
  samp_t      y_q [2];              // y_RF carried to c2

  assign act0 = in_valid && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      act_q <= '0;
      adp_q <= '0;
      y_q   <= '{default: '0};
    end else begin
      vld_q <= {vld_q[1:0], in_valid};
      act_q <= {act_q[1:0], act0};
      adp_q <= {adp_q[1:0], adapt_en};
      y_q[0] <= in_valid ? y_rf : y_q[0];
      y_q[1] <= y_q[0];
    end
  end

  // ---------------------------------------------------------------- branches
  basis_t [NC-1:0]      u_flat;
  coef_t  [NC-1:0]      h_flat, h_next_flat;
  logic signed [BR_W-1:0] s_re [N_BASIS];
  logic signed [BR_W-1:0] s_im [N_BASIS];
  logic [N_BASIS-1:0]   br_valid;
  logic                 h_load;

  for (genvar p = 0; p < N_BASIS; p++) begin : g_branch
    basis_t [NT-1:0] u_p;
    for (genvar k = 0; k < NT; k++) begin : g_tap
      assign u_p[k]           = taps[k][p];
      assign u_flat[p*NT + k] = taps[k][p];
    end
    hp_branch #(.NT(NT)) u_hp (
      .clk, .rst_n,
      .clear     (coef_clear),
      .in_valid  (act0),
      .u         (u_p),
      .h_load    (h_load),
      .h_next    (h_next_flat[p*NT +: NT]),
      .h         (h_flat[p*NT +: NT]),
      .out_valid (br_valid[p]),
      .s_re      (s_re[p]),
      .s_im      (s_im[p])
    );
  end

  // ---------------------------------------------------------------- c2: error
  logic signed [SUM_W-1:0] est_re, est_im, d_re, d_im;
  logic signed [63:0]      q_re, q_im;
  samp_t                   e_c;
  logic                    sat_c;

  always_comb begin
    est_re = '0;
    est_im = '0;
    if (act_q[1]) begin
      for (int p = 0; p < N_BASIS; p++) begin
        est_re += SUM_W'(s_re[p]);
        est_im += SUM_W'(s_im[p]);
      end
    end
    d_re  = (SUM_W'(y_q[1].re) <<< ALIGN) - est_re;
    d_im  = (SUM_W'(y_q[1].im) <<< ALIGN) - est_im;
    q_re  = 64'(d_re >>> ALIGN);
    q_im  = 64'(d_im >>> ALIGN);
    e_c.re = SAMP_W'(sat_s(q_re, SAMP_W));
    e_c.im = SAMP_W'(sat_s(q_im, SAMP_W));
    sat_c  = (64'(e_c.re) != q_re) || (64'(e_c.im) != q_im);
  end

  samp_t e_q;
  logic  e_sat_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q     <= '0;
      e_sat_q <= 1'b0;
    end else if (vld_q[1]) begin
      e_q     <= e_c;
      e_sat_q <= sat_c;
    end
  end

  // ---------------------------------------------------------------- c3: update
  lms_update #(.N(NC), .MU_SH(MU_SH)) u_lms (
    .e(e_q), .u(u_flat), .h(h_flat), .h_next(h_next_flat)
  );

  assign h_load  = act_q[2] && adp_q[2] && !coef_clear;
  assign advance = act_q[2];

  assign coef_rd_data = h_flat[coef_rd_idx];

  // ---------------------------------------------------------------- output alignment
  localparam int unsigned DL = LAT - 3;
  typedef struct packed {
    logic  v;
    logic  s;
    samp_t d;
  } out_t;
  out_t dl [DL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl <= '{default: '0};
    end else begin
      dl[0] <= '{v: vld_q[2], s: e_sat_q, d: e_q};
      for (int i = 1; i < DL; i++) dl[i] <= dl[i-1];
    end
  end

  assign out_valid = dl[DL-1].v;
  assign out_sat   = dl[DL-1].v && dl[DL-1].s;
  assign y_dc      = dl[DL-1].d;

  // ---------------------------------------------------------------- checks
  initial assert (LAT >= 4) else $error("LAT must be at least 4");
  // the update loop takes 4 clocks: samples may not come closer
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |=> !in_valid [*3]);
  // all branch sums arrive together, one clock before the error is formed
  assert property (@(posedge clk) disable iff (!rst_n) br_valid == {N_BASIS{act_q[1]}});

endmodule
