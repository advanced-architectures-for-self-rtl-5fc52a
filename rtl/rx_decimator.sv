// rx_decimator: receive low-pass filter and decimator.
//
// The digitised receive signal arrives at the full 130 MHz rate, one complex
// Q1.15 sample per clock while in_valid is high. The band of interest is
// 20 MHz wide, so the stream is low-pass filtered and every DECIM-th filter
// output (DECIM = 5) is kept, giving the 26 MHz stream the canceller works
// on. Filtering by 5 and the 130/26 MHz rates are the published
// configuration; the filter itself is not published, and this design uses a
// direct-form FIR whose default taps are a 15-tap Hamming-windowed sinc with
// cutoff at 13 MHz (0.1 of the input rate), scaled to unity DC gain in Q1.15:
//   c[k] = round(32768 * w[k] * 0.2 sinc(0.2 (k-7)) / sum), w = Hamming.
//
// Timing: each accepted input shifts the delay line. On every DECIM-th input
// (counting from reset, first output after DECIM inputs) the filter sum over
// the updated delay line is registered, so out_valid is a one-clock pulse one
// cycle after that input. The sum is truncated (floor) to Q1.15 and
// saturated.
module rx_decimator
  import sic_pkg::*;
#(
  parameter int unsigned L     = DECIM,
  parameter int unsigned N_FIR = 15,
  parameter int          COEFS [N_FIR] = '{-118, -133, 0, 696, 2205, 4257, 6075,
                                           6803, 6075, 4257, 2205, 696, 0, -133, -118}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  samp_t in_samp,
  output logic  out_valid,
  output samp_t out_samp
);

  localparam int unsigned ACC_W = 48;

  samp_t                    dline [N_FIR];
  logic [$clog2(L+1)-1:0]   phase;

  // Delay line including the incoming sample, as seen by the filter sum.
  samp_t                    win [N_FIR];
  logic signed [ACC_W-1:0]  acc_re, acc_im;

  always_comb begin
    win[0] = in_samp;
    for (int k = 1; k < N_FIR; k++) win[k] = dline[k-1];
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < N_FIR; k++) begin
      acc_re += ACC_W'(win[k].re) * ACC_W'(COEFS[k]);
      acc_im += ACC_W'(win[k].im) * ACC_W'(COEFS[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_FIR; k++) dline[k] <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_samp  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < N_FIR; k++) dline[k] <= win[k];
        if (32'(phase) == L - 1) begin
          phase       <= '0;
          out_valid   <= 1'b1;
          out_samp.re <= SAMP_W'(sat_s(64'(acc_re >>> SAMP_FRAC), SAMP_W));
          out_samp.im <= SAMP_W'(sat_s(64'(acc_im >>> SAMP_FRAC), SAMP_W));
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
