// tb_fd_sic_workloads: the two kinds of experiment the canceller is meant
// for, run on the full-size top with synthetic signals.
//
// 1. Self-interference level sweep. The same nonlinear leakage channel is
//    applied at four levels, 12 dB apart, over a fixed ADC noise. For each
//    level the coefficients are cleared, the canceller adapts for 3000
//    samples, and the input and residual powers are measured over the last
//    500. Expected: the residual ends near the noise floor at every level,
//    so the cancellation shrinks as the input gets weaker.
// 2. Tracking. With the canceller converged, the leakage channel turns in
//    phase (a disturbed antenna) by a quarter turn over 6000 samples
//    (0.23 ms at 26 MHz) and then holds. Expected: cancellation stays above
//    20 dB while the channel moves, the residual returns to the noise floor
//    afterwards, and the largest coefficient, read through the monitor port,
//    has turned by the same quarter turn. (With mu = 2^-13 and these basis
//    powers the LMS time constant is about 190 samples, which sets how far
//    the estimate lags a moving channel.)
// Powers are printed in dB relative to one LSB squared.
module tb_fd_sic_workloads;
  import sic_pkg::*;

  localparam int NT  = N_TAPS;
  localparam int NC  = N_BASIS * NT;
  localparam int SEQ = 2048;
  localparam int AW  = $clog2(SEQ_DEPTH);
  localparam int MAIN = N_TAPS / 2;          // coefficient index of the main tap of order 1

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          adc_valid = 1'b0;
  samp_t         adc_samp = '0;
  logic          bm_wr_en = 1'b0;
  logic [AW-1:0] bm_wr_addr = '0;
  basis_word_t   bm_wr_data = '0;
  logic [AW:0]   seq_len = (AW+1)'(SEQ);
  logic          sync = 1'b0, adapt_en = 1'b1, coef_clear = 1'b0;
  logic          ready, wrap;
  logic [$clog2(NC)-1:0] coef_rd_idx = ($clog2(NC))'(MAIN);
  coef_t         coef_rd_data;
  logic          rx_valid, out_valid, out_sat;
  samp_t         rx_samp, y_dc;

  fd_sic_top dut (.*);

  real    b_re [SEQ][N_BASIS], b_im [SEQ][N_BASIS];
  real    t_re [NC], t_im [NC];
  real    gain = 1.0, rot = 0.0, drot = 0.0;

  // ADC source: channel (rotated by rot, scaled by gain) on the basis values,
  // each value held for 5 clocks, plus uniform noise of +-4 LSB
  int  tx_j = 0, tx_ph = 0;
  real s_re = 0.0, s_im = 0.0;
  bit  channel_on = 1'b0;
  always @(negedge clk) if (rst_n) begin
    if (channel_on) begin
      if (tx_ph == 0) begin
        real ar, ai, c, s;
        ar = 0.0; ai = 0.0;
        for (int p = 0; p < N_BASIS; p++)
          for (int k = 0; k < NT; k++) begin
            int i, w;
            i = p*NT + k; w = ((tx_j + int'(M1_TAPS) - k) % SEQ + SEQ) % SEQ;
            ar += t_re[i]*b_re[w][p] + t_im[i]*b_im[w][p];
            ai += t_re[i]*b_im[w][p] - t_im[i]*b_re[w][p];
          end
        // conj(t) rotated by rot: estimate turns by -rot
        c = $cos(rot); s = $sin(rot);
        s_re = gain * (ar*c + ai*s) * 32768.0;
        s_im = gain * (ai*c - ar*s) * 32768.0;
        tx_j = (tx_j + 1) % SEQ;
        rot += drot;
      end
      tx_ph = (tx_ph + 1) % DECIM;
    end
    adc_samp.re = 16'($rtoi(s_re) + $urandom_range(0, 8) - 4);
    adc_samp.im = 16'($rtoi(s_im) + $urandom_range(0, 8) - 4);
    adc_valid = 1'b1;
  end

  // power meters
  bit  meas = 1'b0;
  real p_in = 0.0, p_out = 0.0;
  int  n_in = 0, n_out = 0;
  always @(posedge clk) if (meas) begin
    if (rx_valid) begin
      p_in += real'(longint'(rx_samp.re))**2 + real'(longint'(rx_samp.im))**2;
      n_in++;
    end
    if (out_valid) begin
      p_out += real'(longint'(y_dc.re))**2 + real'(longint'(y_dc.im))**2;
      n_out++;
    end
  end

  task automatic measure(int samples, output real pin_db, output real pout_db);
    p_in = 0.0; p_out = 0.0; n_in = 0; n_out = 0;
    meas = 1'b1;
    repeat (samples * DECIM) @(negedge clk);
    meas = 1'b0;
    pin_db  = 10.0 * $log10(p_in / n_in);
    pout_db = 10.0 * $log10(p_out / n_out);
  endtask

  int checks = 0, failures = 0;

  initial begin
    real pin, pout, c_start_re, c_start_im, worst, ang0, ang1, turned;
    for (int w = 0; w < SEQ; w++)
      for (int p = 0; p < N_BASIS; p++) begin
        b_re[w][p] = (real'($urandom_range(0, 2097152)) - 1048576.0) / 131072.0;
        b_im[w][p] = (real'($urandom_range(0, 2097152)) - 1048576.0) / 131072.0;
      end
    for (int i = 0; i < NC; i++) begin t_re[i] = 0.0; t_im[i] = 0.0; end
    for (int p = 0; p < N_BASIS; p++)
      for (int k = int'(M1_TAPS) - 2; k <= int'(M1_TAPS) + 2; k++) begin
        t_re[p*NT + k] = 0.004 * (real'($urandom_range(0, 1000)) - 500.0) / 500.0 / (p + 1);
        t_im[p*NT + k] = 0.004 * (real'($urandom_range(0, 1000)) - 500.0) / 500.0 / (p + 1);
      end
    t_re[MAIN] = 0.02; t_im[MAIN] = 0.0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < SEQ; w++) begin
      @(negedge clk);
      bm_wr_en = 1'b1; bm_wr_addr = AW'(w);
      for (int p = 0; p < N_BASIS; p++) begin
        bm_wr_data[p].re = 25'($rtoi(b_re[w][p] * 131072.0));
        bm_wr_data[p].im = 25'($rtoi(b_im[w][p] * 131072.0));
      end
    end
    @(negedge clk);
    bm_wr_en = 1'b0;
    @(negedge clk); sync = 1'b1;
    @(negedge clk); sync = 1'b0;
    while (!ready) @(negedge clk);
    channel_on = 1'b1;

    // 1. level sweep
    $display("SI level sweep:   input dB   residual dB   cancellation dB");
    for (int l = 0; l < 4; l++) begin
      gain = 1.0 / real'(1 << (2*l));
      @(negedge clk); coef_clear = 1'b1;
      @(negedge clk); coef_clear = 1'b0;
      repeat (2500 * DECIM) @(negedge clk);
      measure(500, pin, pout);
      $display("  level %0d        %6.1f       %6.1f        %6.1f", l, pin, pout, pin - pout);
      checks++;
      // noise of +-4 LSB at the ADC is about 7 dB after the filter; allow 6 dB above it
      if (pout > 13.0) begin failures++; $display("FAIL: residual %0.1f dB at level %0d", pout, l); end
      checks++;
      if (l == 0 && pin - pout < 30.0) begin failures++; $display("FAIL: cancellation at full level"); end
    end

    // 2. tracking a rotating channel
    gain = 1.0;
    repeat (2000 * DECIM) @(negedge clk);
    c_start_re = real'(longint'(coef_rd_data.re)); c_start_im = real'(longint'(coef_rd_data.im));
    ang0 = $atan2(c_start_im, c_start_re);
    drot = 3.14159265358979 / 2.0 / 6000.0;
    worst = 0.0;
    for (int b = 0; b < 12; b++) begin
      measure(500, pin, pout);
      if (b == 0 || pin - pout < worst) worst = pin - pout;
    end
    drot = 0.0;
    repeat (1500 * DECIM) @(negedge clk);
    measure(500, pin, pout);
    ang1 = $atan2(real'(longint'(coef_rd_data.im)), real'(longint'(coef_rd_data.re)));
    turned = ang1 - ang0;
    $display("tracking: least cancellation while moving %0.1f dB; residual after %0.1f dB; main coefficient turned %0.3f rad",
             worst, pout, turned);
    checks++;
    if (worst < 20.0) begin failures++; $display("FAIL: cancellation lost while tracking"); end
    checks++;
    if (pout > 13.0) begin failures++; $display("FAIL: residual did not settle"); end
    checks++;
    if (turned < 1.5708 - 0.1 || turned > 1.5708 + 0.1) begin
      failures++; $display("FAIL: main coefficient did not follow the channel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
