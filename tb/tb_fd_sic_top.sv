// tb_fd_sic_top: end-to-end test of the digital self-interference canceller
// at its default size (27 taps x 4 basis functions, 4096-word basis memory).
//
// The test plays the host and the receiver:
//   * it loads a full 4096-sample sequence of random basis vectors (I/Q
//     uniform in +-8.0) through the host port;
//   * it streams 130 MHz ADC samples from reset on: first noise only, so the
//     decimator runs and the canceller passes samples through uncancelled
//     (bypass) until the sequence is synchronised;
//   * after sync, the ADC carries a self-interference signal made by a sparse
//     nonlinear channel applied to the stored basis vectors (each value held
//     for 5 ADC clocks) plus noise, for more than one pass of the sequence,
//     so the basis address wraps and the canceller converges;
//   * it then freezes adaptation, drives full-scale input to clip the
//     output, clears the coefficients and lets them adapt again.
// An independent bit-exact model of the decimating filter and of the LMS
// canceller predicts every decimated sample, every cancelled sample with its
// saturation flag and its 17-clock latency, and every coefficient (read back
// through the monitor port). Each mechanism is counted and must occur.
module tb_fd_sic_top;
  import sic_pkg::*;

  localparam int NT    = N_TAPS;
  localparam int NC    = N_BASIS * NT;
  localparam int SEQ   = SEQ_DEPTH;
  localparam int AW    = $clog2(SEQ_DEPTH);
  localparam int N_FIR = 15;
  localparam int C [N_FIR] = '{-118, -133, 0, 696, 2205, 4257, 6075,
                               6803, 6075, 4257, 2205, 696, 0, -133, -118};

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
  logic [$clog2(NC)-1:0] coef_rd_idx = '0;
  coef_t         coef_rd_data;
  logic          rx_valid, out_valid, out_sat;
  samp_t         rx_samp, y_dc;

  fd_sic_top dut (.*);

  // ------------------------------------------------------------ model state
  longint b_re [SEQ][N_BASIS], b_im [SEQ][N_BASIS];
  longint h_re [NC], h_im [NC], t_re [NC], t_im [NC];
  int     n_idx = 0;
  bit     model_adapt = 1'b1;

  function automatic longint sat(longint v, int n);
    longint mx = (64'sd1 <<< (n-1)) - 1, mn = -(64'sd1 <<< (n-1));
    return v > mx ? mx : (v < mn ? mn : v);
  endfunction

  function automatic int widx(int n, int k);
    return ((n + int'(M1_TAPS) - k) % SEQ + SEQ) % SEQ;
  endfunction

  function automatic void dotc(input longint c_re[NC], input longint c_im[NC], input int n,
                               output longint s_re, output longint s_im);
    s_re = 0; s_im = 0;
    for (int p = 0; p < N_BASIS; p++)
      for (int k = 0; k < NT; k++) begin
        int i, w;
        i = p*NT + k; w = widx(n, k);
        s_re += c_re[i]*b_re[w][p] + c_im[i]*b_im[w][p];
        s_im += c_re[i]*b_im[w][p] - c_im[i]*b_re[w][p];
      end
  endfunction

  // ------------------------------------------------------------ counters
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_load = 0, n_dec = 0, n_bypass = 0, n_wrap = 0, n_upd = 0, n_frozen = 0;
  int n_sat = 0, n_clear = 0, n_out = 0;
  real pw_first = 0, pw_last = 0;
  int  n_act = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) if (rst_n && wrap) n_wrap++;

  // ------------------------------------------------------------ decimator model
  longint ar_hist [$], ai_hist [$];
  int     n_adc = 0;
  longint exp_rx_re, exp_rx_im;
  bit     exp_rx = 1'b0;

  typedef struct { longint er, ei; bit s; longint t; } exp_t;
  exp_t q[$];

  always @(posedge clk) if (rst_n) begin
    // a decimated sample from the previous clock enters the canceller now
    checks++;
    if (rx_valid != exp_rx) begin
      failures++; $display("FAIL: rx_valid %0b expected %0b", rx_valid, exp_rx);
    end else if (rx_valid) begin
      exp_t x;
      longint sr, si, qr, qi;
      bit act;
      sr = 0; si = 0;
      n_dec++;
      checks++;
      if (longint'(rx_samp.re) != exp_rx_re || longint'(rx_samp.im) != exp_rx_im) begin
        failures++; $display("FAIL: decimated sample %0d", n_dec);
      end
      act = ready;
      if (!act) n_bypass++;
      if (act) dotc(h_re, h_im, n_idx, sr, si);
      qr = ((exp_rx_re <<< 26) - sr) >>> 26;
      qi = ((exp_rx_im <<< 26) - si) >>> 26;
      x.er = sat(qr, 16); x.ei = sat(qi, 16);
      x.s  = (x.er != qr) || (x.ei != qi);
      x.t  = cyc;
      q.push_back(x);
      if (act && model_adapt) begin
        n_upd++;
        for (int p = 0; p < N_BASIS; p++)
          for (int k = 0; k < NT; k++) begin
            int i, w;
            longint gr, gi;
            i = p*NT + k; w = widx(n_idx, k);
            gr = x.er*b_re[w][p] + x.ei*b_im[w][p];
            gi = x.er*b_im[w][p] - x.ei*b_re[w][p];
            h_re[i] = sat(h_re[i] + ((gr + (64'sd1 <<< 20)) >>> 21), 25);
            h_im[i] = sat(h_im[i] + ((gi + (64'sd1 <<< 20)) >>> 21), 25);
          end
      end
      if (act && !model_adapt) n_frozen++;
      if (act) begin
        n_act++;
        if (n_act <= 300)                       pw_first += real'(x.er*x.er + x.ei*x.ei);
        if (n_act > SEQ + 200 && n_act <= SEQ + 500) pw_last += real'(x.er*x.er + x.ei*x.ei);
        n_idx = (n_idx + 1) % SEQ;
      end
    end
    // ADC sample taken by the decimator at this edge
    exp_rx = 1'b0;
    if (adc_valid) begin
      longint sr, si;
      sr = 0; si = 0;
      ar_hist.push_front(longint'(adc_samp.re));
      ai_hist.push_front(longint'(adc_samp.im));
      if (ar_hist.size() > N_FIR) begin void'(ar_hist.pop_back()); void'(ai_hist.pop_back()); end
      n_adc++;
      if (n_adc % DECIM == 0) begin
        for (int k = 0; k < ar_hist.size(); k++) begin
          sr += C[k] * ar_hist[k];
          si += C[k] * ai_hist[k];
        end
        exp_rx = 1'b1;
        exp_rx_re = sat(sr >>> 15, 16);
        exp_rx_im = sat(si >>> 15, 16);
      end
    end
  end

  // ------------------------------------------------------------ output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t x;
    checks++;
    n_out++;
    if (q.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      x = q.pop_front();
      if (cyc - x.t != longint'(LATENCY)) begin
        failures++; $display("FAIL: latency %0d", cyc - x.t);
      end else if (longint'(y_dc.re) != x.er || longint'(y_dc.im) != x.ei || out_sat != x.s) begin
        failures++;
        if (failures < 20)
          $display("FAIL: out %0d: got %0d,%0d sat %0b exp %0d,%0d sat %0b", n_out,
                   longint'(y_dc.re), longint'(y_dc.im), out_sat, x.er, x.ei, x.s);
      end
      if (out_sat) n_sat++;
    end
  end

  // ------------------------------------------------------------ ADC source
  // mode 0: noise; 1: channel + noise; 2: full scale negative; 3: positive
  int     adc_mode = 0;
  int     tx_j = 0, tx_ph = 0;
  longint s_re = 0, s_im = 0;

  always @(negedge clk) if (rst_n) begin
    longint vr, vi;
    if (adc_mode == 1) begin
      if (tx_ph == 0) begin
        dotc(t_re, t_im, tx_j, s_re, s_im);
        s_re = s_re >>> 26; s_im = s_im >>> 26;
        tx_j = (tx_j + 1) % SEQ;
      end
      tx_ph = (tx_ph + 1) % DECIM;
    end else begin
      s_re = 0; s_im = 0;
    end
    vr = s_re + longint'($urandom_range(0, 8)) - 4;
    vi = s_im + longint'($urandom_range(0, 8)) - 4;
    if (adc_mode == 2) begin vr = -32768; vi = -32768; end
    if (adc_mode == 3) begin vr = 32767;  vi = 32767;  end
    adc_samp.re = 16'(sat(vr, 16));
    adc_samp.im = 16'(sat(vi, 16));
    adc_valid = 1'b1;
  end

  task automatic check_coefs(input string tag);
    int bad = 0;
    for (int i = 0; i < NC; i++) begin
      @(negedge clk);
      coef_rd_idx = ($clog2(NC))'(i);
      #1;
      if (longint'(coef_rd_data.re) != h_re[i] || longint'(coef_rd_data.im) != h_im[i]) bad++;
    end
    checks++;
    if (bad) begin failures++; $display("FAIL: %s: %0d coefficients differ", tag, bad); end
  endtask

  task automatic wait_samples(int n);
    repeat (n * DECIM) @(negedge clk);
  endtask

  initial begin
    int t0;
    for (int w = 0; w < SEQ; w++)
      for (int p = 0; p < N_BASIS; p++) begin
        b_re[w][p] = longint'($urandom_range(0, 2097152)) - 1048576;
        b_im[w][p] = longint'($urandom_range(0, 2097152)) - 1048576;
      end
    for (int i = 0; i < NC; i++) begin h_re[i] = 0; h_im[i] = 0; t_re[i] = 0; t_im[i] = 0; end
    for (int p = 0; p < N_BASIS; p++)
      for (int k = int'(M1_TAPS) - 3; k <= int'(M1_TAPS) + 3; k++) begin
        t_re[p*NT + k] = (longint'($urandom_range(0, 400000)) - 200000) >>> p;
        t_im[p*NT + k] = (longint'($urandom_range(0, 400000)) - 200000) >>> p;
      end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // host loads the basis memory while the receiver already streams
    for (int w = 0; w < SEQ; w++) begin
      @(negedge clk);
      bm_wr_en = 1'b1; bm_wr_addr = AW'(w);
      for (int p = 0; p < N_BASIS; p++) begin
        bm_wr_data[p].re = 25'(b_re[w][p]);
        bm_wr_data[p].im = 25'(b_im[w][p]);
      end
      n_load++;
    end
    @(negedge clk);
    bm_wr_en = 1'b0;

    // synchronise to the transmit sequence
    @(negedge clk); sync = 1'b1; t0 = int'(cyc);
    @(negedge clk); sync = 1'b0;
    while (!ready) @(negedge clk);
    checks++;
    if (int'(cyc) - t0 != NT + 2) begin failures++; $display("FAIL: fill %0d clocks", int'(cyc) - t0); end
    adc_mode = 1;

    // adapt over more than one pass of the sequence
    wait_samples(SEQ + 600);

    // freeze and clip
    adapt_en = 1'b0; model_adapt = 1'b0;
    repeat (LATENCY) @(negedge clk);
    check_coefs("adapted");
    wait_samples(40);
    adc_mode = 2; wait_samples(20);
    adc_mode = 3; wait_samples(20);
    adc_mode = 1; wait_samples(40);
    check_coefs("frozen");

    // clear and adapt again
    @(negedge clk);
    coef_clear = 1'b1;
    @(posedge clk);
    for (int i = 0; i < NC; i++) begin h_re[i] = 0; h_im[i] = 0; end
    @(negedge clk);
    coef_clear = 1'b0;
    n_clear++;
    check_coefs("cleared");
    adapt_en = 1'b1; model_adapt = 1'b1;
    wait_samples(100);
    adapt_en = 1'b0; model_adapt = 1'b0;
    repeat (LATENCY) @(negedge clk);
    check_coefs("re-adapted");
    repeat (LATENCY + 10) @(negedge clk);

    checks++;
    if (!(pw_last * 30.0 < pw_first)) begin
      failures++; $display("FAIL: residual %g vs %g", pw_last, pw_first);
    end
    $display("residual reduction %0.1f dB", 10.0 * $log10(pw_first / pw_last));
    $display("events: load=%0d decimated=%0d bypass=%0d wrap=%0d update=%0d frozen=%0d sat=%0d clear=%0d",
             n_load, n_dec, n_bypass, n_wrap, n_upd, n_frozen, n_sat, n_clear);
    checks++;
    if (n_load != SEQ || n_dec == 0 || n_bypass == 0 || n_wrap < 2 || n_upd == 0 ||
        n_frozen == 0 || n_sat == 0 || n_clear == 0) begin
      failures++; $display("FAIL: a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
