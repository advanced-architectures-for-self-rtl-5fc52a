// tb_sic_canceller: self-checking test of the LMS canceller core.
//
// A behavioural basis memory feeds random white basis vectors (I/Q uniform
// in +-8.0) of a repeating sequence of SEQ samples. The received signal is
// made by a fixed sparse "true" nonlinear channel applied to the same
// regressor, plus a little noise. An independent bit-exact model of
//   y_DC = y_RF - h^H u,  h += 2^-13 conj(y_DC) u
// (64-bit integer arithmetic, the same truncation, rounding and saturation
// rules) predicts every
// output sample and every coefficient. Checked: bypass before sync, regressor
// fill time, the 17-clock latency of every sample, every output value and
// saturation flag, convergence of the residual, coefficient freeze, and
// coefficient clear.
module tb_sic_canceller;
  import sic_pkg::*;

  localparam int NT  = N_TAPS;
  localparam int NC  = N_BASIS * NT;
  localparam int SEQ = 300;
  localparam int AW  = $clog2(SEQ_DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0;
  samp_t         y_rf = '0;
  logic          out_valid, out_sat, ready, wrap;
  samp_t         y_dc;
  logic [AW:0]   seq_len = (AW+1)'(SEQ);
  logic          sync = 1'b0, adapt_en = 1'b1, coef_clear = 1'b0;
  logic [$clog2(NC)-1:0] coef_rd_idx = '0;
  coef_t         coef_rd_data;
  logic          mem_rd_en;
  logic [AW-1:0] mem_rd_addr;
  basis_word_t   mem_rd_data;

  sic_canceller dut (.*);

  // ------------------------------------------------------------ basis memory
  longint b_re [SEQ][N_BASIS];
  longint b_im [SEQ][N_BASIS];
  always_ff @(posedge clk) if (mem_rd_en) begin
    for (int p = 0; p < N_BASIS; p++) begin
      mem_rd_data[p].re <= BASIS_W'(b_re[int'(mem_rd_addr)][p]);
      mem_rd_data[p].im <= BASIS_W'(b_im[int'(mem_rd_addr)][p]);
    end
  end

  // ------------------------------------------------------------ reference
  longint h_re [NC], h_im [NC];      // model coefficients
  longint t_re [NC], t_im [NC];      // true channel
  int     n_idx;                     // sequence index of the next sample

  function automatic longint sat(longint v, int n);
    longint hi = (64'sd1 <<< (n-1)) - 1, lo = -(64'sd1 <<< (n-1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic int widx(int n, int k);   // sequence index of tap k
    return ((n + int'(M1_TAPS) - k) % SEQ + SEQ) % SEQ;
  endfunction

  // conj(c)*u summed over all coefficients, in units of 2^-41
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

  // one model iteration; returns the expected output and saturation flag
  function automatic void model(input longint yr, input longint yi, input bit active,
                                input bit adapt, output longint er, output longint ei,
                                output bit s);
    longint sr = 0, si = 0, qr, qi;
    if (active) dotc(h_re, h_im, n_idx, sr, si);
    qr = ((yr <<< 26) - sr) >>> 26;
    qi = ((yi <<< 26) - si) >>> 26;
    er = sat(qr, 16); ei = sat(qi, 16);
    s  = (er != qr) || (ei != qi);
    if (active && adapt)
      for (int p = 0; p < N_BASIS; p++)
        for (int k = 0; k < NT; k++) begin
          int i, w;
          longint gr, gi;
          i = p*NT + k; w = widx(n_idx, k);
          gr = er*b_re[w][p] + ei*b_im[w][p];
          gi = er*b_im[w][p] - ei*b_re[w][p];
          h_re[i] = sat(h_re[i] + ((gr + (64'sd1 <<< 20)) >>> 21), 25);
          h_im[i] = sat(h_im[i] + ((gi + (64'sd1 <<< 20)) >>> 21), 25);
        end
    if (active) n_idx = (n_idx + 1) % SEQ;
  endfunction

  // ------------------------------------------------------------ scoreboard
  int checks = 0, failures = 0;
  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  typedef struct { longint er, ei; bit s; longint t; } exp_t;
  exp_t q[$];
  int n_out = 0, n_sat = 0, n_bypass = 0, n_wrap = 0;
  real pw_first = 0, pw_last = 0;

  always_ff @(posedge clk) if (rst_n && wrap) n_wrap++;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t x;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      x = q.pop_front();
      if (cyc - x.t != LATENCY) begin
        failures++; $display("FAIL: latency %0d", cyc - x.t);
      end
      if (longint'(y_dc.re) != x.er || longint'(y_dc.im) != x.ei || out_sat != x.s) begin
        failures++;
        $display("FAIL: out %0d: got %0d,%0d sat %0b exp %0d,%0d sat %0b", n_out,
                 longint'(y_dc.re), longint'(y_dc.im), out_sat, x.er, x.ei, x.s);
      end
      if (out_sat) n_sat++;
    end
    n_out++;
  end

  task automatic send(input longint yr, input longint yi, input bit adapt);
    exp_t x;
    bit   act = ready;
    if (!act) n_bypass++;
    model(yr, yi, act, adapt, x.er, x.ei, x.s);
    @(negedge clk);
    y_rf.re = 16'(yr); y_rf.im = 16'(yi);
    in_valid = 1'b1;
    x.t = cyc;       // cycle counter value at the edge that takes the sample
    q.push_back(x);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  // received sample from the true channel, Q1.15, plus noise
  task automatic rx_sample(output longint yr, output longint yi);
    longint sr, si;
    dotc(t_re, t_im, n_idx, sr, si);
    yr = sat((sr >>> 26) + longint'($urandom_range(0, 8)) - 4, 16);
    yi = sat((si >>> 26) + longint'($urandom_range(0, 8)) - 4, 16);
  endtask

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

  initial begin
    longint yr, yi;
    int t0;
    for (int w = 0; w < SEQ; w++)
      for (int p = 0; p < N_BASIS; p++) begin
        b_re[w][p] = longint'($urandom_range(0, 2097152)) - 1048576;
        b_im[w][p] = longint'($urandom_range(0, 2097152)) - 1048576;
      end
    for (int i = 0; i < NC; i++) begin h_re[i] = 0; h_im[i] = 0; t_re[i] = 0; t_im[i] = 0; end
    // sparse channel: a few taps around the main cursor on every order
    for (int p = 0; p < N_BASIS; p++)
      for (int k = M1_TAPS - 2; k <= M1_TAPS + 3; k++) begin
        t_re[p*NT + k] = (longint'($urandom_range(0, 400000)) - 200000) >>> p;
        t_im[p*NT + k] = (longint'($urandom_range(0, 400000)) - 200000) >>> p;
      end
    n_idx = 0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // bypass: no sequence sync yet
    for (int i = 0; i < 5; i++) send(longint'($urandom_range(0, 20000)) - 10000, 1234, 1'b1);

    // sync and regressor fill
    @(negedge clk); sync = 1'b1; t0 = int'(cyc);
    @(negedge clk); sync = 1'b0;
    while (!ready) @(negedge clk);
    checks++;
    if (int'(cyc) - t0 != NT + 2) begin
      failures++; $display("FAIL: fill took %0d clocks", int'(cyc) - t0);
    end

    // adaptation
    for (int i = 0; i < 2400; i++) begin
      rx_sample(yr, yi);
      if (i < 200)   pw_first += real'(yr*yr + yi*yi);
      send(yr, yi, 1'b1);
    end
    repeat (LATENCY + 2) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      rx_sample(yr, yi);
      send(yr, yi, 1'b1);
    end
    repeat (LATENCY + 2) @(negedge clk);
    check_coefs("after adaptation");

    // frozen coefficients; drive the output into saturation
    adapt_en = 1'b0;
    for (int i = 0; i < 100; i++) begin
      rx_sample(yr, yi);
      if (i % 4 == 0) begin yr = (yr > 0) ? -32768 : 32767; end
      send(yr, yi, 1'b0);
    end
    repeat (LATENCY + 2) @(negedge clk);
    check_coefs("frozen");

    // clear
    @(negedge clk); coef_clear = 1'b1;
    @(negedge clk); coef_clear = 1'b0;
    for (int i = 0; i < NC; i++) begin h_re[i] = 0; h_im[i] = 0; end
    check_coefs("cleared");
    adapt_en = 1'b1;
    for (int i = 0; i < 20; i++) begin rx_sample(yr, yi); send(yr, yi, 1'b1); end
    repeat (LATENCY + 2) @(negedge clk);
    check_coefs("readapting");


    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", q.size()); end
    checks++;
    if (n_sat == 0 || n_bypass != 5 || n_wrap < 5) begin
      failures++; $display("FAIL: events sat=%0d bypass=%0d wrap=%0d", n_sat, n_bypass, n_wrap);
    end
    checks++;
    if (!(pw_last * 30.0 < pw_first)) begin
      failures++; $display("FAIL: residual %g vs input %g", pw_last, pw_first);
    end
    $display("residual power reduction: %0.1f dB, sat=%0d wrap=%0d", 10.0*$log10(pw_first/pw_last), n_sat, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // residual power of the last 200 adapted samples (output side)
  int n_adapt_out = 0;
  always @(posedge clk) if (rst_n && out_valid && !out_sat) begin
    n_adapt_out++;
    if (n_adapt_out > 5 + 2400 && n_adapt_out <= 5 + 2600)
      pw_last += real'(longint'(y_dc.re)*longint'(y_dc.re) + longint'(y_dc.im)*longint'(y_dc.im));
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
