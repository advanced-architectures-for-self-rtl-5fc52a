// tb_lms_update: self-checking test of the LMS coefficient update.
// Random errors, regressors and coefficients (including values near the
// coefficient limits, to reach saturation) are applied and every new
// coefficient is compared with h + round(conj(e)*u / 2^21) (halves rounded
// up), saturated to
// 25 bits, computed here with 64-bit integers. A final case checks that a
// zero error leaves the coefficients unchanged.
module tb_lms_update;
  import sic_pkg::*;

  localparam int N = N_BASIS * N_TAPS;

  samp_t          e;
  basis_t [N-1:0] u;
  coef_t  [N-1:0] h, h_next;
  int checks = 0, failures = 0, n_sat = 0;

  lms_update dut (.*);

  function automatic longint sat(longint v, int n);
    longint hi = (64'sd1 <<< (n-1)) - 1, lo = -(64'sd1 <<< (n-1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic longint rnd(int bits);
    return longint'($urandom_range(0, (1 << bits) - 1)) - (longint'(1) <<< (bits - 1));
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      longint er, ei;
      er = (t == 199) ? 0 : rnd(16);
      ei = (t == 199) ? 0 : rnd(16);
      e.re = 16'(er); e.im = 16'(ei);
      for (int i = 0; i < N; i++) begin
        u[i].re = 25'(rnd(25)); u[i].im = 25'(rnd(25));
        // every fourth test pushes coefficients to the edge of their range
        if (t % 4 == 0) begin
          h[i].re = ($urandom_range(0,1) != 0) ? 25'h0FFFFF0 : 25'h1000010;
          h[i].im = ($urandom_range(0,1) != 0) ? 25'h0FFFFF0 : 25'h1000010;
        end else begin
          h[i].re = 25'(rnd(25)); h[i].im = 25'(rnd(25));
        end
      end
      #1;
      for (int i = 0; i < N; i++) begin
        longint ur, ui, gr, gi, xr, xi;
        ur = longint'(u[i].re); ui = longint'(u[i].im);
        gr = er*ur + ei*ui;
        gi = er*ui - ei*ur;
        xr = longint'(h[i].re) + ((gr + (64'sd1 <<< 20)) >>> 21);
        xi = longint'(h[i].im) + ((gi + (64'sd1 <<< 20)) >>> 21);
        if (sat(xr, 25) != xr || sat(xi, 25) != xi) n_sat++;
        checks++;
        if (longint'(h_next[i].re) != sat(xr, 25) || longint'(h_next[i].im) != sat(xi, 25)) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d i=%0d got %0d,%0d exp %0d,%0d", t, i,
                                      longint'(h_next[i].re), longint'(h_next[i].im), sat(xr,25), sat(xi,25));
        end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("saturated updates: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
