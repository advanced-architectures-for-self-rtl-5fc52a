// tb_hp_branch: self-checking test of one coefficient filter branch.
// Random coefficients are loaded through h_load and random basis taps are
// applied with in_valid; the registered sum must equal
// sum_k conj(h[k]) * u[k] (computed here with 64-bit integers) exactly two
// clocks after in_valid. Also checked: clear zeroes the coefficients, and
// h_load replaces them.
module tb_hp_branch;
  import sic_pkg::*;

  localparam int NT = N_TAPS;
  localparam int BR_W = BASIS_W + COEF_W + 1 + $clog2(NT);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            clear = 1'b0, in_valid = 1'b0, h_load = 1'b0;
  basis_t [NT-1:0] u = '0;
  coef_t  [NT-1:0] h_next = '0, h;
  logic            out_valid;
  logic signed [BR_W-1:0] s_re, s_im;

  hp_branch dut (.*);

  int checks = 0, failures = 0;

  function automatic longint rnd(int bits);
    return longint'($urandom_range(0, (1 << bits) - 1)) - (longint'(1) <<< (bits - 1));
  endfunction

  initial begin
    longint er, ei;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (h != '0) begin failures++; $display("FAIL: coefficients not zero after reset"); end
    for (int t = 0; t < 300; t++) begin
      // new coefficients every test; extreme values in some tests
      for (int k = 0; k < NT; k++) begin
        h_next[k].re = (t % 10 == 1) ? 25'h1000000 : 25'(rnd(25));
        h_next[k].im = (t % 10 == 1) ? 25'h1000000 : 25'(rnd(25));
        u[k].re      = (t % 10 == 1) ? 25'h1000000 : 25'(rnd(25));
        u[k].im      = (t % 10 == 1) ? 25'h0FFFFFF : 25'(rnd(25));
      end
      h_load = 1'b1;
      @(negedge clk);
      h_load = 1'b0;
      checks++;
      if (h != h_next) begin failures++; $display("FAIL: load"); end
      er = 0; ei = 0;
      for (int k = 0; k < NT; k++) begin
        er += longint'(h[k].re)*longint'(u[k].re) + longint'(h[k].im)*longint'(u[k].im);
        ei += longint'(h[k].re)*longint'(u[k].im) - longint'(h[k].im)*longint'(u[k].re);
      end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      // change the inputs: the result must not depend on them any more
      for (int k = 0; k < NT; k++) begin u[k].re = 25'(rnd(25)); end
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid after one clock"); end
      @(negedge clk);
      checks++;
      if (!out_valid || longint'(s_re) != er || longint'(s_im) != ei) begin
        failures++;
        $display("FAIL: t=%0d valid %0b got %0d,%0d exp %0d,%0d", t, out_valid,
                 longint'(s_re), longint'(s_im), er, ei);
      end
      if (t % 50 == 49) begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        checks++;
        if (h != '0) begin failures++; $display("FAIL: clear"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
