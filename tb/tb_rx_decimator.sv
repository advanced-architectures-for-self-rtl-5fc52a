// tb_rx_decimator: self-checking test of the receive filter and decimator.
// Random 130 MHz samples (with occasional idle clocks) go in; the test keeps
// its own history of accepted inputs and checks that exactly every fifth
// accepted input produces an output, one clock later, equal to
// floor(sum c[k] x[n-k] / 2^15) saturated to 16 bits. A pattern with the
// signs of the taps at full scale checks the saturation, and a constant
// input checks the DC gain.
module tb_rx_decimator;
  import sic_pkg::*;

  localparam int N_FIR = 15;
  localparam int C [N_FIR] = '{-118, -133, 0, 696, 2205, 4257, 6075,
                               6803, 6075, 4257, 2205, 696, 0, -133, -118};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, out_valid;
  samp_t in_samp = '0, out_samp;

  rx_decimator dut (.*);

  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_sat = 0;
  longint hr [$], hi [$];

  function automatic longint sat(longint v, int n);
    longint mx = (64'sd1 <<< (n-1)) - 1, mn = -(64'sd1 <<< (n-1));
    return v > mx ? mx : (v < mn ? mn : v);
  endfunction

  task automatic push(longint r, longint i);
    longint ar = 0, ai = 0;
    bit expect_out;
    hr.push_front(r); hi.push_front(i);
    for (int k = 0; k < N_FIR; k++) begin
      if (k < hr.size()) begin ar += C[k] * hr[k]; ai += C[k] * hi[k]; end
    end
    n_in++;
    expect_out = (n_in % DECIM == 0);
    @(negedge clk);
    in_samp.re = 16'(r); in_samp.im = 16'(i); in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (out_valid != expect_out) begin
      failures++; $display("FAIL: input %0d: out_valid %0b", n_in, out_valid);
    end else if (expect_out) begin
      n_out++;
      if (sat(ar >>> 15, 16) != (ar >>> 15)) n_sat++;
      checks++;
      if (longint'(out_samp.re) != sat(ar >>> 15, 16) || longint'(out_samp.im) != sat(ai >>> 15, 16)) begin
        failures++;
        $display("FAIL: output %0d: got %0d,%0d exp %0d,%0d", n_out, longint'(out_samp.re),
                 longint'(out_samp.im), sat(ar >>> 15, 16), sat(ai >>> 15, 16));
      end
    end
    // back-to-back inputs mostly; sometimes idle clocks, where nothing may come out
    if ($urandom_range(0, 3) == 0) begin
      in_valid = 1'b0;
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: output while idle"); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++)
      push(longint'($urandom_range(0, 65535)) - 32768, longint'($urandom_range(0, 65535)) - 32768);
    // full scale with the signs of the taps: the sum exceeds the range
    for (int n = 0; n < 30; n++) begin
      int k;
      k = ((N_FIR - (n_in + 1) % N_FIR) % N_FIR);  // aligned at inputs 15, 30, ...
      push(C[k] < 0 ? -32768 : 32767, C[k] < 0 ? 32767 : -32768);
    end
    // DC: a constant comes out almost unchanged (gain 32767/32768)
    for (int n = 0; n < 30; n++) push(16000, -16000);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation not reached"); end
    $display("outputs %0d, saturated %0d", n_out, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
