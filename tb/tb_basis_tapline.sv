// tb_basis_tapline: self-checking test of the regressor shift register.
// A behavioural memory holds a short sequence whose words encode their own
// address. After sync the test checks the fill time, then advances the
// register with random gaps and checks, for every sample n, that tap k holds
// the word of sequence index (n + M1 - k) mod seq_len, so the sequence wraps
// several times. The fill takes NT+1 clocks after the clock edge that takes
// sync (NT+2 counted from the clock in which sync is driven). The wrap pulse count, a second sync in the middle of a run
// and a change of seq_len are checked too.
module tb_basis_tapline;
  import sic_pkg::*;

  localparam int NT = N_TAPS;
  localparam int AW = $clog2(SEQ_DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [AW:0]          seq_len = '0;
  logic                 sync = 1'b0, advance = 1'b0;
  logic                 ready, wrap, mem_rd_en;
  basis_word_t [NT-1:0] taps;
  logic [AW-1:0]        mem_rd_addr;
  basis_word_t          mem_rd_data;

  basis_tapline dut (.*);

  function automatic basis_word_t word(int a);
    basis_word_t w;
    for (int p = 0; p < N_BASIS; p++) begin
      w[p].re = 25'(a);
      w[p].im = 25'(a * 4 + p);
    end
    return w;
  endfunction

  always_ff @(posedge clk) if (mem_rd_en) mem_rd_data <= word(int'(mem_rd_addr));

  int checks = 0, failures = 0, n_wrap = 0;
  always_ff @(posedge clk) if (rst_n && wrap) n_wrap++;

  task automatic check_taps(int n, int len);
    int bad = 0;
    for (int k = 0; k < NT; k++)
      if (taps[k] != word(((n + int'(M1_TAPS) - k) % len + len) % len)) bad++;
    checks++;
    if (bad) begin failures++; $display("FAIL: sample %0d: %0d taps wrong", n, bad); end
  endtask

  task automatic do_sync(int len);
    int t;
    @(negedge clk);
    seq_len = (AW+1)'(len);
    sync = 1'b1;
    @(negedge clk);
    sync = 1'b0;
    t = 1;
    while (!ready) begin @(negedge clk); t++; end
    checks++;
    if (t != NT + 2) begin failures++; $display("FAIL: fill took %0d clocks", t); end
  endtask

  task automatic run(int samples, int len);
    for (int n = 0; n < samples; n++) begin
      check_taps(n, len);
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("FAIL: ready before sync"); end

    do_sync(40);
    run(130, 40);               // last word read once in the fill, three times after
    checks++;
    if (n_wrap != 4) begin failures++; $display("FAIL: %0d wraps, expected 4", n_wrap); end

    do_sync(33);                // restart mid-run with another length
    run(70, 33);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
