// tb_basis_mem: self-checking test of the basis-function memory.
// Fills the whole memory with pseudo-random words through the write port,
// reads every address back (data one clock after rd_en), checks that read
// data hold while rd_en is low, and checks read-before-write on a
// simultaneous read and write of the same address.
module tb_basis_mem;
  import sic_pkg::*;

  localparam int DEPTH = SEQ_DEPTH;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  basis_word_t   wr_data = '0, rd_data;

  basis_mem dut (.*);

  int checks = 0, failures = 0;

  // word content as a function of address and a seed
  function automatic basis_word_t word(int a, int seed);
    basis_word_t w;
    for (int p = 0; p < N_BASIS; p++) begin
      w[p].re = 25'(a * 7919 + p * 104729 + seed);
      w[p].im = 25'(~(a * 31 + p * 1299709 + seed * 3));
    end
    return w;
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = word(a, 11);
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      int b;
      b = (a * 37) % DEPTH;       // visit addresses out of order
      rd_en = 1'b1; rd_addr = AW'(b);
      @(negedge clk);
      checks++;
      if (rd_data != word(b, 11)) begin
        failures++;
        if (failures < 10) $display("FAIL: address %0d", b);
      end
    end
    // hold while rd_en is low
    rd_en = 1'b0; rd_addr = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (rd_data != word((DEPTH - 1) * 37 % DEPTH, 11)) begin failures++; $display("FAIL: hold"); end
    // read and write of one address in the same clock: old data returned
    rd_en = 1'b1; rd_addr = AW'(5); wr_en = 1'b1; wr_addr = AW'(5); wr_data = word(5, 99);
    @(negedge clk);
    wr_en = 1'b0;
    checks++;
    if (rd_data != word(5, 11)) begin failures++; $display("FAIL: read-before-write"); end
    @(negedge clk);
    checks++;
    if (rd_data != word(5, 99)) begin failures++; $display("FAIL: rewritten word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * DEPTH + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
