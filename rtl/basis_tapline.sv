// basis_tapline: forms the canceller's regressor u(n) from the stored basis
// functions.
//
// For received sample n the canceller needs the orthogonalized basis vectors
// of M1 = 13 pre-cursor transmit samples (n+13 .. n+1) and M2 = 14
// post-cursor ones (n .. n-13), 27 taps in all. They are kept in a shift
// register, taps[0] holding sample n+M1 and taps[M1+M2-1] sample n-M2+1.
// (Counting the current sample among the post-cursor taps is this design's
// reading; it gives the published 27 taps and 108 coefficients.) Since the
// transmit sequence repeats, sample indices are taken modulo the sequence
// length seq_len and the memory address simply wraps.
//
// Operation (this design's own control, the alignment mechanism is not
// published):
//   * sync restarts the sequence. The shift register is then refilled with
//     one memory read per clock (M1+M2 reads, plus one prefetch); ready
//     goes high M1+M2+1 clocks after the sync clock edge, and the first
//     sample processed afterwards is paired with sequence index 0.
//   * advance (one clock pulse, after the canceller has used u(n)) shifts the
//     prefetched vector of sample n+1+M1 in and starts the read of the next
//     one. Advances must be at least two clocks apart, which the 5-clock
//     sample period easily meets.
//   * wrap pulses for one clock when the last word of the sequence is read
//     (the next read is of address 0).
// The memory port is basis_mem's: read data one clock after mem_rd_en.
module basis_tapline
  import sic_pkg::*;
#(
  parameter int unsigned M1    = M1_TAPS,
  parameter int unsigned M2    = M2_TAPS,
  parameter int unsigned DEPTH = SEQ_DEPTH,
  localparam int unsigned NT   = M1 + M2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [AW:0]           seq_len,    // 1..DEPTH, must exceed NT
  input  logic                  sync,
  input  logic                  advance,
  output logic                  ready,
  output logic                  wrap,
  output basis_word_t [NT-1:0]  taps,
  output logic                  mem_rd_en,
  output logic [AW-1:0]         mem_rd_addr,
  input  basis_word_t           mem_rd_data
);

  typedef enum logic [1:0] {IDLE, FILL, RUN} state_t;

  state_t               state;
  logic [AW:0]          ptr;        // next address to read
  logic [$clog2(NT+1)-1:0] cnt;
  logic [AW:0]          ptr_inc;
  logic [AW:0]          ptr_start;

  assign ptr_inc   = (ptr + 1'b1 == seq_len) ? '0 : ptr + 1'b1;
  assign ptr_start = seq_len - (AW+1)'(M2 - 1);
  assign ready     = (state == RUN);

  always_comb begin
    mem_rd_en   = 1'b0;
    mem_rd_addr = ptr[AW-1:0];
    wrap        = 1'b0;
    unique case (state)
      FILL:    mem_rd_en = 1'b1;
      RUN:     mem_rd_en = advance && !sync;
      default: mem_rd_en = 1'b0;
    endcase
    if (mem_rd_en && ptr_inc == '0) wrap = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      ptr   <= '0;
      cnt   <= '0;
      taps  <= '0;
    end else if (sync) begin
      state <= FILL;
      ptr   <= ptr_start;
      cnt   <= '0;
    end else begin
      unique case (state)
        FILL: begin
          ptr <= ptr_inc;
          cnt <= cnt + 1'b1;
          if (cnt != '0) taps <= {taps[NT-2:0], mem_rd_data};
          if (32'(cnt) == NT) state <= RUN;  // last fill word in, prefetch issued
        end
        RUN: if (advance) begin
          taps <= {taps[NT-2:0], mem_rd_data};
          ptr  <= ptr_inc;
        end
        default: ;
      endcase
    end
  end

  // seq_len must leave room for the whole regressor
  assert property (@(posedge clk) disable iff (!rst_n) sync |-> 32'(seq_len) > NT && 32'(seq_len) <= DEPTH);
  // advances come at most every other clock, and only once filled
  assert property (@(posedge clk) disable iff (!rst_n) advance |-> ready ##1 !advance);

endmodule
