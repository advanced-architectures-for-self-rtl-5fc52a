// basis_mem: block RAM holding the pre-computed basis functions.
//
// The transmitter repeats one fixed transmit sequence, so the orthogonalized
// basis functions of that sequence are computed off-line by the host and
// stored here; the canceller then reads them instead of generating them in
// real time. One word holds the N_BASIS complex basis values (orders 1, 3,
// 5, 7) of one transmit sample, each I/Q part in Q8.17 (25 bits), as
// published. The depth (longest sequence) is not published: 4096 samples is
// this design's choice, about 0.8 Mbit.
//
// Interface: a write port for the host (wr_en, wr_addr, wr_data) and a read
// port for the canceller. Both are synchronous; read data appear one clock
// after rd_en with the address then presented (read-before-write on a
// collision). The array is not reset, as in a block RAM: it must be loaded
// before use.
module basis_mem
  import sic_pkg::*;
#(
  parameter int unsigned DEPTH = SEQ_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  basis_word_t       wr_data,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output basis_word_t       rd_data
);

  basis_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
