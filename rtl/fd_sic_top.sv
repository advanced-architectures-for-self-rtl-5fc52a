// fd_sic_top: real-time digital self-interference canceller of a
// single-antenna in-band full-duplex receiver.
//
// The receiver hears its own transmission through the circulator leakage,
// antenna reflection and multipath, after an RF canceller has removed most
// of it. This block removes what remains in the digital domain, including
// the power amplifier's nonlinear distortion:
//   adc_*      130 MHz complex Q1.15 samples from the receiver ADC
//   rx_decimator   low-pass filter and decimation by 5 to 26 MHz
//   sic_canceller  parallel-Hammerstein LMS canceller (orders 1..7,
//                  27 taps each, 108 coefficients, mu = 2^-13)
//   basis_mem      orthogonalized basis functions of the repeating transmit
//                  sequence, computed off-line and loaded by the host
//   y_dc       cancelled 26 MHz samples, Q1.15, one every 5 clocks
// The radio, power amplifier, circulator, RF canceller and host computer
// are outside this RTL; their connections are the ports below. The rates,
// model size, word lengths, step size and 17-clock delay are the published
// ones; the host and control ports, the memory depth and the receive filter
// taps are this design's own.
//
// Use: load the sequence's basis vectors through bm_wr_*, set seq_len, pulse
// sync (ready rises M1+M2+1 clocks after the clock edge that takes it, and the next decimated
// sample is paired with sequence index 0), then stream adc samples. Each
// cancelled sample appears LAT = 17 clocks after its decimated input. The
// canceller clock is the 130 MHz ADC clock.
module fd_sic_top
  import sic_pkg::*;
#(
  parameter int unsigned M1    = M1_TAPS,
  parameter int unsigned M2    = M2_TAPS,
  parameter int unsigned MU_SH = MU_SHIFT,
  parameter int unsigned LAT   = LATENCY,
  parameter int unsigned DEPTH = SEQ_DEPTH,
  localparam int unsigned NC   = N_BASIS * (M1 + M2),
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(NC)
) (
  input  logic          clk,
  input  logic          rst_n,
  // receiver (130 MHz)
  input  logic          adc_valid,
  input  samp_t         adc_samp,
  // host: basis memory load
  input  logic          bm_wr_en,
  input  logic [AW-1:0] bm_wr_addr,
  input  basis_word_t   bm_wr_data,
  // host: control
  input  logic [AW:0]   seq_len,
  input  logic          sync,
  input  logic          adapt_en,
  input  logic          coef_clear,
  output logic          ready,
  output logic          wrap,
  // host: coefficient monitor
  input  logic [CW-1:0] coef_rd_idx,
  output coef_t         coef_rd_data,
  // decimated received signal (canceller input), for observation
  output logic          rx_valid,
  output samp_t         rx_samp,
  // cancelled signal
  output logic          out_valid,
  output samp_t         y_dc,
  output logic          out_sat
);

  logic        mem_rd_en;
  logic [AW-1:0] mem_rd_addr;
  basis_word_t mem_rd_data;

  rx_decimator u_decim (
    .clk, .rst_n,
    .in_valid  (adc_valid),
    .in_samp   (adc_samp),
    .out_valid (rx_valid),
    .out_samp  (rx_samp)
  );

  basis_mem #(.DEPTH(DEPTH)) u_mem (
    .clk,
    .wr_en   (bm_wr_en),
    .wr_addr (bm_wr_addr),
    .wr_data (bm_wr_data),
    .rd_en   (mem_rd_en),
    .rd_addr (mem_rd_addr),
    .rd_data (mem_rd_data)
  );

  sic_canceller #(.M1(M1), .M2(M2), .MU_SH(MU_SH), .LAT(LAT), .DEPTH(DEPTH)) u_canc (
    .clk, .rst_n,
    .in_valid (rx_valid),
    .y_rf     (rx_samp),
    .out_valid, .y_dc, .out_sat,
    .seq_len, .sync, .adapt_en, .coef_clear, .ready, .wrap,
    .coef_rd_idx, .coef_rd_data,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data
  );

endmodule
