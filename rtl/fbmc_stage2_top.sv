// fbmc_stage2_top: stage 2 of a two-stage TVWS up/down converter. The
// transmitter multiplexes the 40 UK TVWS channels (8 MHz each, sampled at
// 16 MHz, i.e. oversampled by 2) into one complex baseband stream at 40 x 8
// = 320 MS/s for stage 1 (the RF daughter-board), and the receiver
// demultiplexes such a stream back into 40 channels. Both are DFT-modulated
// oversampled filter banks built on a 40-point mixed-radix FFT.
//
// The shared coefficient port loads the same real prototype filter into the
// Tx and Rx banks (h[rho + p*40] at tap p, branch rho). FFT_SERIAL selects
// the serialised FFT (default) or the fully parallel one in both banks.
//
// Clocking: one clock at 40 x the channel sample rate (2 x the baseband
// rate): the Tx takes one channel sample per clock and emits one baseband
// sample every 2 clocks; the Rx takes one baseband sample every 2 clocks and
// emits one channel sample per clock. tx_overrun/rx_overrun flag input that
// came faster than that.
//
// Two-stage split, 40-channel bank, 18-bit word length and the serial FFT
// as the preferred version follow the published design; the shared
// coefficient port and the single-clock rate plan are this design's own.
module fbmc_stage2_top
  import fbmc_pkg::*;
#(
  parameter int unsigned P          = 8,
  parameter bit          FFT_SERIAL = 1'b1,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // prototype filter coefficients
  input  logic          coef_we,
  input  logic [PW-1:0] coef_tap,
  input  logic [5:0]    coef_branch,
  input  coef_t         coef_data,
  // Tx: channel samples in, baseband out (to stage 1)
  input  logic          tx_valid,
  input  cplx_t         tx_chan,
  output logic          tx_bb_valid,
  output cplx_t         tx_bb,
  output logic          tx_overrun,
  // Rx: baseband in (from stage 1), channel samples out
  input  logic          rx_bb_valid,
  input  cplx_t         rx_bb,
  output logic          rx_valid,
  output logic          rx_sof,
  output logic [5:0]    rx_ch,
  output cplx_t         rx_chan,
  output logic          rx_overrun
);

  fbmc_tx #(.P(P), .FFT_SERIAL(FFT_SERIAL)) u_tx (
    .clk, .rst_n,
    .coef_we, .coef_tap, .coef_branch, .coef_data,
    .u_valid(tx_valid), .u(tx_chan),
    .y_valid(tx_bb_valid), .y(tx_bb), .overrun(tx_overrun)
  );

  fbmc_rx #(.P(P), .FFT_SERIAL(FFT_SERIAL)) u_rx (
    .clk, .rst_n,
    .coef_we, .coef_tap, .coef_branch, .coef_data,
    .x_valid(rx_bb_valid), .x(rx_bb),
    .y_valid(rx_valid), .y_sof(rx_sof), .y_ch(rx_ch), .y(rx_chan),
    .overrun(rx_overrun)
  );

endmodule
