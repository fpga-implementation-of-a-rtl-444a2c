// fbmc_tx: stage-2 transmitter, an oversampled (x2) 40-channel DFT synthesis
// filter bank that multiplexes the 40 TVWS channels into one complex
// baseband stream, each channel expanded by K/2 = 20 and interpolated by the
// real prototype filter modulated to its band.
//
// Chain: channel sign (-1)^(k*m) (so that the expanded odd channels land on
// their band) -> 40-point FFT used as an inverse DFT over the channels
// (serial or parallel architecture, FFT_SERIAL) -> pfb_synthesis
// (serialised polyphase network). Output level:
//   y[n] = (1/32) * sum_k e^{j2*pi*k*n/40} * sum_m u_k[m] h[n - 20*m].
//
// Interface: u_valid/u deliver channels 0..39 of a frame in order, at most
// one per clock, frames back to back or with gaps. Each frame gives 20
// output samples, one every 2 clocks, the first 58 clocks (serial FFT) or
// 45 clocks (parallel FFT) after the clock of channel 39 (17 or 4 in the
// FFT, 39 to stream the FFT result, 2 in the polyphase network).
//
// Filter bank structure, 40 channels, expansion by K/2 and the two FFT
// options follow the published design; the sign pre-modulation and the
// inverse-DFT orientation are this design's own.
module fbmc_tx
  import fbmc_pkg::*;
#(
  parameter int unsigned P          = 8,
  parameter bit          FFT_SERIAL = 1'b1,
  localparam int unsigned K  = NCH,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [PW-1:0] coef_tap,
  input  logic [5:0]    coef_branch,
  input  coef_t         coef_data,
  input  logic          u_valid,
  input  cplx_t         u,
  output logic          y_valid,
  output cplx_t         y,
  output logic          overrun
);

  logic [5:0] ch;
  logic       neg_frame;
  cplx_t      u_signed;
  logic       w_valid, w_sof;
  logic [5:0] w_idx;
  cplx_t      w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch        <= '0;
      neg_frame <= 1'b0;
    end else if (u_valid) begin
      if (ch == 6'(K - 1)) begin
        ch        <= '0;
        neg_frame <= ~neg_frame;
      end else begin
        ch <= ch + 6'd1;
      end
    end
  end

  cneg_sat u_sign (.neg(neg_frame && ch[0]), .a(u), .y(u_signed));

  if (FFT_SERIAL) begin : g_ser
    fft40_serial #(.INVERSE(1'b1)) u_fft (
      .clk, .rst_n, .in_valid(u_valid), .in_data(u_signed),
      .out_valid(w_valid), .out_sof(w_sof), .out_idx(w_idx), .out_data(w)
    );
  end else begin : g_par
    fft40_par_stream #(.INVERSE(1'b1)) u_fft (
      .clk, .rst_n, .in_valid(u_valid), .in_data(u_signed),
      .out_valid(w_valid), .out_sof(w_sof), .out_idx(w_idx), .out_data(w)
    );
  end

  pfb_synthesis #(.K(K), .P(P)) u_pfb (
    .clk, .rst_n,
    .coef_we, .coef_tap, .coef_branch, .coef_data,
    .w_valid, .w, .y_valid, .y, .overrun
  );

  wire unused_ok = &{1'b0, w_sof, w_idx};

endmodule
