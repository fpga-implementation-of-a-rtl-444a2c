// pfb_synthesis: transmit-side polyphase network of the real prototype
// filter h[0..K*P-1] for a K-channel DFT filter bank oversampled by 2
// (expansion M = K/2).
//
// Each input frame m is the K-point inverse DFT w_m[0..K-1] of the channel
// samples. Frames are kept in a history of 2P+1 slots (2P read, one being
// written). For frame m0 the block produces the M output samples
//     y[m0*M + r] = sum_{q=0}^{2P-1} h[r + q*M] * w_{m0-q}[(r + q*M) mod K]
// for r = 0..M-1, i.e. the expanded-by-M, filtered and summed branch
// signals. Since M = K/2, h[r + q*M] sits in coefficient bank q/2 at branch
// r + (q mod 2)*M and the history index is r + (q mod 2)*M. Frames older than
// the first one after reset count as zero.
//
// One output sample is computed per active clock with 2P real-by-complex
// products; outputs are spaced OSTRIDE clocks apart (default 2, so a frame
// of M outputs takes K clocks, the same time as a frame of K inputs).
// Rounding: Q1.17 products summed, rounded to Q1.17, saturated.
//
// Interface: w_valid/w deliver rho = 0..K-1 of a frame in order, at most one
// per clock. y_valid/y: the first output of frame m0 appears 2 clocks after
// the clock of its last input. Coefficient port as in pfb_analysis.
//
// The polyphase form with the real prototype and expansion by K/2 follows
// the published design; P, the frame history and the output pacing are
// this design's own choices.
module pfb_synthesis
  import fbmc_pkg::*;
#(
  parameter int unsigned K       = NCH,
  parameter int unsigned P       = 8,
  parameter int unsigned OSTRIDE = 2,
  localparam int unsigned M  = K / 2,
  localparam int unsigned NS = 2 * P + 1,
  localparam int unsigned KW = $clog2(K),
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned SW = $clog2(NS),
  localparam int unsigned MW = $clog2(M),
  localparam int unsigned TW = (OSTRIDE > 1) ? $clog2(OSTRIDE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [PW-1:0] coef_tap,
  input  logic [KW-1:0] coef_branch,
  input  coef_t         coef_data,
  input  logic          w_valid,
  input  cplx_t         w,
  output logic          y_valid,
  output cplx_t         y,
  output logic          overrun
);

  cplx_t hist  [NS][K];
  coef_t hbank [P][K];

  logic [KW-1:0] icnt;
  logic [SW-1:0] wslot;     // slot being written
  logic [SW-1:0] cur;       // slot of the frame being output
  logic [SW:0]   nfr;       // frames available (saturating at 2P)
  logic          run;
  logic [MW-1:0] r;
  logic [TW-1:0] tick;

  always_ff @(posedge clk) begin
    if (coef_we) hbank[coef_tap][coef_branch] <= coef_data;
  end

  always_ff @(posedge clk) begin
    if (w_valid) hist[wslot][icnt] <= w;
  end

  wire frame_done = w_valid && icnt == KW'(K - 1);
  wire last_out   = run && r == MW'(M - 1) && tick == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt    <= '0;
      wslot   <= '0;
      cur     <= '0;
      nfr     <= '0;
      run     <= 1'b0;
      r       <= '0;
      tick    <= '0;
      overrun <= 1'b0;
    end else begin
      if (w_valid) icnt <= (icnt == KW'(K - 1)) ? '0 : icnt + 1'b1;
      if (frame_done) begin
        if (run && !last_out) overrun <= 1'b1;
        wslot <= (wslot == SW'(NS - 1)) ? '0 : wslot + 1'b1;
        cur   <= wslot;
        if (nfr != (SW+1)'(2 * P)) nfr <= nfr + 1'b1;
        run   <= 1'b1;
        r     <= '0;
        tick  <= '0;
      end else if (run) begin
        if (tick == TW'(OSTRIDE - 1)) begin
          tick <= '0;
        end else begin
          tick <= tick + 1'b1;
        end
        if (tick == '0) begin
          r <= r + 1'b1;
          if (r == MW'(M - 1)) run <= 1'b0;
        end
      end
    end
  end

  // 2P taps for output r of frame cur
  logic signed [DW+CW+7:0] acc_re, acc_im;
  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int q = 0; q < 2 * P; q++) begin
      int          sl;
      logic [KW-1:0] br;
      cplx_t       s;
      sl = int'(cur) - q;
      if (sl < 0) sl = sl + NS;
      br = KW'(int'(r) + (q % 2) * M);
      s  = hist[SW'(sl)][br];
      if ((SW+1)'(q) < nfr) begin
        acc_re = acc_re + s.re * hbank[q / 2][br];
        acc_im = acc_im + s.im * hbank[q / 2][br];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= run && tick == '0;
      if (run && tick == '0) begin
        y.re <= rnd_sat(64'(acc_re), CW - 1);
        y.im <= rnd_sat(64'(acc_im), CW - 1);
      end
    end
  end

  assert property (@(posedge clk) !(frame_done && run && !last_out))
    else $error("pfb_synthesis: frame arrived before the previous one was output");

endmodule
