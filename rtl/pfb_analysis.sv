// pfb_analysis: receive-side polyphase network of the real prototype filter
// h[0..K*P-1] for a K-channel DFT filter bank oversampled by 2 (decimation
// M = K/2).
//
// After every M new input samples (frame m, newest sample at time t_m) the
// block produces the K branch sums
//     v[rho] = sum_{p=0}^{P-1} h[rho + p*K] * x[t_m - rho - p*K],  rho = 0..K-1
// one branch per clock (serialisation factor K, so the P taps of a branch
// are the only multipliers, shared by all K branches). A K-point inverse
// DFT of v then yields the K decimated channel signals.
//
// Memories: a circular delay line of 2**ceil(log2(K*P+M)) samples (the extra
// M entries let the next frame arrive while the current one is read), and P
// coefficient banks of K entries, bank p holding h[rho + p*K] at address rho.
// Coefficients are written through the coef_* port (tap p, branch rho).
// Samples older than the first one after reset read as zero.
//
// Rounding: sum of Q1.17 x Q1.17 products, rounded to Q1.17 and saturated.
//
// Interface: x_valid/x at most one sample every 2 clocks on average (a frame
// of M samples must not complete before the last of the K branch clocks of
// the previous frame; overrun is raised and asserted against if it
// does). Output v_valid/v/v_idx = rho, v_sof on rho = 0; the first branch
// appears 2 clocks after the clock of the frame's last sample.
//
// The polyphase decomposition, the real prototype and the serialisation
// with factor K (all branches on one set of multipliers) follow the
// published design; the prototype length P, the run-time coefficient port
// and the memory organisation are this design's own choices.
module pfb_analysis
  import fbmc_pkg::*;
#(
  parameter int unsigned K = NCH,
  parameter int unsigned P = 8,
  localparam int unsigned M   = K / 2,
  localparam int unsigned KW  = $clog2(K),
  localparam int unsigned PW  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW  = $clog2(K * P + M),
  localparam int unsigned MW  = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  // coefficient write port
  input  logic          coef_we,
  input  logic [PW-1:0] coef_tap,
  input  logic [KW-1:0] coef_branch,
  input  coef_t         coef_data,
  // input samples
  input  logic          x_valid,
  input  cplx_t         x,
  // branch outputs
  output logic          v_valid,
  output logic          v_sof,
  output logic [KW-1:0] v_idx,
  output cplx_t         v,
  output logic          overrun
);

  localparam int unsigned D = 2 ** AW;

  cplx_t dline [D];
  coef_t hbank [P][K];

  logic [AW-1:0] wp;        // next write address
  logic [AW:0]   nrx;       // samples received, saturating at D
  logic [MW-1:0] scnt;      // position in the current frame
  logic          run;
  logic [KW-1:0] rho;
  logic [AW-1:0] base;      // address of the newest sample of the frame
  logic [AW:0]   avail;     // samples available for the running frame

  // coefficient memory
  always_ff @(posedge clk) begin
    if (coef_we) hbank[coef_tap][coef_branch] <= coef_data;
  end

  // delay line
  always_ff @(posedge clk) begin
    if (x_valid) dline[wp] <= x;
  end

  wire frame_done = x_valid && scnt == MW'(M - 1);
  wire last_br    = run && rho == KW'(K - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      nrx     <= '0;
      scnt    <= '0;
      run     <= 1'b0;
      rho     <= '0;
      base    <= '0;
      avail   <= '0;
      overrun <= 1'b0;
    end else begin
      if (x_valid) begin
        wp   <= wp + 1'b1;
        if (nrx != (AW+1)'(D)) nrx <= nrx + 1'b1;
        scnt <= (scnt == MW'(M - 1)) ? '0 : scnt + 1'b1;
      end
      if (frame_done) begin
        if (run && !last_br) overrun <= 1'b1;
        run   <= 1'b1;
        rho   <= '0;
        base  <= wp;
        avail <= (nrx != (AW+1)'(D)) ? nrx + 1'b1 : nrx;
      end else if (run) begin
        rho <= rho + 1'b1;
        if (rho == KW'(K - 1)) run <= 1'b0;
      end
    end
  end

  // one branch per clock: P real-by-complex products
  logic signed [DW+CW+7:0] acc_re, acc_im;
  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int p = 0; p < P; p++) begin
      int unsigned age;
      cplx_t       s;
      age = int'(rho) + p * K;
      s   = dline[AW'(int'(base) - age)];
      if ((AW+1)'(age) < avail) begin
        acc_re = acc_re + s.re * hbank[p][rho];
        acc_im = acc_im + s.im * hbank[p][rho];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_valid <= 1'b0;
      v_sof   <= 1'b0;
      v_idx   <= '0;
      v       <= '0;
    end else begin
      v_valid <= run;
      v_sof   <= run && rho == '0;
      v_idx   <= rho;
      if (run) begin
        v.re <= rnd_sat(64'(acc_re), CW - 1);
        v.im <= rnd_sat(64'(acc_im), CW - 1);
      end
    end
  end

  // a frame may only complete once the previous one has been read out
  assert property (@(posedge clk) !(frame_done && run && !last_br))
    else $error("pfb_analysis: input frame overrun");

endmodule
