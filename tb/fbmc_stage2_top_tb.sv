// fbmc_stage2_top_tb: end-to-end loopback of the stage-2 transmultiplexer at
// its default size (40 channels, 8 taps per polyphase branch, serial FFT).
// The prototype (Hann-windowed sinc, 320 taps, DC gain 20) is loaded once
// into both banks. The Tx gets a constant on channel 5, a slow complex tone
// on channel 12 and zeros elsewhere; its baseband output drives the Rx
// input directly. Once the filters have filled, every Rx frame is checked:
// channels 5 and 12 must come back with the loopback gain 20/1024 (within
// 5%), their neighbours below 3% and all other channels below 1% of that
// level. The test also counts the mechanisms it must exercise: coefficient
// loads, Tx/Rx frames, odd-channel sign flips on both sides, input gaps,
// both halves of the serial FFT output ping-pong, and no overrun.
module fbmc_stage2_top_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  localparam int K      = 40;
  localparam int L      = 320;
  localparam int NF     = 60;
  localparam int SETTLE = 40;
  localparam real A5    = 0.5;
  localparam real A12   = 0.4;
  localparam real GAIN  = 20.0 / 1024.0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       coef_we = 1'b0;
  logic [2:0] coef_tap = '0;
  logic [5:0] coef_branch = '0;
  coef_t      coef_data = '0;
  logic       tx_valid = 1'b0;
  cplx_t      tx_chan = '0;
  logic       tx_bb_valid, tx_overrun;
  cplx_t      tx_bb;
  logic       rx_valid, rx_sof, rx_overrun;
  logic [5:0] rx_ch;
  cplx_t      rx_chan;
  int         checks = 0, failures = 0;

  // mechanism counters
  int n_coef = 0, n_txf = 0, n_txbb = 0, n_rxf = 0, n_gap = 0;
  int n_txflip = 0, n_rxflip = 0;
  int n_pp [2];

  fbmc_stage2_top dut (
    .clk, .rst_n, .coef_we, .coef_tap, .coef_branch, .coef_data,
    .tx_valid, .tx_chan, .tx_bb_valid, .tx_bb, .tx_overrun,
    .rx_bb_valid(tx_bb_valid), .rx_bb(tx_bb),
    .rx_valid, .rx_sof, .rx_ch, .rx_chan, .rx_overrun
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (coef_we) n_coef++;
    if (tx_valid && dut.u_tx.ch == 6'(K - 1)) n_txf++;
    if (tx_valid && dut.u_tx.neg_frame && dut.u_tx.ch[0]) n_txflip++;
    if (tx_bb_valid) n_txbb++;
    if (rx_valid && rx_ch == 6'(K - 1)) n_rxf++;
    if (dut.u_rx.f_valid && dut.u_rx.neg_frame && dut.u_rx.f_idx[0]) n_rxflip++;
    if (dut.u_rx.g_ser.u_fft.out_valid && dut.u_rx.g_ser.u_fft.out_sof) n_pp[dut.u_rx.g_ser.u_fft.or_sel]++; // SER
  end

  // Tx stimulus
  initial begin
    n_pp[0] = 0;
    n_pp[1] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < L; n++) begin
      @(negedge clk);
      coef_data = s_of(proto(n, L, 6.0 / 320.0, 20.0));
      coef_we = 1'b1;
      coef_tap = 3'(n / K);
      coef_branch = 6'(n % K);
    end
    @(negedge clk);
    coef_we = 1'b0;
    for (int m = 0; m < NF; m++)
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        tx_valid = 1'b0;
        // a few idle clocks between frames 20 and 25 (the Tx then runs slower)
        if (m >= 20 && m < 25 && k == 0) begin
          repeat (7) @(negedge clk);
          n_gap++;
        end
        tx_chan = '0;
        if (k == 5) begin
          tx_chan.re = s_of(A5);
          tx_chan.im = s_of(-0.5 * A5);
        end
        if (k == 12) begin
          tx_chan.re = s_of(A12 * $cos(2.0 * PI * 0.02 * $itor(m)));
          tx_chan.im = s_of(A12 * $sin(2.0 * PI * 0.02 * $itor(m)));
        end
        tx_valid = 1'b1;
      end
    @(negedge clk);
    tx_valid = 1'b0;
  end

  // Rx checker
  initial begin
    real mag [K];
    real ref5, ref12;
    ref5  = GAIN * $sqrt(A5 * A5 * 1.25);
    ref12 = GAIN * A12;
    for (int f = 0; f < NF - 4; f++) begin
      for (int k = 0; k < K; k++) begin
        do @(negedge clk); while (!rx_valid);
        mag[k] = $sqrt(r_of(rx_chan.re) ** 2 + r_of(rx_chan.im) ** 2);
        checks++;
        if (int'(rx_ch) != k) begin
          failures++;
          $display("frame %0d: channel %0d where %0d expected", f, rx_ch, k);
        end
      end
      if (f >= SETTLE) begin
        for (int k = 0; k < K; k++) begin
          real lim;
          checks++;
          if (k == 5 || k == 12) begin
            real want;
            want = (k == 5) ? ref5 : ref12;
            if (mag[k] < 0.95 * want || mag[k] > 1.05 * want) begin
              failures++;
              $display("frame %0d ch %0d: level %f, expected %f", f, k, mag[k], want);
            end
          end else begin
            lim = (k == 4 || k == 6 || k == 11 || k == 13) ? 0.03 : 0.01;
            if (mag[k] > lim * ref12) begin
              failures++;
              $display("frame %0d ch %0d: leakage %f (limit %f)", f, k, mag[k], lim * ref12);
            end
          end
        end
      end
    end
    checks++;
    if (tx_overrun || rx_overrun) begin
      failures++;
      $display("overrun flagged");
    end
    $display("coef writes %0d, tx frames %0d, tx samples %0d, rx frames %0d, gaps %0d",
             n_coef, n_txf, n_txbb, n_rxf, n_gap);
    $display("sign flips tx %0d rx %0d, FFT output buffers %0d/%0d", n_txflip, n_rxflip, n_pp[0], n_pp[1]);
    checks += 7;
    if (n_coef != L) failures++;
    if (n_txf != NF) failures++;
    if (n_rxf < NF - 5) failures++;
    if (n_gap == 0) failures++;
    if (n_txflip == 0) failures++;
    if (n_rxflip == 0) failures++;
    if (n_pp[0] == 0 || n_pp[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
