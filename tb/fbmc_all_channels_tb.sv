// fbmc_all_channels_tb: all 40 channels occupied at once, through the
// default transmultiplexer in Tx->Rx loopback. Each channel carries its own
// constant complex value (amplitude 0.2 to 0.5, random phase). After the
// filters have filled, every Rx channel must return its own amplitude times
// the loopback gain 20/1024 within 6 % of the largest level (leakage from
// the neighbours included), and with the same phase from frame to frame.
// Halfway through, channels 0..19 are switched off: they must then fall
// below 3 % while channels 20..39 keep their level.
module fbmc_all_channels_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  localparam int  K    = 40;
  localparam int  L    = 320;
  localparam int  NF   = 100;
  localparam int  OFF  = 50;          // first Tx frame with channels 0..19 off
  localparam real GAIN = 20.0 / 1024.0;

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
  cplx_t      uval [K];
  real        amp [K];
  int         n_off_checked = 0;

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

  initial begin
    for (int k = 0; k < K; k++) begin
      real ph;
      amp[k] = 0.2 + 0.3 * $itor($urandom % 1001) / 1000.0;
      ph = 2.0 * PI * $itor($urandom % 1000) / 1000.0;
      uval[k].re = s_of(amp[k] * $cos(ph));
      uval[k].im = s_of(amp[k] * $sin(ph));
    end
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
        tx_chan = (m >= OFF && k < K / 2) ? '0 : uval[k];
        tx_valid = 1'b1;
      end
    @(negedge clk);
    tx_valid = 1'b0;
  end

  initial begin
    real gr [K];
    real gi [K];
    real mx, lev;
    mx = 0.0;
    for (int k = 0; k < K; k++) if (amp[k] > mx) mx = amp[k];
    for (int f = 0; f < NF - 4; f++) begin
      for (int k = 0; k < K; k++) begin
        real yr, yi;
        do @(negedge clk); while (!rx_valid);
        yr = r_of(rx_chan.re);
        yi = r_of(rx_chan.im);
        lev = $sqrt(yr * yr + yi * yi);
        if (f >= 30 && f < OFF - 2) begin
          checks++;
          if (rabs(lev - GAIN * amp[k]) > 0.06 * GAIN * mx) begin
            failures++;
            $display("frame %0d ch %0d: level %f expected %f", f, k, lev, GAIN * amp[k]);
          end
          if (f == 30) begin
            gr[k] = yr;
            gi[k] = yi;
          end else begin
            checks++;
            if ($sqrt((yr - gr[k]) ** 2 + (yi - gi[k]) ** 2) > 0.02 * GAIN * mx) begin
              failures++;
              $display("frame %0d ch %0d: output not steady", f, k);
            end
          end
        end
        if (f >= OFF + 30) begin
          checks++;
          if (k < K / 2) begin
            n_off_checked++;
            if (lev > 0.03 * GAIN * mx) begin
              failures++;
              $display("frame %0d ch %0d: switched-off channel at %f", f, k, lev);
            end
          end else if (rabs(lev - GAIN * amp[k]) > 0.06 * GAIN * mx) begin
            failures++;
            $display("frame %0d ch %0d: level %f expected %f", f, k, lev, GAIN * amp[k]);
          end
        end
      end
    end
    checks++;
    if (n_off_checked == 0 || tx_overrun || rx_overrun) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
