// fbmc_tx_tb: loads the Hann-windowed sinc prototype (320 taps, cutoff
// 6/320 cycles/sample, DC gain 20) into two transmitters, one with the
// serial and one with the parallel FFT, and feeds both the same random
// channel frames, back to back for most frames and with gaps for some.
// Every baseband output is compared with the real-number synthesis bank
//   y[n] = (1/32) sum_k e^{j2*pi*k*n/40} sum_m u_k[m] h[n - 20m]
// (max error 40 LSB, RMS error 8 LSB; the inverse DFT is rounded to 18 bits
// before the filter, which then amplifies that rounding). Also checks the
// latency of each architecture and the 2-clock output spacing.
module fbmc_tx_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  localparam int K  = 40;
  localparam int P  = 8;
  localparam int L  = K * P;
  localparam int M  = K / 2;
  localparam int NF = 30;
  localparam int LAT_SER = 58;
  localparam int LAT_PAR = 45;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       coef_we = 1'b0;
  logic [2:0] coef_tap = '0;
  logic [5:0] coef_branch = '0;
  coef_t      coef_data = '0;
  logic       u_valid = 1'b0;
  cplx_t      u = '0;
  logic       sv, sovr, pv, povr;
  cplx_t      sy, py;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  real        h [L];
  real        ur [NF][K];
  real        ui [NF][K];
  int         last_cyc [NF];
  real        esum = 0.0;
  int         ecount = 0;

  fbmc_tx #(.P(P), .FFT_SERIAL(1'b1)) dut_s (.clk, .rst_n, .coef_we, .coef_tap, .coef_branch,
    .coef_data, .u_valid, .u, .y_valid(sv), .y(sy), .overrun(sovr));
  fbmc_tx #(.P(P), .FFT_SERIAL(1'b0)) dut_p (.clk, .rst_n, .coef_we, .coef_tap, .coef_branch,
    .coef_data, .u_valid, .u, .y_valid(pv), .y(py), .overrun(povr));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < L; n++) begin
      @(negedge clk);
      coef_data = s_of(proto(n, L, 6.0 / 320.0, 20.0));
      h[n] = r_of(coef_data);
      coef_we = 1'b1;
      coef_tap = 3'(n / K);
      coef_branch = 6'(n % K);
    end
    @(negedge clk);
    coef_we = 1'b0;
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        u_valid = 1'b0;
        if (f >= 10 && f < 15) while (($urandom % 3) == 0) @(negedge clk);
        u = rnd_c(0.3);
        ur[f][k] = r_of(u.re);
        ui[f][k] = r_of(u.im);
        u_valid = 1'b1;
        if (k == K - 1) last_cyc[f] = cyc;
      end
    @(negedge clk);
    u_valid = 1'b0;
  end

  task automatic check_out(input string tag, input int n, input cplx_t yv);
    real ar, ai;
    int  er, ei;
    ar = 0.0;
    ai = 0.0;
    for (int m = 0; m <= n / M; m++) begin
      int d;
      d = n - m * M;
      if (d < L) begin
        for (int k = 0; k < K; k++) begin
          real ph;
          ph = 2.0 * PI * $itor((k * n) % K) / $itor(K);
          ar += h[d] * (ur[m][k] * $cos(ph) - ui[m][k] * $sin(ph));
          ai += h[d] * (ur[m][k] * $sin(ph) + ui[m][k] * $cos(ph));
        end
      end
    end
    er = int'(yv.re) - q_of(ar / 32.0);
    ei = int'(yv.im) - q_of(ai / 32.0);
    esum += $itor(er * er + ei * ei);
    ecount += 2;
    checks++;
    if (iabs(er) > 40 || iabs(ei) > 40) begin
      failures++;
      if (failures < 10)
        $display("%s sample %0d: got %0d,%0d want %0d,%0d", tag, n, yv.re, yv.im,
                 q_of(ar / 32.0), q_of(ai / 32.0));
    end
  endtask

  task automatic watch(input string tag, input bit ser);
    int prev;
    prev = 0;
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < M; r++) begin
        do @(negedge clk); while (!(ser ? sv : pv));
        checks++;
        if (r == 0 && cyc - last_cyc[f] != (ser ? LAT_SER : LAT_PAR)) begin
          failures++;
          $display("%s: frame %0d latency %0d", tag, f, cyc - last_cyc[f]);
        end
        if (r != 0 && cyc - prev != 2) begin
          failures++;
          $display("%s: frame %0d output %0d spacing %0d", tag, f, r, cyc - prev);
        end
        prev = cyc;
        check_out(tag, f * M + r, ser ? sy : py);
      end
  endtask

  initial watch("serial", 1'b1);

  initial begin
    watch("parallel", 1'b0);
    repeat (100) @(negedge clk);
    checks++;
    if (esum / $itor(ecount) > 64.0) failures++;
    checks++;
    if (sovr || povr) failures++;
    $display("RMS error %f LSB over %0d values", $sqrt(esum / $itor(ecount)), ecount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
