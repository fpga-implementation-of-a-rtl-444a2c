// fbmc_rx_tb: loads a Hann-windowed sinc prototype (320 taps, cutoff 6/320
// cycles/sample, DC gain 20) into two receivers, one with the serial and one
// with the parallel FFT, and feeds both the same random baseband stream at
// one sample every 2 clocks. Every channel output is compared with the
// real-number analysis bank
//   y_k[m] = (-1)^(k(m+1)) / 32 * sum_n h[n] e^{j2*pi*k*n/40} x[t_m - n]
// (max error 12 LSB, RMS error 4 LSB). Checks channel order, y_sof, the
// latency of each architecture and that the two agree on the frame count.
module fbmc_rx_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  localparam int K  = 40;
  localparam int P  = 8;
  localparam int L  = K * P;
  localparam int M  = K / 2;
  localparam int NF = 30;
  localparam int NS = NF * M;
  localparam int LAT_SER = 59;
  localparam int LAT_PAR = 46;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       coef_we = 1'b0;
  logic [2:0] coef_tap = '0;
  logic [5:0] coef_branch = '0;
  coef_t      coef_data = '0;
  logic       x_valid = 1'b0;
  cplx_t      x = '0;
  logic       sv, ssof, sovr, pv, psof, povr;
  logic [5:0] sch, pch;
  cplx_t      sy, py;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  real        h [L];
  real        xr [NS];
  real        xi [NS];
  int         last_cyc [NF];
  real        esum = 0.0;
  int         ecount = 0;

  fbmc_rx #(.P(P), .FFT_SERIAL(1'b1)) dut_s (.clk, .rst_n, .coef_we, .coef_tap, .coef_branch,
    .coef_data, .x_valid, .x, .y_valid(sv), .y_sof(ssof), .y_ch(sch), .y(sy), .overrun(sovr));
  fbmc_rx #(.P(P), .FFT_SERIAL(1'b0)) dut_p (.clk, .rst_n, .coef_we, .coef_tap, .coef_branch,
    .coef_data, .x_valid, .x, .y_valid(pv), .y_sof(psof), .y_ch(pch), .y(py), .overrun(povr));

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
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      x_valid = 1'b0;
      @(negedge clk);
      x = rnd_c(0.05);
      xr[n] = r_of(x.re);
      xi[n] = r_of(x.im);
      x_valid = 1'b1;
      if (n % M == M - 1) last_cyc[n / M] = cyc;
    end
    @(negedge clk);
    x_valid = 1'b0;
  end

  task automatic check_out(input string tag, input int f, input int k, input cplx_t yv,
                           input logic [5:0] ch, input logic sof);
    real ar, ai, sg;
    int  t, er, ei;
    t  = f * M + M - 1;
    ar = 0.0;
    ai = 0.0;
    for (int n = 0; n < L; n++) begin
      real ph;
      if (t - n >= 0) begin
        ph = 2.0 * PI * $itor((k * n) % K) / $itor(K);
        ar += h[n] * (xr[t-n] * $cos(ph) - xi[t-n] * $sin(ph));
        ai += h[n] * (xr[t-n] * $sin(ph) + xi[t-n] * $cos(ph));
      end
    end
    sg = ((k % 2) == 1 && (f % 2) == 0) ? -1.0 : 1.0;
    er = int'(yv.re) - q_of(sg * ar / 32.0);
    ei = int'(yv.im) - q_of(sg * ai / 32.0);
    esum += $itor(er * er + ei * ei);
    ecount += 2;
    checks += 2;
    if (int'(ch) != k || sof != (k == 0)) begin
      failures++;
      $display("%s frame %0d: channel %0d sof %0b, expected %0d", tag, f, ch, sof, k);
    end
    if (iabs(er) > 12 || iabs(ei) > 12) begin
      failures++;
      if (failures < 10)
        $display("%s frame %0d ch %0d: got %0d,%0d want %0d,%0d", tag, f, k, yv.re, yv.im,
                 q_of(sg * ar / 32.0), q_of(sg * ai / 32.0));
    end
  endtask

  initial begin
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < K; k++) begin
        do @(negedge clk); while (!sv);
        if (k == 0) begin
          checks++;
          if (cyc - last_cyc[f] != LAT_SER) begin
            failures++;
            $display("serial: frame %0d latency %0d", f, cyc - last_cyc[f]);
          end
        end
        check_out("serial", f, k, sy, sch, ssof);
      end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < K; k++) begin
        do @(negedge clk); while (!pv);
        if (k == 0) begin
          checks++;
          if (cyc - last_cyc[f] != LAT_PAR) begin
            failures++;
            $display("parallel: frame %0d latency %0d", f, cyc - last_cyc[f]);
          end
        end
        check_out("parallel", f, k, py, pch, psof);
      end
    repeat (100) @(negedge clk);
    checks++;
    if (esum / $itor(ecount) > 16.0) begin
      failures++;
      $display("RMS error %f LSB", $sqrt(esum / $itor(ecount)));
    end
    checks++;
    if (sovr || povr) failures++;
    $display("RMS error %f LSB over %0d values", $sqrt(esum / $itor(ecount)), ecount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
