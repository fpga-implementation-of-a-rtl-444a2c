// pfb_analysis_tb: loads random prototype coefficients, streams random
// complex samples (on average one every 2.5 clocks, sometimes exactly one
// every 2) and compares every branch output with a bit-exact integer model
// of v[rho] = round(sum_p h[rho+p*K] x[t_m-rho-p*K] / 2**17) (saturated),
// samples before the first one counting as zero. Checks branch order,
// v_sof, the 2-clock latency after the frame's last sample, that the delay
// line wraps, and that no overrun is flagged.
module pfb_analysis_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  localparam int K  = 40;
  localparam int P  = 8;
  localparam int M  = K / 2;
  localparam int NF = 40;
  localparam int NS = NF * M;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       coef_we = 1'b0;
  logic [2:0] coef_tap = '0;
  logic [5:0] coef_branch = '0;
  coef_t      coef_data = '0;
  logic       x_valid = 1'b0;
  cplx_t      x = '0;
  logic       v_valid, v_sof, overrun;
  logic [5:0] v_idx;
  cplx_t      v;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  int         h [P][K];
  cplx_t      xs [NS];
  int         last_cyc [NF];

  pfb_analysis #(.K(K), .P(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_sat_i(input longint a);
    longint r;
    r = (a + 65536) >>> 17;
    if (r > 131071) r = 131071;
    if (r < -131072) r = -131072;
    return int'(r);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < P; p++)
      for (int r = 0; r < K; r++) begin
        @(negedge clk);
        h[p][r] = int'(rnd_s(0.3));
        coef_we = 1'b1;
        coef_tap = 3'(p);
        coef_branch = 6'(r);
        coef_data = coef_t'(h[p][r]);
      end
    @(negedge clk);
    coef_we = 1'b0;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      x_valid = 1'b0;
      @(negedge clk);
      if (n >= NS / 2) begin
        while (($urandom % 2) == 0) @(negedge clk);
      end
      x = rnd_c(0.5);
      xs[n] = x;
      x_valid = 1'b1;
      if (n % M == M - 1) last_cyc[n / M] = cyc;
    end
    @(negedge clk);
    x_valid = 1'b0;
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      int t;
      t = f * M + M - 1;
      for (int r = 0; r < K; r++) begin
        longint ar, ai;
        do @(negedge clk); while (!v_valid);
        if (r == 0) begin
          checks++;
          if (cyc - last_cyc[f] != 2) begin
            failures++;
            $display("frame %0d latency %0d", f, cyc - last_cyc[f]);
          end
        end
        ar = 0;
        ai = 0;
        for (int p = 0; p < P; p++) begin
          int n;
          n = t - r - p * K;
          if (n >= 0) begin
            ar += longint'(xs[n].re) * h[p][r];
            ai += longint'(xs[n].im) * h[p][r];
          end
        end
        checks += 2;
        if (int'(v_idx) != r || v_sof != (r == 0)) begin
          failures++;
          $display("frame %0d branch %0d: idx %0d sof %0b", f, r, v_idx, v_sof);
        end
        if (int'(v.re) != rnd_sat_i(ar) || int'(v.im) != rnd_sat_i(ai)) begin
          failures++;
          if (failures < 10)
            $display("frame %0d branch %0d: got %0d,%0d want %0d,%0d", f, r, v.re, v.im,
                     rnd_sat_i(ar), rnd_sat_i(ai));
        end
      end
    end
    checks++;
    if (overrun) begin
      failures++;
      $display("overrun flagged");
    end
    checks++;
    if (NS <= (1 << $clog2(K * P + M))) begin
      failures++;
      $display("stimulus too short to wrap the delay line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
