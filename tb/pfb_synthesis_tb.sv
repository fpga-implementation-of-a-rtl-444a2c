// pfb_synthesis_tb: loads random prototype coefficients, streams random
// frames of K branch values (back to back for the first half, then with
// random gaps) and compares every output sample with a bit-exact integer
// model of y[m0*M+r] = round(sum_q h[r+q*M] w_{m0-q}[(r+q*M) mod K] / 2**17)
// (saturated, frames before the first counting as zero). Checks the
// 2-clock latency after the frame's last input, the 2-clock output spacing,
// the wrap of the frame history and that no overrun is flagged.
module pfb_synthesis_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  localparam int K  = 40;
  localparam int P  = 8;
  localparam int M  = K / 2;
  localparam int NF = 40;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       coef_we = 1'b0;
  logic [2:0] coef_tap = '0;
  logic [5:0] coef_branch = '0;
  coef_t      coef_data = '0;
  logic       w_valid = 1'b0;
  cplx_t      w = '0;
  logic       y_valid, overrun;
  cplx_t      y;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  int         h [P][K];
  cplx_t      ws [NF][K];
  int         last_cyc [NF];

  pfb_synthesis #(.K(K), .P(P)) dut (.*);

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
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < K; r++) begin
        @(negedge clk);
        w_valid = 1'b0;
        if (f >= NF / 2) while (($urandom % 4) == 0) @(negedge clk);
        w = rnd_c(0.4);
        ws[f][r] = w;
        w_valid = 1'b1;
        if (r == K - 1) last_cyc[f] = cyc;
      end
    @(negedge clk);
    w_valid = 1'b0;
  end

  initial begin
    int prev;
    prev = 0;
    for (int f = 0; f < NF; f++) begin
      for (int r = 0; r < M; r++) begin
        longint ar, ai;
        do @(negedge clk); while (!y_valid);
        checks++;
        if (r == 0 && cyc - last_cyc[f] != 2) begin
          failures++;
          $display("frame %0d latency %0d", f, cyc - last_cyc[f]);
        end
        if (r != 0 && cyc - prev != 2) begin
          failures++;
          $display("frame %0d output %0d spacing %0d", f, r, cyc - prev);
        end
        prev = cyc;
        ar = 0;
        ai = 0;
        for (int q = 0; q < 2 * P; q++) begin
          int br;
          br = r + (q % 2) * M;
          if (f - q >= 0) begin
            ar += longint'(ws[f-q][br].re) * h[q/2][br];
            ai += longint'(ws[f-q][br].im) * h[q/2][br];
          end
        end
        checks++;
        if (int'(y.re) != rnd_sat_i(ar) || int'(y.im) != rnd_sat_i(ai)) begin
          failures++;
          if (failures < 10)
            $display("frame %0d out %0d: got %0d,%0d want %0d,%0d", f, r, y.re, y.im,
                     rnd_sat_i(ar), rnd_sat_i(ai));
        end
      end
    end
    checks++;
    if (overrun) begin
      failures++;
      $display("overrun flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
