// fft40_parallel_tb: random 40-point vectors, also one pure tone per
// vector, through a forward (INVERSE=0) and an inverse (INVERSE=1)
// fft40_parallel. Outputs are compared with a saturated real-number DFT/32
// (e^{-j} for forward, e^{+j} for inverse) within 6 LSB. Vectors are fed
// back to back; the two-clock latency is checked on every vector.
module fft40_parallel_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  localparam int NV = 80;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  cplx_t x [NCH];
  logic  fv, iv;
  cplx_t fy [NCH];
  cplx_t iy [NCH];
  int    checks = 0, failures = 0;
  real   xr [NV][NCH];
  real   xi [NV][NCH];

  fft40_parallel #(.INVERSE(1'b0)) dut_f (.clk, .rst_n, .in_valid, .x, .out_valid(fv), .y(fy));
  fft40_parallel #(.INVERSE(1'b1)) dut_i (.clk, .rst_n, .in_valid, .x, .out_valid(iv), .y(iy));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input int v);
    real ar[], ai[], fr[], fi[], br[], bi[];
    ar = new[NCH];
    ai = new[NCH];
    for (int n = 0; n < NCH; n++) begin
      ar[n] = xr[v][n];
      ai[n] = xi[v][n];
    end
    dft(ar, ai, NCH, -1.0, 1.0 / 32.0, fr, fi);
    dft(ar, ai, NCH, 1.0, 1.0 / 32.0, br, bi);
    checks += 2;
    if (fv !== 1'b1 || iv !== 1'b1) begin
      failures += 2;
      $display("vector %0d: out_valid not set two clocks after input", v);
    end
    for (int k = 0; k < NCH; k++) begin
      checks += 2;
      if (iabs(int'(fy[k].re) - q_of(fr[k])) > 6 || iabs(int'(fy[k].im) - q_of(fi[k])) > 6) begin
        failures++;
        if (failures < 10)
          $display("fwd v=%0d k=%0d got %0d,%0d want %0d,%0d", v, k, fy[k].re, fy[k].im, q_of(fr[k]), q_of(fi[k]));
      end
      if (iabs(int'(iy[k].re) - q_of(br[k])) > 6 || iabs(int'(iy[k].im) - q_of(bi[k])) > 6) begin
        failures++;
        if (failures < 10)
          $display("inv v=%0d k=%0d got %0d,%0d want %0d,%0d", v, k, iy[k].re, iy[k].im, q_of(br[k]), q_of(bi[k]));
      end
    end
  endtask

  initial begin
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v < NV + 2; v++) begin
      @(negedge clk);
      if (v < NV) begin
        for (int n = 0; n < NCH; n++) begin
          if (v % 4 == 3) begin
            // tone at bin v mod 40, amplitude 0.6
            x[n].re = s_of(0.6 * $cos(2.0 * PI * $itor((v * n) % NCH) / 40.0));
            x[n].im = s_of(0.6 * $sin(2.0 * PI * $itor((v * n) % NCH) / 40.0));
          end else begin
            x[n] = rnd_c(0.5);
          end
          xr[v][n] = r_of(x[n].re);
          xi[v][n] = r_of(x[n].im);
        end
        in_valid = 1'b1;
      end else begin
        in_valid = 1'b0;
      end
      if (v >= 2) check_vec(v - 2);
    end
    @(negedge clk);
    checks++;
    if (fv !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
