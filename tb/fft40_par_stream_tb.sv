// fft40_par_stream_tb: streams frames of 40 samples into a forward and an
// inverse fft40_par_stream (parallel FFT with serial-to-parallel and
// parallel-to-serial conversion), first back to back at one sample per
// clock, then with random gaps, then back to back again. Every output bin is
// compared with a saturated real-number DFT/32 within 6 LSB; the bin order,
// out_sof and the 4-clock latency from the last input sample to bin 0 are
// checked for every frame. Back-to-back frames check that the last bin is
// streamed before the next result replaces it.
module fft40_par_stream_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  localparam int NF  = 12;
  localparam int LAT = 4;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0;
  cplx_t      in_data = '0;
  logic       fv, fsof, iv, isof;
  logic [5:0] fidx, iidx;
  cplx_t      fd, id;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  real        xr [NF][NCH];
  real        xi [NF][NCH];
  int         last_cyc [NF];
  int         nin = 0;

  fft40_par_stream #(.INVERSE(1'b0)) dut_f (.clk, .rst_n, .in_valid, .in_data,
    .out_valid(fv), .out_sof(fsof), .out_idx(fidx), .out_data(fd));
  fft40_par_stream #(.INVERSE(1'b1)) dut_i (.clk, .rst_n, .in_valid, .in_data,
    .out_valid(iv), .out_sof(isof), .out_idx(iidx), .out_data(id));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < NCH; n++) begin
        @(negedge clk);
        while (f >= 4 && f < 8 && ($urandom % 3) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_data = rnd_c(0.5);
        xr[f][n] = r_of(in_data.re);
        xi[f][n] = r_of(in_data.im);
        in_valid = 1'b1;
        if (n == NCH - 1) last_cyc[f] = cyc;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // checker
  initial begin
    real ar[], ai[], fr[], fi[], br[], bi[];
    ar = new[NCH];
    ai = new[NCH];
    for (int f = 0; f < NF; f++) begin
      for (int k = 0; k < NCH; k++) begin
        do @(negedge clk); while (!fv);
        if (k == 0) begin
          for (int n = 0; n < NCH; n++) begin
            ar[n] = xr[f][n];
            ai[n] = xi[f][n];
          end
          dft(ar, ai, NCH, -1.0, 1.0 / 32.0, fr, fi);
          dft(ar, ai, NCH, 1.0, 1.0 / 32.0, br, bi);
          checks++;
          if (cyc - last_cyc[f] != LAT) begin
            failures++;
            $display("frame %0d latency %0d, expected %0d", f, cyc - last_cyc[f], LAT);
          end
        end
        checks++;
        if (int'(fidx) != k || fsof != (k == 0) || iv !== 1'b1 || int'(iidx) != k) begin
          failures++;
          $display("frame %0d: bad index/sof at bin %0d (idx %0d)", f, k, fidx);
        end
        checks += 2;
        if (iabs(int'(fd.re) - q_of(fr[k])) > 6 || iabs(int'(fd.im) - q_of(fi[k])) > 6) begin
          failures++;
          if (failures < 10)
            $display("fwd f=%0d k=%0d got %0d,%0d want %0d,%0d", f, k, fd.re, fd.im, q_of(fr[k]), q_of(fi[k]));
        end
        if (iabs(int'(id.re) - q_of(br[k])) > 6 || iabs(int'(id.im) - q_of(bi[k])) > 6) begin
          failures++;
          if (failures < 10)
            $display("inv f=%0d k=%0d got %0d,%0d want %0d,%0d", f, k, id.re, id.im, q_of(br[k]), q_of(bi[k]));
        end
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (fv) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
