// fft8_tb: drives random 8-point vectors (and a full-scale edge case)
// into fft8 and compares each output with a saturated real-number DFT divided
// by 8, within 4 LSB. Also checks the one-clock latency and that out_valid
// follows in_valid.
module fft8_tb;
  import fbmc_pkg::*;
  import tb_util_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  cplx_t x [NA];
  logic  out_valid;
  cplx_t y [NA];
  int    checks = 0, failures = 0;

  fft8 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr[], xi[], yr[], yi[];
    xr = new[NA];
    xi = new[NA];
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < NA; i++) begin
        x[i] = (t == 0) ? '{re: 18'sh1ffff, im: 18'sh20000} : rnd_c(0.95);
        xr[i] = r_of(x[i].re);
        xi[i] = r_of(x[i].im);
      end
      in_valid = 1'b1;
      dft(xr, xi, NA, -1.0, 0.125, yr, yi);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== 1'b1) begin
        failures++;
        $display("out_valid missing one clock after input");
      end
      for (int k = 0; k < NA; k++) begin
        checks++;
        if (iabs(int'(y[k].re) - q_of(yr[k])) > 4 ||
            iabs(int'(y[k].im) - q_of(yi[k])) > 4) begin
          failures++;
          if (failures < 10)
            $display("t=%0d bin %0d: got %0d,%0d want %f,%f", t, k, y[k].re, y[k].im,
                     yr[k] * SCALE, yi[k] * SCALE);
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
