// tb_util_pkg: reference arithmetic for the testbenches, in real numbers,
// independent of the fixed-point RTL: conversions, random samples, a plain
// O(N^2) DFT and the windowed-sinc prototype filter used to load the banks.
package tb_util_pkg;
  import fbmc_pkg::*;

  localparam real PI    = 3.14159265358979323846;
  localparam real SCALE = 131072.0;   // 2**17, Q1.17

  function automatic real r_of(input sample_t s);
    return $itor(s) / SCALE;
  endfunction

  function automatic sample_t s_of(input real v);
    real t;
    t = v * SCALE;
    if (t > 131071.0)  t = 131071.0;
    if (t < -131072.0) t = -131072.0;
    return sample_t'($rtoi(t >= 0.0 ? t + 0.5 : t - 0.5));
  endfunction

  // uniform random sample in [-amp, amp]
  function automatic sample_t rnd_s(input real amp);
    real u;
    u = $itor($urandom % 1000001) / 1000000.0;
    return s_of(amp * (2.0 * u - 1.0));
  endfunction

  function automatic cplx_t rnd_c(input real amp);
    cplx_t c;
    c.re = rnd_s(amp);
    c.im = rnd_s(amp);
    return c;
  endfunction

  // X[k] = scale * sum_n x[n] e^{sgn*j*2*pi*k*n/n_pt}
  task automatic dft(input real xr[], input real xi[], input int n_pt, input real sgn,
                     input real scale, output real yr[], output real yi[]);
    yr = new[n_pt];
    yi = new[n_pt];
    for (int k = 0; k < n_pt; k++) begin
      real ar, ai;
      ar = 0.0;
      ai = 0.0;
      for (int n = 0; n < n_pt; n++) begin
        real ph;
        ph = sgn * 2.0 * PI * $itor((k * n) % n_pt) / $itor(n_pt);
        ar += xr[n] * $cos(ph) - xi[n] * $sin(ph);
        ai += xr[n] * $sin(ph) + xi[n] * $cos(ph);
      end
      yr[k] = ar * scale;
      yi[k] = ai * scale;
    end
  endtask

  // Prototype lowpass: Hann-windowed sinc, cutoff fc (cycles/sample),
  // length len, DC gain dc.
  function automatic real proto(input int n, input int len, input real fc, input real dc);
    real t, s, w;
    t = $itor(n) - $itor(len - 1) / 2.0;
    if (t == 0.0) s = 2.0 * fc;
    else          s = $sin(2.0 * PI * fc * t) / (PI * t);
    w = 0.5 - 0.5 * $cos(2.0 * PI * $itor(n + 1) / $itor(len + 1));
    return dc * s * w;
  endfunction

  // expected fixed-point value of a real result, saturated like the RTL
  function automatic int q_of(input real v);
    return int'(s_of(v));
  endfunction

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

endpackage
