// radix5_fft: 5-point DFT of complex samples, X[k] = sum_n x[n] e^{-j2*pi*k*n/5},
// scaled by 1/4 (2**R5_SHIFT) and saturated to DW bits.
//
// Structure (Winograd style, 4 real gains on complex signals = 8 real
// multipliers): with s1=x1+x4, s2=x2+x3, d1=x1-x4, d2=x2-x3, s=s1+s2
//   X0    = x0 + s
//   A1,A2 = (x0 - s/4) +/- K1 (s1 - s2)               K1 = (cos u - cos 2u)/2
//   B1    = G3 (d1 + d2) + G4 d1                       G3 = sin 2u, G4 = sin u - sin 2u
//   B2    = G3 (d1 + d2) + G5 d2                       G5 = -(sin u + sin 2u)
//   X1,X4 = A1 -/+ jB1,  X2,X3 = A2 -/+ jB2            (u = 2*pi/5)
// The factor 1/4 is a shift, the j factors are re/im swaps. The block uses
// 17 complex additions; the published flow graph counts 18, with the same 4
// gains. Its exact adder arrangement is this design's own.
//
// Interface: in_valid/x sampled every clock; out_valid/y follow one clock
// later (latency 1, one transform per clock). No stall.
module radix5_fft
  import fbmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x [NB],
  output logic  out_valid,
  output cplx_t y [NB]
);

  wcplx_t w [NB];
  wcplx_t s1, s2, d1, d2, s, x0s, a, m1, a1, a2, e, m3, m4, m5, b1, b2;
  cplx_t  yc [NB];

  always_comb begin
    for (int i = 0; i < NB; i++) w[i] = widen(x[i]);
    s1  = cadd(w[1], w[4]);
    s2  = cadd(w[2], w[3]);
    d1  = csub(w[1], w[4]);
    d2  = csub(w[2], w[3]);
    s   = cadd(s1, s2);
    x0s = cadd(w[0], s);
    a.re = w[0].re - (s.re >>> 2);
    a.im = w[0].im - (s.im >>> 2);
    m1  = cgain(csub(s1, s2), R5_K1);
    a1  = cadd(a, m1);
    a2  = csub(a, m1);
    e   = cadd(d1, d2);
    m3  = cgain(e, R5_G3);
    m4  = cgain(d1, R5_G4);
    m5  = cgain(d2, R5_G5);
    b1  = cadd(m3, m4);
    b2  = cadd(m3, m5);
    yc[0] = narrow(x0s, R5_SHIFT);
    yc[1] = narrow(cadd(a1, cmul_mj(b1)), R5_SHIFT);
    yc[4] = narrow(csub(a1, cmul_mj(b1)), R5_SHIFT);
    yc[2] = narrow(cadd(a2, cmul_mj(b2)), R5_SHIFT);
    yc[3] = narrow(csub(a2, cmul_mj(b2)), R5_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < NB; i++) y[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < NB; i++) y[i] <= yc[i];
    end
  end

endmodule
