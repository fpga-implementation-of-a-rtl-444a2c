// fft8: 8-point FFT of complex samples, X[k] = sum_n x[n] e^{-j2*pi*k*n/8},
// scaled by 1/8 (2**R8_SHIFT) and saturated to DW bits.
//
// Radix-2 decimation in frequency, three butterfly stages. The twiddles
// W8^2 = -j are re/im swaps; W8^1 and W8^3 are one real gain of 1/sqrt(2) on
// the sum and difference of re and im, so the block has 4 real multipliers.
// The document only asks for a standard 8-point FFT; this arrangement is the
// design's own choice. Outputs are put back into natural order.
//
// Interface: in_valid/x sampled every clock; out_valid/y one clock later.
module fft8
  import fbmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x [NA],
  output logic  out_valid,
  output cplx_t y [NA]
);

  // Multiply by W8^t, t in 0..3.
  function automatic wcplx_t tw8(input wcplx_t a, input int unsigned t);
    wcplx_t r;
    case (t)
      0: r = a;
      1: begin                                   // c(1 - j)
        r.re = rmul(a.re + a.im, R8_C);
        r.im = rmul(a.im - a.re, R8_C);
      end
      2: r = cmul_mj(a);                         // -j
      default: begin                             // c(-1 - j)
        r.re = rmul(a.im - a.re, R8_C);
        r.im = rmul(-(a.re + a.im), R8_C);
      end
    endcase
    return r;
  endfunction

  wcplx_t st0 [NA];
  wcplx_t st1 [NA];
  wcplx_t st2 [NA];
  wcplx_t st3 [NA];
  cplx_t  yc  [NA];

  always_comb begin
    for (int i = 0; i < NA; i++) st0[i] = widen(x[i]);
    // stage 1: span 4, twiddle W8^i
    for (int i = 0; i < 4; i++) begin
      st1[i]   = cadd(st0[i], st0[i+4]);
      st1[i+4] = tw8(csub(st0[i], st0[i+4]), i);
    end
    // stage 2: span 2 within each half, twiddle W8^(2i)
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < 2; i++) begin
        st2[4*h+i]   = cadd(st1[4*h+i], st1[4*h+i+2]);
        st2[4*h+i+2] = tw8(csub(st1[4*h+i], st1[4*h+i+2]), 2*i);
      end
    // stage 3: span 1
    for (int h = 0; h < 4; h++) begin
      st3[2*h]   = cadd(st2[2*h], st2[2*h+1]);
      st3[2*h+1] = csub(st2[2*h], st2[2*h+1]);
    end
    // bit-reversed position p holds bin rev(p)
    yc[0] = narrow(st3[0], R8_SHIFT);
    yc[4] = narrow(st3[1], R8_SHIFT);
    yc[2] = narrow(st3[2], R8_SHIFT);
    yc[6] = narrow(st3[3], R8_SHIFT);
    yc[1] = narrow(st3[4], R8_SHIFT);
    yc[5] = narrow(st3[5], R8_SHIFT);
    yc[3] = narrow(st3[6], R8_SHIFT);
    yc[7] = narrow(st3[7], R8_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < NA; i++) y[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < NA; i++) y[i] <= yc[i];
    end
  end

endmodule
