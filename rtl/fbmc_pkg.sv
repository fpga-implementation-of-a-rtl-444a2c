// fbmc_pkg: types, sizes and fixed-point helpers shared by the stage-2 FBMC
// transmultiplexer (40-channel TVWS up/down converter).
//
// Word lengths follow the 18-bit generic word length used across the system
// (samples and coefficients). Samples are signed Q1.17 complex values. The
// FFT constants are signed Q2.16 so that gains up to |g| < 2 fit in 18 bits.
// Internal arithmetic of the FFT butterflies uses IW-bit signed values
// carrying GB extra fractional guard bits; results are rounded and saturated
// back to DW bits at each block boundary.
package fbmc_pkg;

  // Number of channels / FFT size N = 40 = 8 x 5.
  localparam int unsigned NCH = 40;
  localparam int unsigned NA  = 8;   // size of the power-of-two FFT (8-point)
  localparam int unsigned NB  = 5;   // size of the radix-5 FFT

  // Data and coefficient word lengths.
  localparam int unsigned DW  = 18;
  localparam int unsigned CW  = 18;
  // Internal width and guard bits of the FFT butterflies.
  localparam int unsigned GB  = 2;
  localparam int unsigned IW  = DW + GB + 8;
  // Fractional bits of the FFT constants (Q2.16).
  localparam int unsigned KFR = 16;

  // Output scaling of the FFT stages (right shifts): the 40-point FFT
  // returns DFT/32, radix-5 contributes /4 and the 8-point FFT /8.
  localparam int unsigned R5_SHIFT = 2;
  localparam int unsigned R8_SHIFT = 3;

  // Radix-5 constants, u = 2*pi/5, Q2.16:
  //   K1 = (cos u - cos 2u)/2, G3 = sin 2u, G4 = sin u - sin 2u,
  //   G5 = -(sin u + sin 2u)
  localparam logic signed [CW-1:0] R5_K1 = 18'sd36636;
  localparam logic signed [CW-1:0] R5_G3 = 18'sd38521;
  localparam logic signed [CW-1:0] R5_G4 = 18'sd23807;
  localparam logic signed [CW-1:0] R5_G5 = -18'sd100850;
  // 8-point FFT constant 1/sqrt(2), Q2.16.
  localparam logic signed [CW-1:0] R8_C  = 18'sd46341;

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [IW-1:0] wide_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    wide_t re;
    wide_t im;
  } wcplx_t;

  // Round a wide signed value right by sh bits and saturate to DW bits.
  function automatic sample_t rnd_sat(input logic signed [63:0] v, input int unsigned sh);
    logic signed [63:0] r;
    logic signed [63:0] maxv, minv;
    maxv = 64'sd1 <<< (DW - 1);
    minv = -maxv;
    maxv = maxv - 64'sd1;
    if (sh == 0) r = v;
    else         r = (v + (64'sd1 <<< (sh - 1))) >>> sh;
    if (r > maxv)      return sample_t'(maxv);
    else if (r < minv) return sample_t'(minv);
    else               return sample_t'(r);
  endfunction

  // Widen a DW-bit complex sample into the butterfly format (guard bits added).
  function automatic wcplx_t widen(input cplx_t x);
    wcplx_t w;
    w.re = wide_t'(x.re) <<< GB;
    w.im = wide_t'(x.im) <<< GB;
    return w;
  endfunction

  function automatic wcplx_t cadd(input wcplx_t a, input wcplx_t b);
    wcplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic wcplx_t csub(input wcplx_t a, input wcplx_t b);
    wcplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja.
  function automatic wcplx_t cmul_mj(input wcplx_t a);
    wcplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction

  // Real constant gain (Q2.16) applied to a complex value, rounded.
  function automatic wide_t rmul(input wide_t a, input coef_t g);
    logic signed [IW+CW-1:0] p;
    p = a * g;
    return wide_t'((p + (1 <<< (KFR - 1))) >>> KFR);
  endfunction

  function automatic wcplx_t cgain(input wcplx_t a, input coef_t g);
    wcplx_t r;
    r.re = rmul(a.re, g);
    r.im = rmul(a.im, g);
    return r;
  endfunction

  // Back from the butterfly format to DW bits, dividing by 2**sh.
  function automatic cplx_t narrow(input wcplx_t w, input int unsigned sh);
    cplx_t r;
    r.re = rnd_sat(64'(w.re), GB + sh);
    r.im = rnd_sat(64'(w.im), GB + sh);
    return r;
  endfunction

endpackage
