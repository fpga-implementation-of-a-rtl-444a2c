// fft40_parallel: fully parallel 40-point mixed-radix FFT (eight radix-5
// FFTs, a fixed reorganisation, five 8-point FFTs), one transform per clock.
//
// Because 8 and 5 are coprime the two stages are joined by the Good-Thomas
// (prime factor) index maps, so no twiddle multipliers sit between them and
// the reorganisation is wiring only:
//   input   x[(5*n1 + 8*n2) mod 40]  -> radix-5 number n1 (n1=0..7), input n2
//   radix-5 n1 output k2             -> 8-point number k2 (k2=0..4), input n1
//   8-point k2 output k1             -> bin k = (25*k1 + 16*k2) mod 40
// The result is DFT/32. With INVERSE=1 bin k is delivered on output (40-k)
// mod 40, i.e. the output is the unnormalised inverse DFT divided by 32.
// The prime-factor mapping is this design's reading of the two-stage
// structure; the document gives the stage order (radix-5 first).
//
// Interface: in_valid/x every clock; out_valid/y two clocks later.
module fft40_parallel
  import fbmc_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x [NCH],
  output logic  out_valid,
  output cplx_t y [NCH]
);

  cplx_t r5_in  [NA][NB];
  cplx_t r5_out [NA][NB];
  logic  r5_v   [NA];
  cplx_t r8_in  [NB][NA];
  cplx_t r8_out [NB][NA];
  logic  r8_v   [NB];

  for (genvar n1 = 0; n1 < NA; n1++) begin : g_r5
    for (genvar n2 = 0; n2 < NB; n2++) begin : g_in
      assign r5_in[n1][n2] = x[(5*n1 + 8*n2) % NCH];
    end
    radix5_fft u_r5 (
      .clk, .rst_n, .in_valid,
      .x(r5_in[n1]), .out_valid(r5_v[n1]), .y(r5_out[n1])
    );
  end

  for (genvar k2 = 0; k2 < NB; k2++) begin : g_r8
    for (genvar n1 = 0; n1 < NA; n1++) begin : g_in
      assign r8_in[k2][n1] = r5_out[n1][k2];
    end
    fft8 u_r8 (
      .clk, .rst_n, .in_valid(r5_v[0]),
      .x(r8_in[k2]), .out_valid(r8_v[k2]), .y(r8_out[k2])
    );
    for (genvar k1 = 0; k1 < NA; k1++) begin : g_out
      localparam int K   = (25*k1 + 16*k2) % NCH;
      localparam int POS = INVERSE ? (NCH - K) % NCH : K;
      assign y[POS] = r8_out[k2][k1];
    end
  end

  assign out_valid = r8_v[0];

endmodule
