// cneg_sat: complex negation with saturation (-(-2**(DW-1)) becomes
// 2**(DW-1)-1), optional per sample. Combinational. Used for the (-1)^(k*m)
// channel sign of the oversampled-by-2 filter bank.
module cneg_sat
  import fbmc_pkg::*;
(
  input  logic  neg,
  input  cplx_t a,
  output cplx_t y
);
  always_comb begin
    y = a;
    if (neg) begin
      y.re = rnd_sat(-64'(a.re), 0);
      y.im = rnd_sat(-64'(a.im), 0);
    end
  end
endmodule
