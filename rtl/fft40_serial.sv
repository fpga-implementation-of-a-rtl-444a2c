// fft40_serial: serialised 40-point mixed-radix FFT. One radix-5 block is
// used eight times per transform and one 8-point FFT five times, instead of
// the eight and five copies of the parallel version, so the radix-5 runs at
// 8x and the 8-point FFT at 5x the transform rate. Memories do the
// serial-to-parallel and parallel-to-serial conversions around them.
//
// Data path (same prime-factor index maps as fft40_parallel, result DFT/32):
//   ibuf  ping-pong 2 x 40 input buffer, written in natural order
//   stage 1: for n1 = 0..7 read x[(5*n1 + 8*n2) mod 40], n2 = 0..4 -> radix-5,
//            results written to mbuf[n1][k2]
//   stage 2: for k2 = 0..4 read mbuf[0..7][k2] -> 8-point FFT,
//            output k1 written to obuf at bin (25*k1 + 16*k2) mod 40
//            (bin negated mod 40 when INVERSE=1)
//   obuf  ping-pong 2 x 40 output buffer, streamed in natural order
//
// Interface: in_valid/in_data deliver samples 0..39 of a frame in order, at
// most one per clock; frames are counted from reset. The result streams out
// one bin per clock (out_idx = bin, out_sof on bin 0) starting 17 clocks
// after the clock that delivered sample 39. The engine is busy 15 clocks per
// frame, so any input rate up to one sample per clock is sustained.
//
// The single radix-5 / single 8-point arrangement, the radix-5-first order
// and the 8x / 5x reuse follow the published serial design; the single
// clock domain, the prime-factor index maps, the buffer sizes and the
// schedule above are this design's own.
module fft40_serial
  import fbmc_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output logic       out_sof,
  output logic [5:0] out_idx,
  output cplx_t      out_data
);

  cplx_t ibuf [2][NCH];
  cplx_t mbuf [NA][NB];
  cplx_t obuf [2][NCH];

  // input side
  logic [5:0] icnt;
  logic       iw_sel;
  // stage 1
  logic       s1_run;
  logic [2:0] s1_n1;
  logic       s1_sel;
  cplx_t      r5_x [NB];
  logic       r5_v;
  cplx_t      r5_y [NB];
  logic [2:0] r5_tag;
  // stage 2
  logic       s2_run;
  logic [2:0] s2_k2;
  cplx_t      r8_x [NA];
  logic       r8_v;
  cplx_t      r8_y [NA];
  logic [2:0] r8_tag;
  logic       ow_sel;
  // output side
  logic       o_run;
  logic [5:0] ocnt;
  logic       or_sel;

  // ---------------- input buffer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt   <= '0;
      iw_sel <= 1'b0;
    end else if (in_valid) begin
      if (icnt == 6'(NCH - 1)) begin
        icnt   <= '0;
        iw_sel <= ~iw_sel;
      end else begin
        icnt <= icnt + 6'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) ibuf[iw_sel][icnt] <= in_data;
  end

  // ---------------- stage 1: radix-5, eight passes ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_run <= 1'b0;
      s1_n1  <= '0;
      s1_sel <= 1'b0;
    end else if (in_valid && icnt == 6'(NCH - 1)) begin
      s1_run <= 1'b1;
      s1_n1  <= '0;
      s1_sel <= iw_sel;
    end else if (s1_run) begin
      s1_n1 <= s1_n1 + 3'd1;
      if (s1_n1 == 3'(NA - 1)) s1_run <= 1'b0;
    end
  end

  // Ruritanian input map: address (5*n1 + 8*n2) mod 40.
  always_comb begin
    for (int n2 = 0; n2 < NB; n2++)
      r5_x[n2] = ibuf[s1_sel][(5 * int'(s1_n1) + 8 * n2) % NCH];
  end

  radix5_fft u_r5 (
    .clk, .rst_n, .in_valid(s1_run),
    .x(r5_x), .out_valid(r5_v), .y(r5_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r5_tag <= '0;
    else        r5_tag <= s1_n1;
  end

  always_ff @(posedge clk) begin
    if (r5_v)
      for (int k2 = 0; k2 < NB; k2++) mbuf[r5_tag][k2] <= r5_y[k2];
  end

  // ---------------- stage 2: 8-point FFT, five passes ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_run <= 1'b0;
      s2_k2  <= '0;
    end else if (r5_v && r5_tag == 3'(NA - 1)) begin
      s2_run <= 1'b1;
      s2_k2  <= '0;
    end else if (s2_run) begin
      s2_k2 <= s2_k2 + 3'd1;
      if (s2_k2 == 3'(NB - 1)) s2_run <= 1'b0;
    end
  end

  always_comb begin
    for (int n1 = 0; n1 < NA; n1++) r8_x[n1] = mbuf[n1][s2_k2];
  end

  fft8 u_r8 (
    .clk, .rst_n, .in_valid(s2_run),
    .x(r8_x), .out_valid(r8_v), .y(r8_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r8_tag <= '0;
    else        r8_tag <= s2_k2;
  end

  // CRT output map: bin (25*k1 + 16*k2) mod 40.
  function automatic int unsigned out_pos(input int unsigned k1, input int unsigned k2);
    int unsigned k;
    k = (25 * k1 + 16 * k2) % NCH;
    return INVERSE ? (NCH - k) % NCH : k;
  endfunction

  always_ff @(posedge clk) begin
    if (r8_v)
      for (int k1 = 0; k1 < NA; k1++) obuf[ow_sel][out_pos(k1, int'(r8_tag))] <= r8_y[k1];
  end

  // ---------------- output streaming ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ow_sel    <= 1'b0;
      or_sel    <= 1'b0;
      o_run     <= 1'b0;
      ocnt      <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      if (r8_v && r8_tag == 3'(NB - 1)) begin
        ow_sel <= ~ow_sel;
        or_sel <= ow_sel;
        o_run  <= 1'b1;
        ocnt   <= '0;
      end else if (o_run) begin
        ocnt <= ocnt + 6'd1;
        if (ocnt == 6'(NCH - 1)) o_run <= 1'b0;
      end
      out_valid <= o_run;
      out_sof   <= o_run && ocnt == '0;
      out_idx   <= ocnt;
      if (o_run) out_data <= obuf[or_sel][ocnt];
    end
  end

endmodule
