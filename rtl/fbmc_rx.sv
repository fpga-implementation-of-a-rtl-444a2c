// fbmc_rx: stage-2 receiver, an oversampled (x2) 40-channel DFT analysis
// filter bank that splits one complex baseband stream into the 40 TVWS
// channels, each decimated by K/2 = 20.
//
// Chain: pfb_analysis (serialised polyphase network of the real prototype,
// one branch per clock) -> 40-point FFT used as an inverse DFT over the
// branches (serial or parallel architecture, FFT_SERIAL) -> channel sign.
// The sign undoes the (-1)^(k*(m+1)) modulation that decimation by K/2
// leaves on odd channels, so every channel output is at baseband (up to a
// fixed phase e^{j2*pi*k/40} per channel). Output level: channel k of frame
// m equals (1/32) * sum_n h[n] e^{j2*pi*k*n/40} x[t_m - n] times that sign,
// where t_m is the frame's newest input sample.
//
// Interface: x_valid/x at most one sample every 2 clocks on average; per 20
// input samples one frame of 40 channel samples is streamed, y_ch = channel,
// y_sof on channel 0. Latency from the 20th input of a frame to channel 0:
// 59 clocks with the serial FFT, 46 with the parallel one (2 + 39 in the
// polyphase network, 17 or 4 in the FFT, 1 for the sign stage).
//
// Filter bank structure, 40 channels, oversampling by 2 and the two FFT
// options follow the published design; the sign correction and the
// inverse-DFT orientation are this design's own.
module fbmc_rx
  import fbmc_pkg::*;
#(
  parameter int unsigned P          = 8,
  parameter bit          FFT_SERIAL = 1'b1,
  localparam int unsigned K  = NCH,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [PW-1:0] coef_tap,
  input  logic [5:0]    coef_branch,
  input  coef_t         coef_data,
  input  logic          x_valid,
  input  cplx_t         x,
  output logic          y_valid,
  output logic          y_sof,
  output logic [5:0]    y_ch,
  output cplx_t         y,
  output logic          overrun
);

  logic       v_valid, v_sof;
  logic [5:0] v_idx;
  cplx_t      v;
  logic       f_valid, f_sof;
  logic [5:0] f_idx;
  cplx_t      f_data, f_signed;
  logic       neg_frame;   // this frame's odd channels are negated

  pfb_analysis #(.K(K), .P(P)) u_pfb (
    .clk, .rst_n,
    .coef_we, .coef_tap, .coef_branch, .coef_data,
    .x_valid, .x,
    .v_valid, .v_sof, .v_idx, .v, .overrun
  );

  if (FFT_SERIAL) begin : g_ser
    fft40_serial #(.INVERSE(1'b1)) u_fft (
      .clk, .rst_n, .in_valid(v_valid), .in_data(v),
      .out_valid(f_valid), .out_sof(f_sof), .out_idx(f_idx), .out_data(f_data)
    );
  end else begin : g_par
    fft40_par_stream #(.INVERSE(1'b1)) u_fft (
      .clk, .rst_n, .in_valid(v_valid), .in_data(v),
      .out_valid(f_valid), .out_sof(f_sof), .out_idx(f_idx), .out_data(f_data)
    );
  end

  cneg_sat u_sign (.neg(neg_frame && f_idx[0]), .a(f_data), .y(f_signed));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_frame <= 1'b1;
      y_valid   <= 1'b0;
      y_sof     <= 1'b0;
      y_ch      <= '0;
      y         <= '0;
    end else begin
      if (f_valid && f_idx == 6'(K - 1)) neg_frame <= ~neg_frame;
      y_valid <= f_valid;
      y_sof   <= f_sof;
      y_ch    <= f_idx;
      if (f_valid) y <= f_signed;
    end
  end

  // v_sof/v_idx only restate the branch order the FFT counts itself
  wire unused_ok = &{1'b0, v_sof, v_idx};

endmodule
