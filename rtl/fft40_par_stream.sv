// fft40_par_stream: the fully parallel 40-point FFT wrapped with the
// serial-to-parallel and parallel-to-serial conversions that connect it to
// the serialised filter bank. Same stream interface as fft40_serial, so the
// two are interchangeable (only the latency differs).
//
// Samples 0..39 of a frame are collected in a 40-entry register buffer; on
// the clock after sample 39 the whole vector enters fft40_parallel, whose
// output registers hold the result while it is streamed out bin by bin.
// The next frame cannot overwrite those registers before the stream has
// ended, because a frame takes at least 40 input clocks.
//
// Timing: bin 0 appears 4 clocks after the clock that delivered sample 39;
// bins follow one per clock.
module fft40_par_stream
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

  cplx_t      sbuf [NCH];
  cplx_t      fy   [NCH];
  logic [5:0] icnt;
  logic       go;
  logic       fv;
  logic       o_run;
  logic [5:0] ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt <= '0;
      go   <= 1'b0;
    end else begin
      go <= in_valid && icnt == 6'(NCH - 1);
      if (in_valid) icnt <= (icnt == 6'(NCH - 1)) ? '0 : icnt + 6'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) sbuf[icnt] <= in_data;
  end

  fft40_parallel #(.INVERSE(INVERSE)) u_fft (
    .clk, .rst_n, .in_valid(go), .x(sbuf), .out_valid(fv), .y(fy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_run     <= 1'b0;
      ocnt      <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      // bin 0 leaves in the clock the result appears, so bin 39 is read
      // before the next frame can replace the FFT output registers
      if (fv) begin
        o_run     <= 1'b1;
        ocnt      <= 6'd1;
        out_valid <= 1'b1;
        out_sof   <= 1'b1;
        out_idx   <= '0;
        out_data  <= fy[0];
      end else begin
        out_valid <= o_run;
        out_sof   <= 1'b0;
        out_idx   <= ocnt;
        if (o_run) begin
          out_data <= fy[ocnt];
          ocnt     <= ocnt + 6'd1;
          if (ocnt == 6'(NCH - 1)) o_run <= 1'b0;
        end
      end
    end
  end

endmodule
