// fir_filter: complex FIR filter, direct form, same real taps on I and Q.
//
// Used as the root-raised-cosine transmit and receive filters (roll-off 0.5,
// 2 samples per symbol, as in the design description) and, with the
// low-pass taps, as the interpolation filter of the up-converter and the
// channel filter of the down-converter. Span and quantisation of the taps
// are this design's choices (see sdr_pkg).
// Interface: one sample per `in_valid`; the output is registered and valid
// one cycle later. out = sat(sum(c[k] * x[n-k]) >>> SHIFT); SHIFT = 15 gives
// the taps' own gain, smaller values add 6 dB per step (an interpolator
// that stuffs zeros uses this to restore its level).
module fir_filter
  import sdr_pkg::*;
#(
  parameter int NTAPS = RRC_TAPS,
  parameter logic signed [15:0] COEF [NTAPS] = RRC_COEF,
  parameter int SHIFT = 15
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_sample,
  output cplx_t out_sample,
  output logic  out_valid
);
  cplx_t dly [NTAPS-1];
  logic signed [47:0] acc_re, acc_im;

  always_comb begin
    acc_re = 48'(in_sample.re) * 48'(COEF[0]);
    acc_im = 48'(in_sample.im) * 48'(COEF[0]);
    for (int k = 1; k < NTAPS; k++) begin
      acc_re += 48'(dly[k-1].re) * 48'(COEF[k]);
      acc_im += 48'(dly[k-1].im) * 48'(COEF[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS-1; k++) dly[k] <= '0;
      out_sample <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dly[0] <= in_sample;
        for (int k = 1; k < NTAPS-1; k++) dly[k] <= dly[k-1];
        out_sample.re <= sat16(acc_re >>> SHIFT);
        out_sample.im <= sat16(acc_im >>> SHIFT);
      end
    end
  end
endmodule
