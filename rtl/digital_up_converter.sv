// digital_up_converter: raises the complex baseband to a real intermediate
// frequency.
//
// As in the design description's transmitter architecture, it is an
// interpolation filter followed by a digital mixer fed by a digital local
// oscillator. Interpolation: every `tick` (the output sample rate) one
// sample enters the low-pass FIR: the new baseband sample when `in_valid`
// is high, zero otherwise (zero stuffing by the caller's ratio, 4 in this
// design); the filter's gain of 4 (SHIFT 13) restores the level. Mixer:
// if = I*cos(wt) + Q*(-sin(wt)), the sum of two products of the description's
// model, with the second sine wave taken as -sin (its phase is this
// design's choice). Filter, ratio and word widths are this design's.
// Timing: the IF sample for a tick appears two cycles later with
// `out_valid`. `freq_word` is the LO frequency in units of f_tick / 2^32.
module digital_up_converter
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        in_valid,
  input  cplx_t       in_sample,
  input  logic [31:0] freq_word,
  input  logic [15:0] phase_offset,
  output sample_t     if_out,
  output logic        out_valid
);
  cplx_t fir_in, fir_out, lo;
  logic  fir_valid;
  logic signed [47:0] mix;

  assign fir_in = in_valid ? in_sample : '0;

  fir_filter #(.NTAPS(LP_TAPS), .COEF(LP_COEF), .SHIFT(13)) u_interp (
    .clk, .rst_n, .in_valid(tick), .in_sample(fir_in),
    .out_sample(fir_out), .out_valid(fir_valid)
  );

  nco u_lo (
    .clk, .rst_n, .tick(fir_valid), .freq_word, .phase_offset, .lo
  );

  assign mix = 48'(fir_out.re) * 48'(lo.re) - 48'(fir_out.im) * 48'(lo.im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_out <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= fir_valid;
      if (fir_valid) if_out <= sat16(mix >>> 15);
    end
  end
endmodule
