// digital_down_converter: brings the real IF samples from the A/D converter
// down to complex baseband.
//
// As in the design description's receiver architecture: a digital mixer
// driven by a digital local oscillator, then a low-pass FIR. The mixer
// forms x*cos(wt) and -x*sin(wt); the filter (gain 2, SHIFT 14, undoing the
// mixer's halving) removes the image at twice the IF, and every DECIM-th
// filter output is kept (4 here, back to 2 samples per symbol). Ratio,
// filter and word widths are this design's.
// Timing: one ADC sample per `in_valid`; a baseband sample leaves with
// `out_valid` three cycles after every DECIM-th input.
module digital_down_converter
  import sdr_pkg::*;
#(
  parameter int DECIM = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     if_in,
  input  logic [31:0] freq_word,
  input  logic [15:0] phase_offset,
  output cplx_t       out_sample,
  output logic        out_valid
);
  cplx_t lo, mixed, fir_out;
  logic  mixed_valid, fir_valid;
  logic [$clog2(DECIM)-1:0] phase_cnt;

  nco u_lo (
    .clk, .rst_n, .tick(in_valid), .freq_word, .phase_offset, .lo
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mixed <= '0; mixed_valid <= 1'b0;
    end else begin
      mixed_valid <= in_valid;
      if (in_valid) begin
        mixed.re <= sat16((48'(if_in) * 48'(lo.re)) >>> 15);
        mixed.im <= sat16(-((48'(if_in) * 48'(lo.im)) >>> 15));
      end
    end
  end

  fir_filter #(.NTAPS(LP_TAPS), .COEF(LP_COEF), .SHIFT(14)) u_lpf (
    .clk, .rst_n, .in_valid(mixed_valid), .in_sample(mixed),
    .out_sample(fir_out), .out_valid(fir_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_cnt <= '0; out_sample <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= fir_valid && phase_cnt == '0;
      if (fir_valid) begin
        if (phase_cnt == '0) out_sample <= fir_out;
        phase_cnt <= (32'(phase_cnt) == DECIM - 1) ? '0 : phase_cnt + 1'b1;
      end
    end
  end
endmodule
