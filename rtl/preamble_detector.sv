// preamble_detector: finds the frame header by correlating the received
// symbols with the QPSK-modulated Barker-13 code.
//
// As in the design description, the received symbols are correlated with
// the known header symbols and a peak marks the header position. The 13
// header symbols are p_k = s_k (1 + j), s_k = -1 for a Barker '1' (bits 11)
// and +1 for a '0' (bits 00). c = sum y[n-12+k] * conj(p_k); the metric
// |c|^2 does not depend on the carrier's phase ambiguity. `det` pulses when
// the metric reaches THRESHOLD while the last header symbol is being output.
// The default threshold is (0.75 * 26 * 8192)^2: 75% of the ideal peak for
// the AGC's symbol level. The threshold rule is this design's.
// Timing: one symbol per `in_valid`; `out_sample`, `det` and `metric` come
// one cycle later, `det` with the symbol that completes the header.
module preamble_detector
  import sdr_pkg::*;
#(
  parameter longint THRESHOLD = 64'd25518146496
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_sample,
  output cplx_t       out_sample,
  output logic        out_valid,
  output logic        det,
  output logic [47:0] metric
);
  cplx_t win [BARKER_LEN-1];   // the 12 previous symbols, win[BARKER_LEN-2] newest
  logic signed [31:0] c_re, c_im;
  logic [63:0] m;

  always_comb begin
    c_re = '0;
    c_im = '0;
    for (int k = 0; k < BARKER_LEN; k++) begin
      logic signed [31:0] sr, si;
      cplx_t y;
      y  = (k == BARKER_LEN-1) ? in_sample : win[k];
      sr = 32'(y.re) + 32'(y.im);    // Re{y * (1 - j)}
      si = 32'(y.im) - 32'(y.re);    // Im{y * (1 - j)}
      if (BARKER13[BARKER_LEN-1-k]) begin
        c_re -= sr; c_im -= si;
      end else begin
        c_re += sr; c_im += si;
      end
    end
    m = 64'(64'(c_re) * 64'(c_re)) + 64'(64'(c_im) * 64'(c_im));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < BARKER_LEN-1; k++) win[k] <= '0;
      out_sample <= '0; out_valid <= 1'b0; det <= 1'b0; metric <= '0;
    end else begin
      out_valid <= in_valid;
      det       <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < BARKER_LEN-2; k++) win[k] <= win[k+1];
        win[BARKER_LEN-2] <= in_sample;
        out_sample <= in_sample;
        metric     <= 48'(m);
        det        <= m >= 64'(THRESHOLD);
      end
    end
  end
endmodule
