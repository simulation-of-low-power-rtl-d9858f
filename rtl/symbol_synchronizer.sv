// symbol_synchronizer: Gardner timing recovery, 2 samples per symbol in,
// 1 symbol out.
//
// The design description uses a rotation-invariant Gardner timing error
// detector in a PLL, and stuffs or skips symbols when the timing drifts
// across a symbol boundary. Here interpolants are taken every 1 + v input
// samples (piecewise-parabolic Farrow interpolation over four samples, one
// sample behind the newest input); they
// alternate between symbol strobes and mid points. At each symbol
//   e = Re{(y[k] - y[k-1]) * conj(y[k-1/2])}
// feeds a proportional-integral loop filter whose output -v shortens or
// stretches the interpolant spacing. When the interpolant time passes a
// whole sample no interpolant is made for one input (`skip`), or two are
// made from one input (`stuff`). Interpolator order, loop gains and word
// widths are this design's.
// Timing: one input per `in_valid`; `out_valid` pulses one cycle after an
// input that produced a symbol strobe. Time is in units of 2^-16 sample.
module symbol_synchronizer
  import sdr_pkg::*;
#(
  parameter int KP_SHIFT = 3,   // proportional gain 2^-KP_SHIFT on e >>> 15
  parameter int KI_SHIFT = 9,   // integral gain 2^-KI_SHIFT on the sum of e >>> 15
  parameter int V_LIMIT  = 8192 // |v| limit, 1/8 sample
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_sample,
  output cplx_t out_sample,
  output logic  out_valid,
  output logic  skip,
  output logic  stuff
);
  localparam logic signed [19:0] ONE = 20'sd65536;

  cplx_t x_prev, x_prev2, x_prev3; // x[m-1], x[m-2], x[m-3]
  cplx_t y_prevsym, y_mid;
  logic  sym_phase;              // 1: next interpolant is a symbol strobe
  logic signed [19:0] tau;       // next interpolant time relative to x[m-2]
  logic signed [31:0] integ;
  logic signed [19:0] v;

  // Piecewise-parabolic Farrow interpolator (alpha = 1/2) at fraction mu
  // between a = x[m-2] and b = x[m-1], using p = x[m-3] and q = x[m]:
  //   y = (v2*mu + v1)*mu + v0, v0 = a,
  //   v1 = (-q + 3b - a - p)/2, v2 = (q - b - a + p)/2.
  function automatic sample_t farrow(input sample_t p, input sample_t a, input sample_t b,
                                     input sample_t q, input logic signed [19:0] mu);
    logic signed [47:0] v1, v2, t;
    v1 = (-48'(q) + 3 * 48'(b) - 48'(a) - 48'(p)) >>> 1;
    v2 = (48'(q) - 48'(b) - 48'(a) + 48'(p)) >>> 1;
    t  = ((v2 * 48'(mu)) >>> 16) + v1;
    return sat16(48'(a) + ((t * 48'(mu)) >>> 16));
  endfunction

  function automatic cplx_t interp(input cplx_t p, input cplx_t a, input cplx_t b, input cplx_t q,
                                   input logic signed [19:0] mu);
    cplx_t r;
    r.re = farrow(p.re, a.re, b.re, q.re, mu);
    r.im = farrow(p.im, a.im, b.im, q.im, mu);
    return r;
  endfunction

  function automatic logic signed [31:0] gardner(input cplx_t cur, input cplx_t prev, input cplx_t mid);
    logic signed [47:0] e;
    e = (48'(cur.re) - 48'(prev.re)) * 48'(mid.re) + (48'(cur.im) - 48'(prev.im)) * 48'(mid.im);
    return 32'(e >>> 15);
  endfunction

  // combinational view of one input sample
  logic       n1, n2;            // first / second interpolant made
  cplx_t      y1, y2;
  logic signed [19:0] tau1, tau2;
  logic       s1, s2;            // interpolant is a symbol strobe
  logic       sym_now;
  cplx_t      sym_val, mid_for_err, prevsym_for_err;
  logic signed [31:0] e;

  always_comb begin
    n1 = tau < ONE;
    y1 = interp(x_prev3, x_prev2, x_prev, in_sample, tau);
    tau1 = tau + ONE + v;
    n2 = n1 && tau1 < ONE;
    y2 = interp(x_prev3, x_prev2, x_prev, in_sample, tau1);
    tau2 = tau1 + ONE + v;
    s1 = sym_phase;
    s2 = !sym_phase;
    sym_now = (n1 && s1) || (n2 && s2);
    sym_val = (n1 && s1) ? y1 : y2;
    mid_for_err = (n2 && s2) ? y1 : y_mid;  // mid interpolant just before
    prevsym_for_err = y_prevsym;
    e = gardner(sym_val, prevsym_for_err, mid_for_err);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev <= '0; x_prev2 <= '0; x_prev3 <= '0; y_prevsym <= '0; y_mid <= '0; sym_phase <= 1'b1;
      tau <= '0; integ <= '0; v <= '0;
      out_sample <= '0; out_valid <= 1'b0; skip <= 1'b0; stuff <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      skip      <= 1'b0;
      stuff     <= 1'b0;
      if (in_valid) begin
        x_prev  <= in_sample;
        x_prev2 <= x_prev;
        x_prev3 <= x_prev2;
        if (!n1) begin
          tau  <= tau - ONE;
          skip <= 1'b1;
        end else if (!n2) begin
          tau <= tau1 - ONE;
          sym_phase <= !sym_phase;
          if (!s1) y_mid <= y1;
        end else begin
          tau <= tau2 - ONE;
          stuff <= 1'b1;
          if (!s2) y_mid <= y2;
        end
        if (sym_now) begin
          logic signed [31:0] vn, in_next;
          out_sample <= sym_val;
          out_valid  <= 1'b1;
          y_prevsym  <= sym_val;
          in_next = integ + e;
          vn = -((e >>> KP_SHIFT) + (in_next >>> KI_SHIFT));
          if (vn > V_LIMIT)  vn = V_LIMIT;
          if (vn < -V_LIMIT) vn = -V_LIMIT;
          integ <= in_next;
          v     <= 20'(vn);
        end
      end
    end
  end
endmodule
