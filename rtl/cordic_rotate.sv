// cordic_rotate: rotates a complex sample by a phase, out = in * e^{j*phase}.
//
// Combinational: a coarse quarter-turn rotation (swap and negate) brings the
// remaining angle into [-1/8, +1/8) turn, 16 CORDIC micro-rotations follow on
// 20-bit words, and a final multiply by 1/K (0.60725) removes the CORDIC gain.
// `phase` is an unsigned fraction of a turn (65536 = 2*pi). Used for the
// digital local oscillator and for every frequency or phase correction in
// the receiver. CORDIC is this design's choice; the design description names
// only mixers, local oscillators and a DDS.
module cordic_rotate
  import sdr_pkg::*;
(
  input  cplx_t       in_sample,
  input  logic [15:0] phase,
  output cplx_t       out_sample
);
  localparam int W = 20;
  logic [15:0]        ph_shift;
  logic [1:0]         quad;
  logic signed [16:0] resid;
  logic signed [W-1:0] x [CORDIC_STAGES+1];
  logic signed [W-1:0] y [CORDIC_STAGES+1];
  logic signed [16:0]  z [CORDIC_STAGES+1];
  logic signed [W-1:0] x0, y0;
  logic signed [W+17:0] px, py;

  assign ph_shift = phase + 16'd8192;
  assign quad     = ph_shift[15:14];
  assign resid    = 17'(signed'({1'b0, ph_shift[13:0]})) - 17'sd8192;

  always_comb begin
    unique case (quad)
      2'd0: begin x0 =  W'(in_sample.re); y0 =  W'(in_sample.im); end
      2'd1: begin x0 = -W'(in_sample.im); y0 =  W'(in_sample.re); end
      2'd2: begin x0 = -W'(in_sample.re); y0 = -W'(in_sample.im); end
      default: begin x0 = W'(in_sample.im); y0 = -W'(in_sample.re); end
    endcase
    x[0] = x0; y[0] = y0; z[0] = resid;
    for (int i = 0; i < CORDIC_STAGES; i++) begin
      if (z[i] >= 0) begin
        x[i+1] = x[i] - (y[i] >>> i);
        y[i+1] = y[i] + (x[i] >>> i);
        z[i+1] = z[i] - 17'(signed'({1'b0, CORDIC_ATAN[i]}));
      end else begin
        x[i+1] = x[i] + (y[i] >>> i);
        y[i+1] = y[i] - (x[i] >>> i);
        z[i+1] = z[i] + 17'(signed'({1'b0, CORDIC_ATAN[i]}));
      end
    end
    px = 38'(x[CORDIC_STAGES]) * 38'(CORDIC_INV_GAIN);
    py = 38'(y[CORDIC_STAGES]) * 38'(CORDIC_INV_GAIN);
    out_sample.re = sat16(48'(px >>> 15));
    out_sample.im = sat16(48'(py >>> 15));
  end
endmodule
