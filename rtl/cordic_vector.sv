// cordic_vector: angle and magnitude of a complex value (CORDIC vectoring).
//
// Combinational. The input (up to 24 bits per component) is first turned into
// the right half plane (a half-turn rotation if re < 0), then 16 CORDIC
// micro-rotations drive the imaginary part to zero while the rotation angles
// are summed. `angle` is an unsigned fraction of a turn (65536 = 2*pi);
// `mag` is the magnitude with the CORDIC gain removed. Used by the coarse
// frequency estimator; the angle-from-correlation approach is the design
// description's, the CORDIC is this design's choice.
module cordic_vector
  import sdr_pkg::*;
#(
  parameter int IN_W = 24
) (
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic [15:0]            angle,
  output logic [IN_W:0]          mag
);
  localparam int W = IN_W + 3;
  logic signed [W-1:0] x [CORDIC_STAGES+1];
  logic signed [W-1:0] y [CORDIC_STAGES+1];
  logic [15:0]         z [CORDIC_STAGES+1];
  logic signed [W+17:0] pm;

  always_comb begin
    if (in_re < 0) begin
      x[0] = -W'(in_re); y[0] = -W'(in_im); z[0] = 16'd32768;
    end else begin
      x[0] =  W'(in_re); y[0] =  W'(in_im); z[0] = 16'd0;
    end
    for (int i = 0; i < CORDIC_STAGES; i++) begin
      if (y[i] < 0) begin
        x[i+1] = x[i] - (y[i] >>> i);
        y[i+1] = y[i] + (x[i] >>> i);
        z[i+1] = z[i] - CORDIC_ATAN[i];
      end else begin
        x[i+1] = x[i] + (y[i] >>> i);
        y[i+1] = y[i] - (x[i] >>> i);
        z[i+1] = z[i] + CORDIC_ATAN[i];
      end
    end
    angle = z[CORDIC_STAGES];
    pm    = (W+18)'(x[CORDIC_STAGES]) * (W+18)'(CORDIC_INV_GAIN);
    mag   = (IN_W+1)'(pm >>> 15);
  end
endmodule
