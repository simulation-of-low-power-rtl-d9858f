// carrier_synchronizer: fine frequency and phase correction at 1 sample
// per symbol.
//
// The design description uses a PLL whose loop filter's phase-error integral
// drives a direct digital synthesiser, with damping factor 1 and normalised
// loop bandwidth 0.01. Here the output is y = x * e^{-j*theta} (CORDIC),
// the QPSK phase detector is e = sign(Re y)*Im y - sign(Im y)*Re y (zero
// on the four points at +/-45 and +/-135 degrees), and
//   theta += KP*e + integ,  integ += KI*e   (theta: 2^-32 turn).
// KP and KI follow from Bn = 0.01, zeta = 1 with the standard second-order
// loop formulas (Kp*Kd = 0.0315, Ki*Kd = 2.52e-4) for a symbol amplitude
// of 8192 per component, the level the AGC settles to. The detector and
// fixed-point scaling are this design's.
// Timing: one symbol per `in_valid`, output one cycle later.
module carrier_synchronizer
  import sdr_pkg::*;
#(
  parameter int KP       = 1314,  // theta step per unit of e, 2^-32 turn
  parameter int KI       = 2693,  // integ step per unit of e, 2^-40 turn
  parameter int KI_SHIFT = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cplx_t              in_sample,
  output cplx_t              out_sample,
  output logic               out_valid,
  output logic [31:0]        phase_est,
  output logic signed [31:0] freq_est
);
  cplx_t y;
  logic signed [17:0] e;
  logic [31:0] theta;
  logic signed [31:0] integ;

  cordic_rotate u_dds (
    .in_sample(in_sample), .phase(16'(-theta[31:16])), .out_sample(y)
  );

  assign e = (y.re < 0 ? -18'(y.im) : 18'(y.im)) - (y.im < 0 ? -18'(y.re) : 18'(y.re));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta <= '0; integ <= '0; out_sample <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sample <= y;
        integ      <= integ + ((32'(e) * KI) >>> KI_SHIFT);
        theta      <= theta + 32'(32'(e) * KP) + 32'(integ);
      end
    end
  end

  assign phase_est = theta;
  assign freq_est  = integ;
endmodule
