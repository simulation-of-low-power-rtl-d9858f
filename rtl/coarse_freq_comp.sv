// coarse_freq_comp: correlation-based coarse frequency offset estimator and
// compensator, working at 2 samples per symbol.
//
// The design description estimates the offset by a correlation method,
// averages the estimates and removes the offset with a phase/frequency
// rotation, leaving a small residual for the carrier synchroniser. Here:
// z = x^4 strips the QPSK modulation; over blocks of 2^LOG2_BLOCK samples
// r = sum z[n] * conj(z[n-1]) is accumulated; arg(r)/4 is the offset in
// turns per sample (CORDIC vectoring; unambiguous below 1/8 of the sample
// rate). Each block estimate is averaged into `freq_est` with weight
// 2^-AVG_SHIFT, and a phase accumulator stepping by -freq_est rotates the
// input. Block length, averaging and fixed-point scaling are this design's.
// Timing: one sample per `in_valid`, output one cycle later. `freq_est` is
// in units of 2^-32 turn per sample (signed); `est_valid` pulses per block.
module coarse_freq_comp
  import sdr_pkg::*;
#(
  parameter int LOG2_BLOCK = 8,
  parameter int AVG_SHIFT  = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cplx_t              in_sample,
  output cplx_t              out_sample,
  output logic               out_valid,
  output logic signed [31:0] freq_est,
  output logic               est_valid
);
  cplx_t x2, x4, z_prev, rot_out;
  logic signed [47:0] acc_re, acc_im, p_re, p_im;
  logic [LOG2_BLOCK-1:0] cnt;
  logic signed [23:0] v_re, v_im;
  logic [15:0] ang;
  logic [24:0] unused_mag;
  logic [31:0] phase_acc;
  logic signed [31:0] new_est;

  function automatic cplx_t csq(input cplx_t a);
    cplx_t r;
    r.re = sat16((48'(a.re) * 48'(a.re) - 48'(a.im) * 48'(a.im)) >>> 14);
    r.im = sat16((48'(a.re) * 48'(a.im)) >>> 13);
    return r;
  endfunction

  assign x2   = csq(in_sample);
  assign x4   = csq(x2);
  // z[n] * conj(z[n-1])
  assign p_re = (48'(x4.re) * 48'(z_prev.re) + 48'(x4.im) * 48'(z_prev.im)) >>> 8;
  assign p_im = (48'(x4.im) * 48'(z_prev.re) - 48'(x4.re) * 48'(z_prev.im)) >>> 8;

  // Bring the block sum into 24 bits keeping its angle.
  always_comb begin
    logic signed [47:0] a_re, a_im;
    a_re = acc_re + p_re;
    a_im = acc_im + p_im;
    for (int s = 0; s < 24; s++) begin
      if (a_re > 48'sd4194303 || a_re < -48'sd4194303 ||
          a_im > 48'sd4194303 || a_im < -48'sd4194303) begin
        a_re = a_re >>> 1;
        a_im = a_im >>> 1;
      end
    end
    v_re = 24'(a_re);
    v_im = 24'(a_im);
  end

  cordic_vector #(.IN_W(24)) u_angle (
    .in_re(v_re), .in_im(v_im), .angle(ang), .mag(unused_mag)
  );

  // arg/4: signed angle in 2^-16 turn -> 2^-32 turn per sample, divided by 4.
  assign new_est = 32'(signed'(ang)) <<< 14;

  cordic_rotate u_rot (
    .in_sample(in_sample), .phase(phase_acc[31:16]), .out_sample(rot_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0; acc_im <= '0; cnt <= '0; z_prev <= '0;
      freq_est <= '0; est_valid <= 1'b0; phase_acc <= '0;
      out_sample <= '0; out_valid <= 1'b0;
    end else begin
      est_valid <= 1'b0;
      out_valid <= in_valid;
      if (in_valid) begin
        z_prev     <= x4;
        out_sample <= rot_out;
        phase_acc  <= phase_acc - freq_est;
        cnt        <= cnt + 1'b1;
        if (cnt == '1) begin
          acc_re    <= '0;
          acc_im    <= '0;
          freq_est  <= freq_est + ((new_est - freq_est) >>> AVG_SHIFT);
          est_valid <= 1'b1;
        end else begin
          acc_re <= acc_re + p_re;
          acc_im <= acc_im + p_im;
        end
      end
    end
  end
endmodule
