// nco: numerically controlled oscillator, the digital local oscillator of
// the up- and down-converters.
//
// A 32-bit phase accumulator advances by `freq_word` on every `tick`
// (f = freq_word / 2^32 * f_tick); its top 16 bits plus `phase_offset` turn
// the fixed vector (AMP, 0) through cordic_rotate, giving cos and sin of the
// phase. The design description names a digital local oscillator; the
// accumulator width, amplitude and CORDIC are this design's.
// Timing: `lo` shows the phase held in the accumulator (combinational
// from it); the accumulator steps after each tick, so the first tick after
// reset sees phase `phase_offset`.
module nco
  import sdr_pkg::*;
#(
  parameter sample_t AMP = 16'sd32767
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic [31:0] freq_word,
  input  logic [15:0] phase_offset,
  output cplx_t       lo          // re = AMP*cos, im = AMP*sin
);
  logic [31:0] acc;
  cplx_t       unit;

  assign unit.re = AMP;
  assign unit.im = '0;

  cordic_rotate u_rot (
    .in_sample (unit),
    .phase     (acc[31:16] + phase_offset),
    .out_sample(lo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (tick) acc <= acc + freq_word;
  end
endmodule
