// sdr_top: QPSK software-defined radio for inter-satellite links, transmitter
// and receiver side by side.
//
// The transmitter turns framed text messages into real IF samples for a D/A
// converter; the receiver takes real IF samples from an A/D converter and
// recovers the text. Converters, RF stages, amplifiers and the channel are
// outside: `dac_out` and `adc_in` are the converters' digital sides. Both
// local oscillators are set at run time (`*_lo_freq` in units of
// f_sample / 2^32, `*_lo_phase` in 2^-16 turn); IF_FREQ_WORD is the nominal
// IF of a quarter of the sample rate. One D/A sample per `dac_tick`, one A/D
// sample per `adc_valid`; everything runs on one clock.
module sdr_top
  import sdr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // transmitter
  input  logic               dac_tick,
  input  logic [31:0]        tx_lo_freq,
  input  logic [15:0]        tx_lo_phase,
  output sample_t            dac_out,
  output logic               dac_valid,
  output cplx_t              tx_sym,
  output logic               tx_sym_valid,
  output logic               tx_frame_start,
  // receiver
  input  logic               adc_valid,
  input  sample_t            adc_in,
  input  logic [31:0]        rx_lo_freq,
  input  logic [15:0]        rx_lo_phase,
  output logic [6:0]         rx_char,
  output logic               rx_char_valid,
  output logic [31:0]        rx_bit_errors,
  output logic [31:0]        rx_bits_checked,
  output logic [31:0]        rx_frames,
  output logic [1:0]         rx_rot,
  output logic               rx_rot_valid,
  output logic               rx_locked,
  output logic               rx_preamble_det,
  output logic [15:0]        rx_agc_gain,
  output logic signed [31:0] rx_coarse_freq,
  output logic               rx_timing_skip,
  output logic               rx_timing_stuff,
  output cplx_t              rx_sym,
  output logic               rx_sym_valid
);
  cplx_t bb_unused;
  logic  bb_v_unused;

  sdr_transmitter u_tx (
    .clk, .rst_n, .tick(dac_tick), .lo_freq(tx_lo_freq), .lo_phase(tx_lo_phase),
    .dac_out, .dac_valid, .tx_sym, .tx_sym_valid, .tx_frame_start,
    .bb_sample(bb_unused), .bb_valid(bb_v_unused)
  );

  sdr_receiver u_rx (
    .clk, .rst_n, .adc_valid, .adc_in, .lo_freq(rx_lo_freq), .lo_phase(rx_lo_phase),
    .char_out(rx_char), .char_valid(rx_char_valid),
    .bit_errors(rx_bit_errors), .bits_checked(rx_bits_checked), .frames(rx_frames),
    .rot(rx_rot), .rot_valid(rx_rot_valid), .locked(rx_locked),
    .preamble_det(rx_preamble_det), .agc_gain(rx_agc_gain), .coarse_freq(rx_coarse_freq),
    .timing_skip(rx_timing_skip), .timing_stuff(rx_timing_stuff),
    .rx_sym, .rx_sym_valid
  );
endmodule
