// sdr_receiver: the receive chain, from A/D converter IF samples to decoded
// text and a bit error count.
//
// Digital down-converter -> AGC -> root-raised-cosine receive filter ->
// coarse frequency compensation -> symbol synchroniser -> carrier
// synchroniser -> preamble detector -> frame synchroniser -> data decoder,
// the order of the design description's receiver model, with the
// down-converter of its receiver architecture in front. All stages pass
// samples with a valid strobe; there is no back-pressure. The observation
// outputs show what each synchroniser is doing.
module sdr_receiver
  import sdr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adc_valid,
  input  sample_t            adc_in,
  input  logic [31:0]        lo_freq,
  input  logic [15:0]        lo_phase,
  output logic [6:0]         char_out,
  output logic               char_valid,
  output logic [31:0]        bit_errors,
  output logic [31:0]        bits_checked,
  output logic [31:0]        frames,
  output logic [1:0]         rot,
  output logic               rot_valid,
  output logic               locked,
  output logic               preamble_det,
  output logic [15:0]        agc_gain,
  output logic signed [31:0] coarse_freq,
  output logic               timing_skip,
  output logic               timing_stuff,
  output cplx_t              rx_sym,
  output logic               rx_sym_valid
);
  cplx_t ddc_o, agc_o, rrc_o, cfc_o, ss_o, cs_o, pd_o, fs_o;
  logic  ddc_v, agc_v, rrc_v, cfc_v, ss_v, cs_v, pd_v, fs_v, cfc_est_v, fvalid;
  logic [15:0] fidx;
  logic [47:0] pd_metric_unused;
  logic [31:0] cs_phase_unused;
  logic signed [31:0] cs_freq_unused;

  digital_down_converter u_ddc (
    .clk, .rst_n, .in_valid(adc_valid), .if_in(adc_in),
    .freq_word(lo_freq), .phase_offset(lo_phase),
    .out_sample(ddc_o), .out_valid(ddc_v)
  );

  agc u_agc (
    .clk, .rst_n, .in_valid(ddc_v), .in_sample(ddc_o),
    .out_sample(agc_o), .out_valid(agc_v), .gain(agc_gain)
  );

  fir_filter #(.NTAPS(RRC_TAPS), .COEF(RRC_COEF), .SHIFT(15)) u_rrc (
    .clk, .rst_n, .in_valid(agc_v), .in_sample(agc_o),
    .out_sample(rrc_o), .out_valid(rrc_v)
  );

  coarse_freq_comp u_cfc (
    .clk, .rst_n, .in_valid(rrc_v), .in_sample(rrc_o),
    .out_sample(cfc_o), .out_valid(cfc_v), .freq_est(coarse_freq), .est_valid(cfc_est_v)
  );

  symbol_synchronizer u_ss (
    .clk, .rst_n, .in_valid(cfc_v), .in_sample(cfc_o),
    .out_sample(ss_o), .out_valid(ss_v), .skip(timing_skip), .stuff(timing_stuff)
  );

  carrier_synchronizer u_cs (
    .clk, .rst_n, .in_valid(ss_v), .in_sample(ss_o),
    .out_sample(cs_o), .out_valid(cs_v), .phase_est(cs_phase_unused), .freq_est(cs_freq_unused)
  );

  preamble_detector u_pd (
    .clk, .rst_n, .in_valid(cs_v), .in_sample(cs_o),
    .out_sample(pd_o), .out_valid(pd_v), .det(preamble_det), .metric(pd_metric_unused)
  );

  frame_synchronizer u_fs (
    .clk, .rst_n, .in_valid(pd_v), .in_sample(pd_o), .det(preamble_det),
    .out_sample(fs_o), .out_valid(fs_v), .out_idx(fidx), .frame_valid(fvalid), .locked
  );

  data_decoder u_dec (
    .clk, .rst_n, .in_valid(fs_v), .in_sample(fs_o), .in_idx(fidx), .frame_valid(fvalid),
    .rot, .rot_valid, .char_out, .char_valid, .bit_errors, .bits_checked, .frames
  );

  assign rx_sym       = cs_o;
  assign rx_sym_valid = cs_v;
endmodule
