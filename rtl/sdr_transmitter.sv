// sdr_transmitter: the transmit chain, from frame bits to IF samples for the
// D/A converter.
//
// Bit generator -> QPSK modulator -> root-raised-cosine filter at 2 samples
// per symbol (the symbol followed by a zero) -> digital up-converter
// (interpolation by 4 and mixing to the IF). With one `tick` per D/A
// sample, a symbol takes 8 ticks: at the design description's symbol rate
// of 50 ksymbol/s the filter runs at 100 ksample/s and the D/A converter at
// 400 ksample/s (the factor 4 is this design's choice).
// Schedule, by tick number within a symbol: bits are requested at 0 and 1;
// the filter takes the symbol at 4 and a zero at 0; the up-converter takes
// the filter output at 6 and 2 and zeros at the other ticks.
module sdr_transmitter
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic [31:0] lo_freq,
  input  logic [15:0] lo_phase,
  output sample_t     dac_out,
  output logic        dac_valid,
  output cplx_t       tx_sym,
  output logic        tx_sym_valid,
  output logic        tx_frame_start,
  output cplx_t       bb_sample,
  output logic        bb_valid
);
  logic [2:0] tcnt;
  logic       bit_v, bit_o, fstart;
  logic [6:0] msg_num_unused;
  cplx_t      sym, rrc_out, rrc_hold;
  logic       sym_v, rrc_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    tcnt <= '0;
    else if (tick) tcnt <= tcnt + 1'b1;
  end

  bit_generator u_bits (
    .clk, .rst_n, .bit_req(tick && (tcnt == 3'd0 || tcnt == 3'd1)),
    .bit_out(bit_o), .bit_valid(bit_v), .frame_start(fstart), .msg_num(msg_num_unused)
  );

  qpsk_modulator u_mod (
    .clk, .rst_n, .bit_valid(bit_v), .bit_in(bit_o), .align(fstart),
    .sym, .sym_valid(sym_v)
  );

  fir_filter #(.NTAPS(RRC_TAPS), .COEF(RRC_COEF), .SHIFT(15)) u_rrc (
    .clk, .rst_n,
    .in_valid (tick && (tcnt == 3'd4 || tcnt == 3'd0)),
    .in_sample(tcnt == 3'd4 ? sym : cplx_t'('0)),
    .out_sample(rrc_out), .out_valid(rrc_v)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rrc_hold <= '0; tx_frame_start <= 1'b0;
    end else begin
      if (rrc_v) rrc_hold <= rrc_out;
      if (bit_v && fstart) tx_frame_start <= 1'b1;
      else if (sym_v)      tx_frame_start <= 1'b0;
    end
  end

  digital_up_converter u_duc (
    .clk, .rst_n, .tick,
    .in_valid (tick && (tcnt == 3'd2 || tcnt == 3'd6)),
    .in_sample(rrc_hold),
    .freq_word(lo_freq), .phase_offset(lo_phase),
    .if_out(dac_out), .out_valid(dac_valid)
  );

  assign tx_sym       = sym;
  assign tx_sym_valid = sym_v;
  assign bb_sample    = rrc_out;
  assign bb_valid     = rrc_v;
endmodule
