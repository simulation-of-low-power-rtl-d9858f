// qpsk_modulator: collects bits in pairs and maps each pair to a QPSK
// symbol.
//
// Gray mapping with a pi/4 offset, amplitude QPSK_AMP per component: the
// first bit of the pair selects the sign of Q, the second the sign of I
// ('0' positive): 00 -> +1+j, 01 -> -1+j, 11 -> -1-j, 10 -> +1-j. The
// design description says only that QPSK symbols are produced from the
// bits; the mapping, offset and amplitude are this design's (they match a
// common baseband QPSK modulator default).
// Interface: one bit per `bit_valid`; `align` (with a bit) marks the first
// bit of a pair. The symbol is registered: `sym_valid` pulses the cycle
// after the second bit, and `sym` holds until the next symbol.
module qpsk_modulator
  import sdr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bit_valid,
  input  logic  bit_in,
  input  logic  align,
  output cplx_t sym,
  output logic  sym_valid
);
  logic first_bit;
  logic have_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_bit <= 1'b0; have_first <= 1'b0;
      sym <= '0; sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (bit_valid) begin
        if (have_first && !align) begin
          sym.im     <= first_bit ? -QPSK_AMP : QPSK_AMP;
          sym.re     <= bit_in    ? -QPSK_AMP : QPSK_AMP;
          sym_valid  <= 1'b1;
          have_first <= 1'b0;
        end else begin
          first_bit  <= bit_in;
          have_first <= 1'b1;
        end
      end
    end
  end
endmodule
