// data_decoder: resolves the carrier's phase ambiguity, demodulates the
// payload, descrambles it, rebuilds the text and counts bit errors.
//
// As in the design description's data decoding stage: the phase offset is
// estimated from the known header, the symbols are turned back by it, then
// demodulated and the message is decoded. Here the 13 header symbols are
// correlated with the known header symbols; the quadrant of the sum gives
// the rotation r (multiples of 90 degrees, `rot`) that the carrier loop
// locked with, and every payload symbol is turned back by r. Hard QPSK
// decisions (inverse of the transmit mapping) give two bits, which are
// descrambled one per cycle and packed into 7-bit characters (`char_out`).
// The bit error count compares the 12 fixed characters "Hello world " of
// every message with the known text (the three digits are a counter the
// receiver does not know); counts of a frame are added to the totals when
// the frame synchroniser reports the frame valid. The error-count rule is
// this design's.
// Timing: one symbol per `in_valid` with its frame index; symbols must be at
// least two cycles apart (one bit is descrambled per cycle).
module data_decoder
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_sample,
  input  logic [15:0] in_idx,
  input  logic        frame_valid,
  output logic [1:0]  rot,
  output logic        rot_valid,
  output logic [6:0]  char_out,
  output logic        char_valid,
  output logic [31:0] bit_errors,
  output logic [31:0] bits_checked,
  output logic [31:0] frames
);
  logic signed [31:0] c_re, c_im, sr, si, n_re, n_im;
  cplx_t d;
  logic  b0, b1;
  logic  pend;          // second bit of a symbol waiting
  logic  pend_bit;
  logic  bit_v, bit_in, bit_first, bit_out;
  logic [2:0] bi;
  logic [3:0] ci;
  logic [5:0] ch_acc;
  logic [31:0] f_err, f_chk;
  logic       exp_bit;
  logic [6:0] exp_ch;

  // correlation with the header symbol of index in_idx
  assign sr   = 32'(in_sample.re) + 32'(in_sample.im);
  assign si   = 32'(in_sample.im) - 32'(in_sample.re);
  assign n_re = (BARKER13[BARKER_LEN-1 - 32'(in_idx)]) ? c_re - sr : c_re + sr;
  assign n_im = (BARKER13[BARKER_LEN-1 - 32'(in_idx)]) ? c_im - si : c_im + si;

  // undo a rotation by r quarter turns: d = y * (-j)^r
  always_comb begin
    unique case (rot)
      2'd0:    begin d.re =  in_sample.re; d.im =  in_sample.im; end
      2'd1:    begin d.re =  in_sample.im; d.im = -in_sample.re; end
      2'd2:    begin d.re = -in_sample.re; d.im = -in_sample.im; end
      default: begin d.re = -in_sample.im; d.im =  in_sample.re; end
    endcase
  end
  assign b0 = d.im < 0;
  assign b1 = d.re < 0;

  // one payload bit per cycle into the descrambler
  assign bit_v     = (in_valid && in_idx >= 16'(BARKER_LEN)) || pend;
  assign bit_in    = pend ? pend_bit : b0;
  assign bit_first = in_valid && in_idx == 16'(BARKER_LEN);

  scrambler #(.DESCRAMBLE(1'b1)) u_descr (
    .clk, .rst_n, .init(bit_first), .in_valid(bit_v), .in_bit(bit_in), .out_bit(bit_out)
  );

  assign exp_ch  = msg_char(32'(ci), 0);
  assign exp_bit = exp_ch[3'd6 - (bit_first ? 3'd0 : bi)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_re <= '0; c_im <= '0; rot <= '0; rot_valid <= 1'b0;
      pend <= 1'b0; pend_bit <= 1'b0; bi <= '0; ci <= '0; ch_acc <= '0;
      char_out <= '0; char_valid <= 1'b0;
      f_err <= '0; f_chk <= '0; bit_errors <= '0; bits_checked <= '0; frames <= '0;
    end else begin
      rot_valid  <= 1'b0;
      char_valid <= 1'b0;
      // header: estimate the rotation
      if (in_valid && in_idx < 16'(BARKER_LEN)) begin
        if (in_idx == 16'(BARKER_LEN - 1)) begin
          c_re <= '0; c_im <= '0;
          rot_valid <= 1'b1;
          if ((n_re < 0 ? -n_re : n_re) >= (n_im < 0 ? -n_im : n_im))
            rot <= (n_re >= 0) ? 2'd0 : 2'd2;
          else
            rot <= (n_im >= 0) ? 2'd1 : 2'd3;
        end else begin
          c_re <= (in_idx == 0) ? ((BARKER13[BARKER_LEN-1]) ? -sr : sr) : n_re;
          c_im <= (in_idx == 0) ? ((BARKER13[BARKER_LEN-1]) ? -si : si) : n_im;
        end
        if (in_idx == 0) begin
          f_err <= '0; f_chk <= '0;
        end
      end
      // payload bits
      pend <= in_valid && in_idx >= 16'(BARKER_LEN);
      if (in_valid) pend_bit <= b1;
      if (bit_v) begin
        logic [2:0] bpos;
        logic [3:0] cpos;
        bpos = bit_first ? 3'd0 : bi;
        cpos = bit_first ? 4'd0 : ci;
        ch_acc <= {ch_acc[4:0], bit_out};
        if (cpos < 4'(MSG_TEXT_CHARS)) begin
          f_chk <= f_chk + 1;
          if (bit_out != exp_bit) f_err <= f_err + 1;
        end
        if (bpos == 3'(CHAR_BITS - 1)) begin
          bi <= '0;
          char_out   <= {ch_acc, bit_out};
          char_valid <= 1'b1;
          ci <= (cpos == 4'(MSG_CHARS - 1)) ? '0 : cpos + 1'b1;
        end else begin
          bi <= bpos + 1'b1;
          ci <= cpos;
        end
      end
      if (frame_valid) begin
        frames       <= frames + 1;
        bit_errors   <= bit_errors + f_err;
        bits_checked <= bits_checked + f_chk;
      end
    end
  end
endmodule
