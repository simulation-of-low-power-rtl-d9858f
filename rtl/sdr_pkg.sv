// sdr_pkg: types and constants shared by the QPSK software-defined-radio
// transmitter and receiver.
//
// Samples are complex, 16-bit two's complement per component, full scale
// +/-32767 standing for +/-1.0. Phases are 16-bit unsigned fractions of a
// turn (65536 = 2*pi). The frame format follows the design description: a
// 26-bit header made of the 13-bit Barker code with every bit sent twice
// (13 QPSK symbols), followed by 20 messages "Hello world ###", where ###
// counts 000..099 and wraps. The characters are sent as 7-bit ASCII, most
// significant bit first; the 7-bit width, the bit order and the scrambler
// polynomial are this design's choices.
package sdr_pkg;

  localparam int SAMPLE_W = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // ---- frame format ------------------------------------------------------
  localparam int BARKER_LEN   = 13;
  // Barker-13 (+1 +1 +1 +1 +1 -1 -1 +1 +1 -1 +1 -1 +1); bit 12 is sent first,
  // a '1' stands for +1.
  localparam logic [BARKER_LEN-1:0] BARKER13 = 13'b1111100110101;
  localparam int HEADER_BITS  = 2 * BARKER_LEN;            // 26
  localparam int CHAR_BITS    = 7;
  localparam int MSG_CHARS    = 15;                        // "Hello world ###"
  localparam int MSG_BITS     = MSG_CHARS * CHAR_BITS;     // 105
  localparam int NUM_MSGS     = 20;
  localparam int PAYLOAD_BITS = NUM_MSGS * MSG_BITS;       // 2100
  localparam int FRAME_BITS   = HEADER_BITS + PAYLOAD_BITS; // 2126
  localparam int FRAME_SYMS   = FRAME_BITS / 2;            // 1063
  localparam int MSG_COUNT_MOD = 100;

  // Fixed text of a message, "Hello world " (12 characters), first
  // character in the top byte.
  localparam int MSG_TEXT_CHARS = 12;
  localparam logic [8*MSG_TEXT_CHARS-1:0] MSG_TEXT = "Hello world ";

  // Character ci (0..14) of the message with sequence number num (0..99).
  function automatic logic [6:0] msg_char(input int unsigned ci, input int unsigned num);
    logic [7:0] c;
    if (ci < MSG_TEXT_CHARS) c = MSG_TEXT[8*(MSG_TEXT_CHARS-1-ci) +: 8];
    else if (ci == 12)       c = 8'h30;                       // hundreds: always 0
    else if (ci == 13)       c = 8'(8'h30 + (num / 10) % 10);
    else                     c = 8'(8'h30 + num % 10);
    return c[6:0];
  endfunction

  // ---- QPSK --------------------------------------------------------------
  // Gray mapping with pi/4 offset: first bit b0 sets the sign of Q, second
  // bit b1 the sign of I ('0' -> +).  00:+1+j 01:-1+j 11:-1-j 10:+1-j.
  localparam sample_t QPSK_AMP = 16'sd8192;

  // ---- filters -----------------------------------------------------------
  // Root raised cosine, roll-off 0.5, 2 samples per symbol, span 10 symbols,
  // unit energy: h[n] = rrc((n-10)/2) / sqrt(sum rrc^2), scaled by 2^15,
  // rrc(t) = (sin(pi t (1-b)) + 4 b t cos(pi t (1+b))) / (pi t (1 - (4 b t)^2)).
  localparam int RRC_TAPS = 21;
  localparam logic signed [15:0] RRC_COEF [RRC_TAPS] = '{
    -16'sd15, 16'sd116, -16'sd234, 16'sd248, 16'sd70, -16'sd348, 16'sd983,
    -16'sd1738, -16'sd2459, 16'sd13408, 16'sd26337, 16'sd13408, -16'sd2459,
    -16'sd1738, 16'sd983, -16'sd348, 16'sd70, 16'sd248, -16'sd234, 16'sd116,
    -16'sd15};

  // Low-pass used as the up-converter's interpolation filter and the
  // down-converter's channel filter: 33-tap Hamming-windowed sinc, cut-off
  // 1/8 of the sample rate, DC gain 1 (taps scaled by 2^15):
  // h[n] = 0.25 sinc(0.25 (n-16)) (0.54 - 0.46 cos(2 pi n / 32)), normalised.
  localparam int LP_TAPS = 33;
  localparam logic signed [15:0] LP_COEF [LP_TAPS] = '{
    16'sd0, -16'sd44, -16'sd86, -16'sd90, 16'sd0, 16'sd191, 16'sd381, 16'sd370,
    16'sd0, -16'sd665, -16'sd1248, -16'sd1176, 16'sd0, 16'sd2273, 16'sd5044,
    16'sd7327, 16'sd8211, 16'sd7327, 16'sd5044, 16'sd2273, 16'sd0, -16'sd1176,
    -16'sd1248, -16'sd665, 16'sd0, 16'sd370, 16'sd381, 16'sd191, 16'sd0,
    -16'sd90, -16'sd86, -16'sd44, 16'sd0};

  // ---- CORDIC ------------------------------------------------------------
  localparam int CORDIC_STAGES = 16;
  // atan(2^-i) in units of 2^-16 turn.
  localparam logic [15:0] CORDIC_ATAN [CORDIC_STAGES] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41, 16'd20, 16'd10, 16'd5, 16'd3, 16'd1, 16'd1, 16'd0};
  // 1/K of the 16-stage CORDIC, scaled by 2^15 (0.60725).
  localparam logic signed [16:0] CORDIC_INV_GAIN = 17'sd19898;

  // Saturate a wide signed value to a sample.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sd32767;
    else if (v < -48'sd32767) return -16'sd32767;
    else                      return sample_t'(v);
  endfunction

endpackage
