// bit_generator: produces the transmit bit stream, frame after frame.
//
// Each frame is the 26-bit header (Barker-13, every bit repeated so that the
// header becomes 13 QPSK symbols) followed by 20 messages "Hello world ###"
// in 7-bit ASCII, ### being a sequence number 000..099 that wraps. Header
// and message layout are as the design description gives them; the payload
// (not the header) goes through the scrambler, restarted at each frame.
// Interface: pulse `bit_req` for one bit; the bit appears on `bit_out` with
// `bit_valid` in the next cycle, `frame_start` marking the first header bit.
// `msg_num` is the sequence number of the message being sent.
module bit_generator
  import sdr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_req,
  output logic       bit_out,
  output logic       bit_valid,
  output logic       frame_start,
  output logic [6:0] msg_num
);
  logic [$clog2(FRAME_BITS)-1:0] pos;     // bit position in the frame
  logic [2:0]                    bi;      // bit within character, 0 = MSB
  logic [3:0]                    ci;      // character within message
  logic [6:0]                    num;     // message sequence number
  logic                          in_hdr;
  logic                          hdr_bit, raw_bit, scr_bit;
  logic [6:0]                    ch;

  assign in_hdr  = 32'(pos) < HEADER_BITS;
  assign hdr_bit = BARKER13[BARKER_LEN-1 - 32'(pos >> 1)];
  assign ch      = msg_char(32'(ci), 32'(num));
  assign raw_bit = ch[3'd6 - bi];

  scrambler #(.DESCRAMBLE(1'b0)) u_scr (
    .clk, .rst_n,
    .init    (bit_req && 32'(pos) == HEADER_BITS),
    .in_valid(bit_req && !in_hdr),
    .in_bit  (raw_bit),
    .out_bit (scr_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; bi <= '0; ci <= '0; num <= '0;
      bit_out <= 1'b0; bit_valid <= 1'b0; frame_start <= 1'b0;
    end else begin
      bit_valid   <= bit_req;
      frame_start <= bit_req && pos == 0;
      if (bit_req) begin
        bit_out <= in_hdr ? hdr_bit : scr_bit;
        if (32'(pos) == FRAME_BITS - 1) pos <= '0;
        else                       pos <= pos + 1'b1;
        if (!in_hdr) begin
          if (32'(bi) == CHAR_BITS - 1) begin
            bi <= '0;
            if (32'(ci) == MSG_CHARS - 1) begin
              ci  <= '0;
              num <= (32'(num) == MSG_COUNT_MOD - 1) ? '0 : num + 1'b1;
            end else ci <= ci + 1'b1;
          end else bi <= bi + 1'b1;
        end
      end
    end
  end

  assign msg_num = num;
endmodule
