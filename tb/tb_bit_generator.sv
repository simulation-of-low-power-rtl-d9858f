// tb_bit_generator: requests two frames of bits and checks the frame
// layout: the 26 header bits are the Barker-13 code with every bit doubled,
// the payload descrambled by a reference model spells 20 messages
// "Hello world ###" whose numbers run on from 000 across frames, and
// frame_start marks every 2126th bit.
module tb_bit_generator;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic req, b, bv, fs;
  logic [6:0] num;
  int checks = 0, failures = 0;

  bit_generator dut (.clk, .rst_n, .bit_req(req), .bit_out(b), .bit_valid(bv), .frame_start(fs), .msg_num(num));

  localparam string TEXT = "Hello world ";
  localparam logic [12:0] BK = 13'b1111100110101;

  initial begin
    int msgno;
    logic [3:0] sr;
    req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    msgno = 0;
    for (int f = 0; f < 2; f++) begin
      logic [6:0] ch;
      int bi, ci;
      sr = '0; bi = 0; ci = 0; ch = 0;
      for (int n = 0; n < 2126; n++) begin
        logic d;
        @(negedge clk); req = 1;
        @(negedge clk); req = 0;
        checks++; if (!bv) failures++;
        checks++; if (fs !== (n == 0)) failures++;
        if (n < 26) begin
          checks++; if (b !== BK[12 - n/2]) failures++;
        end else begin
          d = b ^ sr[0] ^ sr[1] ^ sr[3];
          sr = {sr[2:0], b};
          ch = {ch[5:0], d};
          bi++;
          if (bi == 7) begin
            byte e;
            if (ci < 12)       e = TEXT[ci];
            else if (ci == 12) e = "0";
            else if (ci == 13) e = byte'(48 + (msgno / 10) % 10);
            else               e = byte'(48 + msgno % 10);
            checks++;
            if (ch !== e[6:0]) begin
              failures++;
              if (failures < 5) $display("frame %0d char %0d: got %h want %h", f, ci, ch, e);
            end
            bi = 0; ci++;
            if (ci == 15) begin ci = 0; msgno = (msgno + 1) % 100; end
          end
        end
      end
    end
    checks++; if (msgno != 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
