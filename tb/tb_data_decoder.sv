// tb_data_decoder: builds frames the way the transmitter does (header
// symbols, then the 20 messages scrambled and QPSK-mapped, all with a
// reference model written here), turns each frame by a different quarter
// turn, adds noise and feeds them with their frame indices. Checks the
// detected rotation, every decoded character, that the counted text bits
// are error-free (84 per message), and that a frame with corrupted symbols
// in the text raises the error count.
module tb_data_decoder;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, fv, rv, cv;
  cplx_t x;
  logic [15:0] idx;
  logic [1:0] rot;
  logic [6:0] ch;
  logic [31:0] errs, chk, frames;
  int checks = 0, failures = 0;

  data_decoder dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .in_idx(idx), .frame_valid(fv),
                    .rot, .rot_valid(rv), .char_out(ch), .char_valid(cv),
                    .bit_errors(errs), .bits_checked(chk), .frames);

  localparam string TEXT = "Hello world ";
  localparam logic [12:0] BK = 13'b1111100110101;

  logic [6:0] exp_chars [$];
  int msgno = 0;
  logic ignore_chars = 1'b0;
  always @(posedge clk) if (cv && !ignore_chars) begin
    checks++;
    if (exp_chars.size() == 0 || ch != exp_chars[0]) begin
      failures++; if (failures < 6) $display("char %h want %h", ch, exp_chars.size() ? exp_chars[0] : 7'h0);
    end
    if (exp_chars.size()) void'(exp_chars.pop_front());
  end

  function automatic logic [6:0] text_char(int ci, int num);
    byte e;
    if (ci < 12)       e = TEXT[ci];
    else if (ci == 12) e = "0";
    else if (ci == 13) e = byte'(48 + (num / 10) % 10);
    else               e = byte'(48 + num % 10);
    return e[6:0];
  endfunction

  task automatic send_frame(input int r, input int corrupt);
    logic bits [2126];
    logic [3:0] sr;
    int p;
    for (int n = 0; n < 26; n++) bits[n] = BK[12 - n / 2];
    sr = '0; p = 26;
    for (int m = 0; m < 20; m++) begin
      for (int c = 0; c < 15; c++) begin
        logic [6:0] tc;
        tc = text_char(c, msgno);
        if (!corrupt) exp_chars.push_back(tc);
        for (int b = 6; b >= 0; b--) begin
          logic y;
          y = tc[b] ^ sr[0] ^ sr[1] ^ sr[3];
          sr = {sr[2:0], y};
          bits[p++] = y;
        end
      end
      msgno = (msgno + 1) % 100;
    end
    for (int k = 0; k < 1063; k++) begin
      real a, b, c, d;
      a = bits[2*k+1] ? -8192.0 : 8192.0;   // I from the second bit
      b = bits[2*k]   ? -8192.0 : 8192.0;   // Q from the first bit
      if (corrupt && (k == 20 || k == 300)) begin a = -a; end
      case (r)
        0: begin c = a;  d = b;  end
        1: begin c = -b; d = a;  end
        2: begin c = -a; d = -b; end
        default: begin c = b; d = -a; end
      endcase
      @(negedge clk);
      iv = 1; idx = 16'(k);
      x.re = sample_t'($rtoi(c)) + sample_t'($urandom_range(0, 3000)) - 16'sd1500;
      x.im = sample_t'($rtoi(d)) + sample_t'($urandom_range(0, 3000)) - 16'sd1500;
      fv = (k == 1062);
      @(negedge clk);
      iv = 0; fv = 0;
      if (k == 12) begin
        checks++;
        if (!rv || rot != 2'(r)) begin failures++; $display("rotation %0d found %0d (valid %0d)", r, rot, rv); end
      end
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    iv = 0; fv = 0; x = '0; idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) send_frame(f, 0);
    checks++; if (frames != 4) failures++;
    checks++; if (chk != 4 * 20 * 84) begin failures++; $display("checked %0d bits", chk); end
    checks++; if (errs != 0) begin failures++; $display("%0d bit errors", errs); end
    // a frame with two flipped symbols in the text: its characters are not checked here
    ignore_chars = 1'b1;
    send_frame(1, 1);
    repeat (3) @(negedge clk);
    checks++; if (errs == 0) begin failures++; $display("corrupted frame not counted"); end
    $display("errors after corrupted frame: %0d", errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
