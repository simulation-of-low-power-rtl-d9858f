// tb_preamble_detector: streams random QPSK symbols with the 13-symbol
// header inserted every 100 symbols, turned by a different quarter turn each
// time and with some noise, and checks that `det` fires exactly with the
// last header symbol (delayed one cycle together with that symbol) and
// nowhere else.
module tb_preamble_detector;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, ov, det;
  cplx_t x, y;
  logic [47:0] metric;
  int checks = 0, failures = 0;

  preamble_detector dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .out_sample(y), .out_valid(ov),
                         .det, .metric);

  localparam logic [12:0] BK = 13'b1111100110101;

  initial begin
    int ndet;
    iv = 0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ndet = 0;
    for (int n = 0; n < 2000; n++) begin
      int pos, r;
      logic last;
      sample_t a, b, c, d;
      pos = n % 100;
      r = (n / 100) % 4;
      if (pos >= 40 && pos < 53) begin
        a = BK[12 - (pos - 40)] ? -16'sd8192 : 16'sd8192;
        b = a;
      end else begin
        a = $urandom_range(0, 1) ? 16'sd8192 : -16'sd8192;
        b = $urandom_range(0, 1) ? 16'sd8192 : -16'sd8192;
      end
      // turn (a + jb) by r quarter turns
      case (r)
        0: begin c = a;  d = b;  end
        1: begin c = -b; d = a;  end
        2: begin c = -a; d = -b; end
        default: begin c = b; d = -a; end
      endcase
      last = (pos == 52);
      @(negedge clk);
      iv = 1;
      x.re = c + sample_t'($urandom_range(0, 2000)) - 16'sd1000;
      x.im = d + sample_t'($urandom_range(0, 2000)) - 16'sd1000;
      @(negedge clk);
      iv = 0;
      checks++;
      if (!ov || y != x) failures++;
      if (n >= 13) begin
        checks++;
        if (det !== last) begin failures++; $display("symbol %0d: det %0d metric %0d", n, det, metric); end
      end
      if (det) ndet++;
    end
    checks++; if (ndet != 20) failures++;
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
