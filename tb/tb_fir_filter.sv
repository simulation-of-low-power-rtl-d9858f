// tb_fir_filter: checks the root-raised-cosine filter: its impulse
// response, its response to random complex input against a reference
// convolution, the one-cycle latency, and that the taps are symmetric and
// have unit energy (sum of squares 2^30 within quantisation).
module tb_fir_filter;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, ov;
  cplx_t x, y;
  int checks = 0, failures = 0;

  fir_filter dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .out_sample(y), .out_valid(ov));

  // reference taps: rrc(t) for roll-off 0.5 at t = (n-10)/2, normalised
  real h [21];
  function automatic real rrc(real t);
    real b, pi;
    b = 0.5; pi = 3.141592653589793;
    if (t == 0.0) return 1.0 - b + 4.0 * b / pi;
    if (t == 0.5 || t == -0.5)
      return b / $sqrt(2.0) * ((1 + 2 / pi) * $sin(pi / (4 * b)) + (1 - 2 / pi) * $cos(pi / (4 * b)));
    return ($sin(pi * t * (1 - b)) + 4 * b * t * $cos(pi * t * (1 + b))) / (pi * t * (1 - (4 * b * t) ** 2));
  endfunction

  cplx_t hist [$];
  initial begin
    real e = 0.0;
    for (int n = 0; n < 21; n++) begin h[n] = rrc((n - 10) / 2.0); e += h[n] ** 2; end
    for (int n = 0; n < 21; n++) h[n] = h[n] / $sqrt(e);
    iv = 0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // impulse
    for (int n = 0; n < 25; n++) begin
      @(negedge clk); iv = 1; x.re = (n == 0) ? 16'sd32767 : 16'sd0; x.im = (n == 0) ? -16'sd32767 : 16'sd0;
      @(negedge clk); iv = 0;
      checks++; if (!ov) failures++;
      if (n < 21) begin
        real want;
        want = h[n] * 32767.0;
        checks++;
        if (int'(y.re) > $rtoi(want) + 2 || int'(y.re) < $rtoi(want) - 2 || int'(y.im) + int'(y.re) > 1 || int'(y.im) + int'(y.re) < -1) begin
          failures++; $display("tap %0d: %0d want %f", n, y.re, want);
        end
      end else begin
        checks++; if (y.re != 0 || y.im != 0) failures++;
      end
    end
    // random input
    for (int n = 0; n < 300; n++) begin
      real wr, wi;
      wr = 0.0; wi = 0.0;
      @(negedge clk); iv = 1; x.re = 16'($urandom_range(0, 20000)) - 16'sd10000; x.im = 16'($urandom_range(0, 20000)) - 16'sd10000;
      hist.push_front(x);
      if (hist.size() > 21) void'(hist.pop_back());
      for (int k = 0; k < hist.size(); k++) begin wr += h[k] * hist[k].re; wi += h[k] * hist[k].im; end
      @(negedge clk); iv = 0;
      if (n >= 21) begin
        checks++;
        if ((y.re - wr) > 8.0 || (wr - y.re) > 8.0 || (y.im - wi) > 8.0 || (wi - y.im) > 8.0) begin
          failures++; if (failures < 5) $display("n %0d: %0d %0d want %f %f", n, y.re, y.im, wr, wi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
