// tb_agc: feeds QPSK-like samples of constant |I|+|Q| at two levels and
// checks that the gain settles to REF/(|I|+|Q|) and the output level to REF
// (within 1%), that the output is in*gain, and the one-cycle latency.
module tb_agc;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, ov;
  cplx_t x, y;
  logic [15:0] g;
  int checks = 0, failures = 0;

  agc dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .out_sample(y), .out_valid(ov), .gain(g));

  initial begin
    iv = 0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      int L;
      L = (t == 0) ? 3000 : 9000;
      for (int n = 0; n < 3000; n++) begin
        logic [15:0] g_before;
        @(negedge clk);
        iv = 1;
        x.re = $urandom_range(0, 1) ? sample_t'(L) : -sample_t'(L);
        x.im = $urandom_range(0, 1) ? sample_t'(L) : -sample_t'(L);
        g_before = g;
        @(negedge clk);
        iv = 0;
        checks++;
        if (!ov) failures++;
        checks++;
        if (y.re != sample_t'((32'(x.re) * 32'(g_before)) >>> 12)) failures++;
        if (n == 2999) begin
          real want_g, lvl;
          want_g = 10160.0 / (2.0 * L) * 4096.0;
          lvl = real'((y.re < 0 ? -y.re : y.re) + (y.im < 0 ? -y.im : y.im));
          checks++;
          if (real'(g) > want_g * 1.01 || real'(g) < want_g * 0.99) begin
            failures++; $display("level %0d: gain %0d want %f", L, g, want_g);
          end
          checks++;
          if (lvl > 10160.0 * 1.01 || lvl < 10160.0 * 0.99) begin
            failures++; $display("level %0d: output %f", L, lvl);
          end
        end
      end
    end
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
