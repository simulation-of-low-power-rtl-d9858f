// tb_qpsk_modulator: sends random bit pairs and checks the Gray mapping
// (first bit -> sign of Q, second bit -> sign of I), the amplitude, the
// one-cycle latency and that `align` restarts pairing.
module tb_qpsk_modulator;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic bv, bi, al, sv;
  cplx_t s;
  int checks = 0, failures = 0;

  qpsk_modulator dut (.clk, .rst_n, .bit_valid(bv), .bit_in(bi), .align(al), .sym(s), .sym_valid(sv));

  initial begin
    bv = 0; bi = 0; al = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a stray first bit, then align restarts the pairing
    @(negedge clk); bv = 1; bi = 1;
    @(negedge clk); bv = 0;
    for (int n = 0; n < 200; n++) begin
      logic b0, b1;
      b0 = 1'($urandom); b1 = 1'($urandom);
      @(negedge clk); bv = 1; bi = b0; al = (n == 0);
      @(negedge clk); bv = 1; bi = b1; al = 0;
      checks++; if (sv) failures++;
      @(negedge clk); bv = 0;
      checks++; if (!sv) failures++;
      checks++; if (s.re !== (b1 ? -16'sd8192 : 16'sd8192)) failures++;
      checks++; if (s.im !== (b0 ? -16'sd8192 : 16'sd8192)) failures++;
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
