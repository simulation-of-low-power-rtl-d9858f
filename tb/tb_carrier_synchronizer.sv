// tb_carrier_synchronizer: feeds random QPSK symbols (amplitude 8192 per
// component) turned by a phase offset and a small frequency offset and
// checks that, after the loop has settled, every output lies within 6
// degrees of a constellation point and that the decisions equal the sent
// symbols up to one fixed quarter-turn rotation (the ambiguity the data
// decoder removes).
module tb_carrier_synchronizer;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, ov;
  cplx_t x, y;
  logic [31:0] ph;
  logic signed [31:0] fr;
  int checks = 0, failures = 0;

  carrier_synchronizer dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .out_sample(y), .out_valid(ov),
                            .phase_est(ph), .freq_est(fr));

  initial begin
    real pi, fo [3], p0 [3];
    pi = 3.141592653589793;
    fo[0] = 0.0;   p0[0] = 0.3;
    fo[1] = 0.002; p0[1] = -1.0;
    fo[2] = -0.001; p0[2] = 2.5;
    iv = 0; x = '0;
    for (int t = 0; t < 3; t++) begin
      int rot, bad_ph, bad_dec;
      rst_n = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      rot = -1; bad_ph = 0; bad_dec = 0;
      for (int n = 0; n < 3000; n++) begin
        int q;
        real th, ang, dev;
        q = $urandom_range(0, 3);
        th = 2.0 * pi * (0.125 + 0.25 * q) + p0[t] + 2.0 * pi * fo[t] * n;
        @(negedge clk);
        iv = 1;
        x.re = sample_t'($rtoi(11585.0 * $cos(th)));
        x.im = sample_t'($rtoi(11585.0 * $sin(th)));
        @(negedge clk);
        iv = 0;
        if (n >= 1500) begin
          int dq, r;
          ang = $atan2(real'(y.im), real'(y.re)) / (2.0 * pi);   // turns
          if (ang < 0) ang += 1.0;
          dq = $rtoi((ang - 0.125 + 1.0 + 0.125) / 0.25) % 4;   // nearest point index
          dev = ang - (0.125 + 0.25 * dq);
          if (dev > 0.5) dev -= 1.0;
          if (dev < -0.5) dev += 1.0;
          if ((dev < 0 ? -dev : dev) > 6.0 / 360.0) bad_ph++;
          r = (dq - q + 4) % 4;
          if (rot < 0) rot = r;
          else if (r != rot) bad_dec++;
        end
      end
      checks++; if (bad_ph != 0)  begin failures++; $display("case %0d: %0d outputs off by > 6 degrees", t, bad_ph); end
      checks++; if (bad_dec != 0) begin failures++; $display("case %0d: %0d wrong decisions", t, bad_dec); end
    end
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
