// tb_coarse_freq_comp: feeds random QPSK points turning at a fixed
// frequency offset (several offsets, both signs) and checks that the
// estimate settles within 2% of the offset, and that the output's
// remaining rotation (measured on its fourth power) is below 3% of the
// offset.
module tb_coarse_freq_comp;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, ov, ev;
  cplx_t x, y;
  logic signed [31:0] f;
  int checks = 0, failures = 0;

  coarse_freq_comp dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .out_sample(y), .out_valid(ov),
                        .freq_est(f), .est_valid(ev));

  initial begin
    real pi, offs [3];
    pi = 3.141592653589793;
    offs[0] = 0.01; offs[1] = -0.023; offs[2] = 0.004;
    iv = 0; x = '0;
    for (int t = 0; t < 3; t++) begin
      real sum_re, sum_im, prev_re, prev_im, resid;
      rst_n = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      sum_re = 0; sum_im = 0; prev_re = 0; prev_im = 0;
      for (int n = 0; n < 8192; n++) begin
        real th, z_re, z_im, r4;
        @(negedge clk);
        iv = 1;
        th = 2.0 * pi * (offs[t] * n + 0.125 + 0.25 * $urandom_range(0, 3));
        x.re = sample_t'($rtoi(11585.0 * $cos(th)));
        x.im = sample_t'($rtoi(11585.0 * $sin(th)));
        @(negedge clk);
        iv = 0;
        if (n > 6144) begin
          // angle of y^4 and its change
          th = $atan2(real'(y.im), real'(y.re)) * 4.0;
          z_re = $cos(th); z_im = $sin(th);
          sum_re += z_re * prev_re + z_im * prev_im;
          sum_im += z_im * prev_re - z_re * prev_im;
          prev_re = z_re; prev_im = z_im;
        end else if (n == 6144) begin
          th = $atan2(real'(y.im), real'(y.re)) * 4.0;
          prev_re = $cos(th); prev_im = $sin(th);
        end
      end
      checks++;
      if (real'(f) / 4294967296.0 > offs[t] + 0.02 * (offs[t] < 0 ? -offs[t] : offs[t]) ||
          real'(f) / 4294967296.0 < offs[t] - 0.02 * (offs[t] < 0 ? -offs[t] : offs[t])) begin
        failures++; $display("offset %f: estimate %f", offs[t], real'(f) / 4294967296.0);
      end
      resid = $atan2(sum_im, sum_re) / (2.0 * pi) / 4.0;
      checks++;
      if ((resid < 0 ? -resid : resid) > 0.03 * (offs[t] < 0 ? -offs[t] : offs[t])) begin
        failures++; $display("offset %f: residual %f", offs[t], resid);
      end
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
