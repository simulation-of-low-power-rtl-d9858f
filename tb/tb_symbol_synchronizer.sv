// tb_symbol_synchronizer: feeds a 2-samples-per-symbol signal built from
// random +/-A symbols shaped by raised-cosine pulses (roll-off 0.5), sampled with a timing
// offset and with the sample clock fast or slow by 0.3%. Checks that after
// settling at least 98% of the output symbols sit within 15% of +/-A on
// both components (only well-timed strobes do), that the symbol rate is
// one per two inputs (within the drift), and that a slow sample clock makes
// the loop stuff and a fast one makes it skip.
module tb_symbol_synchronizer;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, ov, sk, st;
  cplx_t x, y;
  int checks = 0, failures = 0;

  symbol_synchronizer dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .out_sample(y), .out_valid(ov),
                           .skip(sk), .stuff(st));

  localparam int NSYM = 4000;
  real dre [NSYM], dim [NSYM];

  // raised-cosine pulse, roll-off 0.5 (the shape after transmit and receive filters)
  function automatic real rc(input real t);
    real pi, den;
    pi = 3.141592653589793;
    if (t < 1e-9 && t > -1e-9) return 1.0;
    den = 1.0 - (2.0 * 0.5 * t) ** 2;
    if (den < 1e-9 && den > -1e-9) return 0.5 * $sin(pi * t) / (pi * t);  // limit at |t| = 1
    return $sin(pi * t) / (pi * t) * $cos(pi * 0.5 * t) / den;
  endfunction

  function automatic real sig(input real t, input int comp);
    int k0;
    real acc;
    k0 = $rtoi(t);
    acc = 0.0;
    for (int k = k0 - 8; k <= k0 + 9; k++)
      if (k >= 0 && k < NSYM) acc += (comp ? dim[k] : dre[k]) * rc(t - k);
    return acc;
  endfunction

  initial begin
    real rho [3], delta;
    rho[0] = 0.0; rho[1] = 0.003; rho[2] = -0.003;
    iv = 0; x = '0;
    for (int t = 0; t < 3; t++) begin
      int nout, good, n_sk, n_st, nin;
      for (int k = 0; k < NSYM; k++) begin
        dre[k] = $urandom_range(0, 1) ? 8192.0 : -8192.0;
        dim[k] = $urandom_range(0, 1) ? 8192.0 : -8192.0;
      end
      delta = 0.37;
      rst_n = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      nout = 0; good = 0; n_sk = 0; n_st = 0; nin = 0;
      for (int m = 0; ; m++) begin
        real tt;
        tt = delta + m * 0.5 * (1.0 + rho[t]);
        if (tt > NSYM - 3) break;
        @(negedge clk);
        iv = 1; nin++;
        x.re = sample_t'($rtoi(sig(tt, 0)));
        x.im = sample_t'($rtoi(sig(tt, 1)));
        @(negedge clk);
        iv = 0;
        if (sk) n_sk++;
        if (st) n_st++;
        if (ov) begin
          nout++;
          if (nout > 500) begin
            if ((y.re > 6963 || y.re < -6963) && (y.re < 9421 && y.re > -9421) &&
                (y.im > 6963 || y.im < -6963) && (y.im < 9421 && y.im > -9421)) good++;
          end
        end
      end
      checks++;
      if (good < (nout - 500) * 98 / 100) begin
        failures++; $display("rho %f: %0d of %0d symbols well timed", rho[t], good, nout - 500);
      end
      checks++;
      if (nout > nin / 2 + 20 + $rtoi(nin * 0.003) || nout < nin / 2 - 20 - $rtoi(nin * 0.003)) begin
        failures++; $display("rho %f: %0d symbols from %0d samples", rho[t], nout, nin);
      end
      if (t == 1) begin checks++; if (n_st == 0) begin failures++; $display("no stuff"); end end
      if (t == 2) begin checks++; if (n_sk == 0) begin failures++; $display("no skip"); end end
      $display("rho %f: good %0d of %0d, skip %0d stuff %0d", rho[t], good, nout - 500, n_sk, n_st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
