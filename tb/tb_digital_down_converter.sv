// tb_digital_down_converter: feeds a real IF tone a*cos(w n + phi) at the
// LO frequency and checks that the baseband output settles to
// a*e^{j(phi - lo_phase)} (within 1.5% of full scale), with one output per
// 4 inputs.
module tb_digital_down_converter;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, ov;
  sample_t x;
  cplx_t y;
  logic [31:0] fw;
  logic [15:0] po;
  int checks = 0, failures = 0;
  int nout;
  real a, phi, pi;

  digital_down_converter dut (.clk, .rst_n, .in_valid(iv), .if_in(x),
                              .freq_word(fw), .phase_offset(po), .out_sample(y), .out_valid(ov));

  always @(posedge clk) begin
    if (!rst_n) nout <= 0;
    else if (ov) begin
      real wr, wi, th;
      th = phi - 2.0 * pi * real'(po) / 65536.0;
      wr = a * $cos(th); wi = a * $sin(th);
      if (nout > 12) begin
        checks++;
        if (real'(y.re) - wr > 500.0 || wr - real'(y.re) > 500.0 ||
            real'(y.im) - wi > 500.0 || wi - real'(y.im) > 500.0) begin
          failures++; if (failures < 5) $display("out %0d: %0d %0d want %f %f", nout, y.re, y.im, wr, wi);
        end
      end
      nout <= nout + 1;
    end
  end

  initial begin
    pi = 3.141592653589793;
    iv = 0; x = '0;
    for (int t = 0; t < 2; t++) begin
      fw  = (t == 0) ? 32'h4000_0000 : 32'h2000_0000;
      po  = (t == 0) ? 16'd0 : 16'd9000;
      a   = (t == 0) ? 12000.0 : 20000.0;
      phi = (t == 0) ? 0.7 : -2.0;
      rst_n = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        iv = 1;
        x = sample_t'($rtoi(a * $cos(2.0 * pi * real'(fw) / 4294967296.0 * n + phi)));
        @(negedge clk); iv = 0;
      end
      repeat (5) @(posedge clk);
      checks++; if (nout != 100) begin failures++; $display("%0d outputs for 400 inputs", nout); end
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
