// tb_nco: runs the local oscillator at several frequency words and phase
// offsets and compares cos/sin with real-valued references (error below
// 0.2% of full scale), and checks that it holds still without ticks.
module tb_nco;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tick;
  logic [31:0] fw;
  logic [15:0] po;
  cplx_t lo;
  int checks = 0, failures = 0;

  nco dut (.clk, .rst_n, .tick, .freq_word(fw), .phase_offset(po), .lo);

  initial begin
    real pi = 3.141592653589793;
    tick = 0; fw = 0; po = 0;
    for (int t = 0; t < 3; t++) begin
      longint acc;
      acc = 0;
      fw = (t == 0) ? 32'h4000_0000 : (t == 1) ? 32'd123456789 : 32'hF000_0000;
      po = (t == 2) ? 16'd5000 : 16'd0;
      rst_n = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      for (int n = 0; n < 300; n++) begin
        real ph, wc, ws;
        @(negedge clk);
        ph = 2.0 * pi * (real'(acc[31:16]) + real'(po)) / 65536.0;
        wc = 32767.0 * $cos(ph); ws = 32767.0 * $sin(ph);
        checks++;
        if (lo.re - wc > 70.0 || wc - lo.re > 70.0 || lo.im - ws > 70.0 || ws - lo.im > 70.0) begin
          failures++; if (failures < 5) $display("t%0d n%0d: %0d %0d want %f %f", t, n, lo.re, lo.im, wc, ws);
        end
        tick = (n % 3 != 2);
        if (tick) acc = (acc + 64'(fw)) % (64'd1 << 32);
      end
      tick = 0;
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
