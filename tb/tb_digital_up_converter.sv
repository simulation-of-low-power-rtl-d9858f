// tb_digital_up_converter: feeds constant baseband values at one sample per
// 4 ticks and checks the real IF output against I*cos(theta) - Q*sin(theta)
// computed from the LO's phase, for two LO frequencies and a phase offset
// (tolerance 1.5% of full scale after the filter has filled), and one
// output per tick.
module tb_digital_up_converter;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tick, iv, ov;
  cplx_t x;
  sample_t y;
  logic [31:0] fw;
  logic [15:0] po;
  int checks = 0, failures = 0;

  digital_up_converter dut (.clk, .rst_n, .tick, .in_valid(iv), .in_sample(x),
                            .freq_word(fw), .phase_offset(po), .if_out(y), .out_valid(ov));

  int k;        // output index
  int ticks;
  always @(posedge clk) begin
    if (!rst_n) k <= 0;
    else if (ov) begin
      real th, want;
      longint acc;
      acc = (longint'(k) * longint'(fw)) % (64'd1 << 32);
      th = 2.0 * 3.141592653589793 * (real'(acc[31:16]) + real'(po)) / 65536.0;
      want = real'(x.re) * $cos(th) - real'(x.im) * $sin(th);
      if (k > 40) begin
        checks++;
        if (real'(y) - want > 500.0 || want - real'(y) > 500.0) begin
          failures++; if (failures < 5) $display("k %0d: %0d want %f", k, y, want);
        end
      end
      k <= k + 1;
    end
  end

  initial begin
    tick = 0; iv = 0; x = '0; fw = 0; po = 0;
    for (int t = 0; t < 2; t++) begin
      fw = (t == 0) ? 32'h4000_0000 : 32'h1234_5678;
      po = (t == 0) ? 16'd0 : 16'd7000;
      x.re = (t == 0) ? 16'sd12000 : -16'sd5000;
      x.im = (t == 0) ? -16'sd7000 : 16'sd9000;
      rst_n = 0; ticks = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      for (int n = 0; n < 400; n++) begin
        @(negedge clk); tick = 1; iv = (n % 4 == 0);
        ticks++;
      end
      @(negedge clk); tick = 0; iv = 0;
      repeat (3) @(posedge clk);
      checks++; if (k != ticks) begin failures++; $display("%0d outputs for %0d ticks", k, ticks); end
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
