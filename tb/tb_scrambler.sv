// tb_scrambler: checks the scrambler and descrambler against a reference
// model of y[n] = x[n] ^ y[n-1] ^ y[n-2] ^ y[n-4] and checks that the
// descrambler restores the original bits, including after a re-init.
module tb_scrambler;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic init, v, x, y, z;
  int checks = 0, failures = 0;

  scrambler #(.DESCRAMBLE(1'b0)) u_s (.clk, .rst_n, .init, .in_valid(v), .in_bit(x), .out_bit(y));
  scrambler #(.DESCRAMBLE(1'b1)) u_d (.clk, .rst_n, .init, .in_valid(v), .in_bit(y), .out_bit(z));

  logic [3:0] ref_sr;
  initial begin
    init = 0; v = 0; x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      ref_sr = '0;
      for (int n = 0; n < 200; n++) begin
        logic yr;
        @(negedge clk);
        init = (n == 0);
        v = 1;
        x = 1'($urandom);
        #1;
        yr = x ^ ref_sr[0] ^ ref_sr[1] ^ ref_sr[3];
        checks++; if (y !== yr) failures++;
        checks++; if (z !== x) failures++;
        ref_sr = {ref_sr[2:0], yr};
      end
      @(negedge clk); v = 0; init = 0;
      repeat (3) @(posedge clk);
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
