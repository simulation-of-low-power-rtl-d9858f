// tb_frame_synchronizer: with a 40-symbol frame, streams numbered symbols
// and drives `det` by hand: a first detection (starts a frame), one a frame
// later (locks), a stray one inside a locked frame (ignored), a missing one
// (frame still completes, lock drops) and a stray one while unlocked
// (restarts). Checks every output index, that index 0 carries the symbol 12
// places before the detection, `frame_valid` and `locked`.
module tb_frame_synchronizer;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, det, ov, fv, lk;
  cplx_t x, y;
  logic [15:0] idx;
  int checks = 0, failures = 0;

  localparam int FL = 40;
  frame_synchronizer #(.FRAME_LEN(FL)) dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .det,
                                            .out_sample(y), .out_valid(ov), .out_idx(idx),
                                            .frame_valid(fv), .locked(lk));

  // detections at symbol numbers: 100 (starts a frame), 140 (one frame later:
  // locks), 160 (stray inside a locked frame: ignored), none at 180 (that
  // frame still completes, the lock drops), 225 (while unlocked: restarts)
  function automatic logic det_at(int n);
    return n == 100 || n == 140 || n == 160 || n == 225;
  endfunction

  initial begin
    int start, nfv, exp_idx;
    logic active;
    iv = 0; det = 0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    start = -1; nfv = 0; active = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      iv = 1; det = det_at(n);
      x.re = sample_t'(n); x.im = -sample_t'(n);
      @(negedge clk);
      iv = 0; det = 0;
      // reference: which frame (if any) is emitting at this symbol
      if (n > 100 && n <= 140)       begin active = 1; exp_idx = n - 101; end
      else if (n > 140 && n <= 180)  begin active = 1; exp_idx = n - 141; end
      else if (n > 225 && n <= 265)  begin active = 1; exp_idx = n - 226; end
      else active = 0;
      checks++;
      if (ov !== active) begin failures++; $display("n %0d: out_valid %0d", n, ov); end
      if (active) begin
        checks++;
        if (idx != 16'(exp_idx) || y.re != sample_t'(n - 13) || y.im != -sample_t'(n - 13)) begin
          failures++; $display("n %0d: idx %0d sym %0d want idx %0d sym %0d", n, idx, y.re, exp_idx, n - 13);
        end
      end
      checks++;
      if (fv !== (n == 140 || n == 180 || n == 265)) begin failures++; $display("n %0d: frame_valid %0d", n, fv); end
      checks++;
      if (lk !== (n >= 140 && n < 180)) begin failures++; $display("n %0d: locked %0d", n, lk); end
      if (fv) nfv++;
    end
    checks++; if (nfv != 3) failures++;
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
