// tb_sdr_top: end-to-end test of the radio at its default parameters.
//
// The transmitter's IF output is looped back to the receiver's A/D input
// through a channel model: a delay of CH_DELAY samples, a gain of 1/2 and a
// little uniform noise. The receiver's local oscillator is offset from the
// transmitter's by RX_FREQ_OFFSET (about 1 kHz at a 400 kHz sample rate)
// and by a phase of RX_PHASE_OFFSET, so the coarse frequency compensation,
// the carrier loop and the phase ambiguity resolution all have work to do.
// Checked: every decoded message equals "Hello world ###" with ### counting
// on by one from message to message; no bit errors in the counted text;
// at least MIN_FRAMES frames decoded. Each mechanism (AGC gain change,
// coarse estimate away from zero, preamble detection, frame lock, a
// timing skip or stuff, a non-zero ambiguity rotation) must have happened at least once.
// Three runs from reset: the second turns the receiver LO by a further
// quarter turn, so the ambiguity resolution sees another rotation; the third
// resamples the transmitter's output with an A/D clock 0.2% slower than the
// DAC's (windowed-sinc interpolation in the channel model), a steady timing
// drift that the symbol synchroniser must follow by stuffing symbols.
// All parameters of the radio are at their defaults.
module tb_sdr_top;
  import sdr_pkg::*;

  localparam int CH_DELAY        = 37;
  localparam int RX_FREQ_OFFSET  = 10737418;   // 2^32 * 1 kHz / 400 kHz
  localparam int RX_PHASE_OFFSET = 16384;    // a quarter turn; the second run adds another
  localparam int MIN_FRAMES      = 3;
  localparam int MAX_CYCLES      = 5 * 8 * FRAME_SYMS + 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  sample_t dac_out, adc_in;
  logic    dac_valid;
  cplx_t   tx_sym, rx_sym;
  logic    tx_sym_valid, tx_frame_start, rx_sym_valid;
  logic [6:0]  rx_char;
  logic        rx_char_valid, rx_rot_valid, rx_locked, rx_preamble_det;
  logic        rx_timing_skip, rx_timing_stuff;
  logic [31:0] rx_bit_errors, rx_bits_checked, rx_frames;
  logic [1:0]  rx_rot;
  logic [15:0] rx_agc_gain;
  logic signed [31:0] rx_coarse_freq;
  logic        adc_valid;
  logic [15:0] rx_phase = 16'(RX_PHASE_OFFSET);

  sdr_top dut (
    .clk, .rst_n,
    .dac_tick(1'b1), .tx_lo_freq(32'h4000_0000), .tx_lo_phase(16'd0),
    .dac_out, .dac_valid, .tx_sym, .tx_sym_valid, .tx_frame_start,
    .adc_valid, .adc_in,
    .rx_lo_freq(32'h4000_0000 + 32'(RX_FREQ_OFFSET)), .rx_lo_phase(rx_phase),
    .rx_char, .rx_char_valid, .rx_bit_errors, .rx_bits_checked, .rx_frames,
    .rx_rot, .rx_rot_valid, .rx_locked, .rx_preamble_det, .rx_agc_gain,
    .rx_coarse_freq, .rx_timing_skip, .rx_timing_stuff, .rx_sym, .rx_sym_valid
  );

  // channel: delay, gain 1/2, noise of +/-256
  sample_t chan [CH_DELAY];
  logic    chan_v [CH_DELAY];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < CH_DELAY; k++) begin chan[k] <= '0; chan_v[k] <= 1'b0; end
    end else begin
      chan[0]   <= sample_t'((dac_out >>> 1) + $signed(16'($urandom_range(0, 512))) - 16'sd256);
      chan_v[0] <= dac_valid;
      for (int k = 1; k < CH_DELAY; k++) begin chan[k] <= chan[k-1]; chan_v[k] <= chan_v[k-1]; end
    end
  end
  // Drifting channel for the third run: the A/D converter samples the
  // transmitter's output (gain 1/2) at times t = t0 + m*(1 + DRIFT) DAC
  // samples, a sample clock DRIFT slower than the DAC's. Each value is a
  // 16-tap Hann-windowed sinc interpolation of the DAC stream, 9 samples
  // behind the newest one.
  localparam real DRIFT = 0.002;
  localparam real PI    = 3.14159265358979;
  logic    drift_on = 1'b0;
  real     hist [64];
  int      n_in;
  real     t_adc;
  sample_t rs_sample;
  logic    rs_valid;
  always @(posedge clk) begin
    if (!rst_n) begin
      n_in = 0; t_adc = 16.0; rs_valid <= 1'b0; rs_sample <= '0;
      for (int k = 0; k < 64; k++) hist[k] = 0.0;
    end else begin
      hist[n_in % 64] = $itor(dac_out) / 2.0;
      n_in++;
      rs_valid <= 1'b0;
      if (t_adc + 9.0 <= $itor(n_in - 1)) begin
        int  i0;
        real acc, d, w;
        i0  = $rtoi($floor(t_adc));
        acc = 0.0;
        for (int k = i0 - 7; k <= i0 + 8; k++) begin
          d = t_adc - $itor(k);
          if (d == 0.0) w = 1.0;
          else          w = $sin(PI * d) / (PI * d) * 0.5 * (1.0 + $cos(PI * d / 8.0));
          acc += hist[k % 64] * w;
        end
        rs_sample <= sample_t'($rtoi(acc) + $urandom_range(0, 512) - 256);
        rs_valid  <= 1'b1;
        t_adc += 1.0 + DRIFT;
      end
    end
  end

  assign adc_in    = drift_on ? rs_sample : chan[CH_DELAY-1];
  assign adc_valid = drift_on ? rs_valid  : chan_v[CH_DELAY-1];

  int checks = 0, failures = 0;
  logic [31:0] err_f1 = 0, chk_f1 = 0;   // totals after the first frame, when the loops are still settling
  always @(posedge clk) if (rx_frames == 1 && chk_f1 == 0) begin err_f1 = rx_bit_errors; chk_f1 = rx_bits_checked; end
  int cycles = 0;
  int n_det = 0, n_lock = 0, n_rot_nonzero = 0, n_skip = 0, n_stuff = 0, n_chars = 0, n_msgs = 0;
  logic agc_moved = 1'b0, coarse_moved = 1'b0;
  logic [6:0] msg [MSG_CHARS];
  int ci = 0, last_num = -1, bad_msgs = 0;
  int skip0 = 0, stuff0 = 0;   // timing events before the drifting run

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (rx_preamble_det) n_det++;
    if (rx_timing_skip)  n_skip++;
    if (rx_timing_stuff) n_stuff++;
    if (rx_agc_gain != 16'd4096) agc_moved = 1'b1;
    if (rx_coarse_freq > 32'sd1000000 || rx_coarse_freq < -32'sd1000000) coarse_moved = 1'b1;
    if (rx_rot_valid && rx_rot != 0) n_rot_nonzero++;
    if (rx_locked) n_lock++;
    if (rx_frames > 0 && rx_char_valid) begin
      // characters of frames after the first complete one
      msg[ci] = rx_char;
      n_chars++;
      if (ci == MSG_CHARS - 1) begin
        int num;
        logic ok;
        num = (int'(msg[13]) - 48) * 10 + (int'(msg[14]) - 48);
        ok = 1'b1;
        for (int k = 0; k < MSG_CHARS; k++)
          if (msg[k] != msg_char(k, (num < 0 || num > 99) ? 0 : num)) ok = 1'b0;
        if (last_num >= 0 && num != (last_num + 1) % 100) ok = 1'b0;
        checks++;
        if (!ok) begin
          failures++;
          if (bad_msgs < 12) begin
            string s;
            s = "";
            for (int k = 0; k < MSG_CHARS; k++) s = {s, string'(8'(msg[k]))};
            $display("bad message '%s' (previous number %0d) frame %0d cycle %0d", s, last_num, rx_frames, cycles);
          end
          bad_msgs++;
        end
        last_num = num;
        n_msgs++;
        ci = 0;
      end else ci++;
    end
  end

  // Characters are only collected from a frame start: realign after frame 1.
  always @(posedge clk) if (rx_frames == 1 && dut.u_rx.u_dec.in_valid && dut.u_rx.u_dec.in_idx == 0) ci = 0;

  // Three runs from reset (see the top of the file): plain, LO turned by a
  // further quarter turn, drifting A/D clock.
  initial begin
    for (int run = 0; run < 3; run++) begin
      rst_n = 1'b0;
      rx_phase = 16'(RX_PHASE_OFFSET + (run == 1 ? 16384 : 0));
      drift_on = (run == 2);
      if (run == 2) begin skip0 = n_skip; stuff0 = n_stuff; end
      repeat (5) @(posedge clk);
      ci = 0; last_num = -1; err_f1 = 0; chk_f1 = 0; cycles = 0; n_msgs = 0;
      rst_n = 1'b1;
      wait (rx_frames >= MIN_FRAMES + 1 || cycles >= MAX_CYCLES);
      repeat (20) @(posedge clk);
      checks++; if (rx_frames < MIN_FRAMES + 1) begin failures++; $display("only %0d frames", rx_frames); end
      checks++; if (rx_bits_checked - chk_f1 == 0 || rx_bit_errors != err_f1) begin
        failures++; $display("bit errors %0d of %0d after the first frame", rx_bit_errors - err_f1, rx_bits_checked - chk_f1);
      end
      checks++; if (n_msgs < 20 * MIN_FRAMES) begin failures++; $display("only %0d messages", n_msgs); end
      $display("run %0d: frames=%0d msgs=%0d bits=%0d errors=%0d (first frame %0d) rot=%0d agc=%0d coarse=%0d cycles=%0d",
               run, rx_frames, n_msgs, rx_bits_checked, rx_bit_errors, err_f1, rx_rot, rx_agc_gain, rx_coarse_freq, cycles);
    end
    checks++; if (!agc_moved)       begin failures++; $display("AGC never moved"); end
    checks++; if (!coarse_moved)    begin failures++; $display("coarse frequency estimate never moved"); end
    checks++; if (n_det == 0)       begin failures++; $display("no preamble detected"); end
    checks++; if (n_lock == 0)      begin failures++; $display("never locked"); end
    checks++; if (n_skip + n_stuff == 0) begin failures++; $display("timing loop never skipped or stuffed"); end
    // A sample clock 0.2% slow loses one input per 500: about 20 stuffs
    // over the run's ~10700 baseband samples, and no skips.
    $display("drifting run: skip=%0d stuff=%0d", n_skip - skip0, n_stuff - stuff0);
    checks++; if (n_stuff - stuff0 < 10 || n_skip - skip0 > n_stuff - stuff0) begin
      failures++; $display("timing loop did not follow the sample clock drift");
    end
    checks++; if (n_rot_nonzero == 0) begin failures++; $display("no phase ambiguity resolved"); end
    $display("mechanisms: det=%0d locked-cycles=%0d rot!=0:%0d skip=%0d stuff=%0d", n_det, n_lock, n_rot_nonzero, n_skip, n_stuff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (3 * MAX_CYCLES + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
