// frame_synchronizer: cuts the symbol stream into frames that start at the
// header found by the preamble detector.
//
// As in the design description, the detector's position turns the variable
// symbol stream into fixed-size frames, and a second output says whether a
// frame is valid. Symbols pass through a 13-deep delay so that a frame
// starts with its first header symbol (index 0) although detection happens
// on the last. The lock rule is this design's: unlocked, every detection
// (re)starts a frame; a detection exactly FRAME_SYMS symbols after the
// previous one (at the last symbol of a frame) locks, and while locked,
// detections inside a frame are ignored; a frame end without a detection
// drops the lock. `frame_valid` pulses with the last symbol of a frame that
// ran its full length.
// Timing: one symbol per `in_valid` with its `det`; outputs registered.
module frame_synchronizer
  import sdr_pkg::*;
#(
  parameter int FRAME_LEN = FRAME_SYMS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_sample,
  input  logic        det,
  output cplx_t       out_sample,
  output logic        out_valid,
  output logic [15:0] out_idx,
  output logic        frame_valid,
  output logic        locked
);
  cplx_t dl [BARKER_LEN];
  logic        in_frame;
  logic [15:0] idx;
  logic        last;

  assign last = in_frame && 32'(idx) == FRAME_LEN - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < BARKER_LEN; k++) dl[k] <= '0;
      in_frame <= 1'b0; idx <= '0; locked <= 1'b0;
      out_sample <= '0; out_valid <= 1'b0; out_idx <= '0; frame_valid <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      frame_valid <= 1'b0;
      if (in_valid) begin
        dl[0] <= in_sample;
        for (int k = 1; k < BARKER_LEN; k++) dl[k] <= dl[k-1];
        if (in_frame) begin
          out_sample <= dl[BARKER_LEN-1];
          out_idx    <= idx;
          out_valid  <= 1'b1;
          idx        <= idx + 1'b1;
        end
        if (last) begin
          frame_valid <= 1'b1;
          locked      <= det;
          in_frame    <= det;
          idx         <= '0;
        end else if (det && !locked) begin
          in_frame <= 1'b1;
          idx      <= '0;
        end
      end
    end
  end
endmodule
