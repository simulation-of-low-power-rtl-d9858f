// scrambler: self-synchronising (multiplicative) scrambler or descrambler
// for the frame payload, polynomial 1 + z^-1 + z^-2 + z^-4.
//
// The payload is scrambled so that the receiver's clock recovery sees an
// even mix of ones and zeros; that much is the design description's. The
// polynomial and the reset of the 4-bit register at every frame start
// (`init`) are this design's choices.
// Scrambler   : y[n] = x[n] ^ y[n-1] ^ y[n-2] ^ y[n-4]  (register holds y)
// Descrambler : x[n] = y[n] ^ y[n-1] ^ y[n-2] ^ y[n-4]  (register holds y)
// Interface: one bit per cycle with `in_valid`; the output is combinational
// (same cycle). `init` clears the register and may coincide with a bit,
// which is then the first bit after the clear.
module scrambler #(
  parameter bit DESCRAMBLE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_bit
);
  logic [3:0] sr;      // sr[0] = y[n-1] ... sr[3] = y[n-4]
  logic [3:0] sr_use;
  logic       fb;
  logic       line_bit; // the scrambled bit, whichever side we are on

  assign sr_use   = init ? 4'b0 : sr;
  assign fb       = sr_use[0] ^ sr_use[1] ^ sr_use[3];
  assign out_bit  = in_bit ^ fb;
  assign line_bit = DESCRAMBLE ? in_bit : out_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sr <= '0;
    else if (in_valid)  sr <= {sr_use[2:0], line_bit};
    else if (init)      sr <= '0;
  end
endmodule
