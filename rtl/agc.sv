// agc: automatic gain control ahead of the receive filter.
//
// The design description asks for a loop that holds the amplitude at the
// synchronisers steady, working on the 2-samples-per-symbol signal. Here
// out = in * gain, the detector is |I|+|Q| of the output, and the gain
// integrates the difference to the reference: acc += REF - (|I|+|Q|),
// gain = acc >>> MU_SHIFT in Q4.12 (1.0 = 4096, range 0 to 16). The
// detector, reference and loop step are this design's. REF is the mean
// |I|+|Q| of the transmit filter output for a unit-level link.
// Timing: one sample per `in_valid`, output registered one cycle later.
module agc
  import sdr_pkg::*;
#(
  parameter int REF      = 10160,
  parameter int MU_SHIFT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_sample,
  output cplx_t       out_sample,
  output logic        out_valid,
  output logic [15:0] gain
);
  localparam logic signed [31:0] ACC_ONE = 32'sd4096 <<< MU_SHIFT;
  localparam logic signed [31:0] ACC_MAX = (32'sd65535 <<< MU_SHIFT);
  logic signed [31:0] acc, acc_next;
  logic signed [47:0] pr, pi;
  sample_t            yr, yi;
  logic signed [17:0] det;

  assign gain = 16'(acc >>> MU_SHIFT);
  assign pr   = (48'(in_sample.re) * 48'(signed'({1'b0, gain}))) >>> 12;
  assign pi   = (48'(in_sample.im) * 48'(signed'({1'b0, gain}))) >>> 12;
  assign yr   = sat16(pr);
  assign yi   = sat16(pi);
  assign det  = (yr < 0 ? -18'(yr) : 18'(yr)) + (yi < 0 ? -18'(yi) : 18'(yi));

  always_comb begin
    acc_next = acc + 32'(REF) - 32'(det);
    if (acc_next < 0)        acc_next = '0;
    if (acc_next > ACC_MAX)  acc_next = ACC_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= ACC_ONE; out_sample <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sample.re <= yr;
        out_sample.im <= yi;
        acc           <= acc_next;
      end
    end
  end
endmodule
