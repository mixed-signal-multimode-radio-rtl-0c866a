// iq_mixer: digital quadrature demodulator of the feedback receiver.
//
// Multiplies each real IF sample from the ADC by the NCO cosine and sine:
//   I = if * cos,  Q = -if * sin
// which moves a carrier at the NCO frequency to zero frequency; the sum
// products at twice the IF are removed by the following FIR filters.
// Formats: if_in is ADC_W-bit two's complement (full scale = 1), cos/sin and
// the outputs are 16-bit Q1.15; outputs are rounded and saturated.
// Timing: one register, outputs valid one clock after the inputs.
// The two multipliers come from the document; the sign convention on Q,
// the rounding and the ADC number format are this design's choices.
module iq_mixer #(
  parameter int unsigned ADC_W = 12,
  parameter int unsigned W     = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                valid_in,
  input  logic signed [ADC_W-1:0] if_in,
  input  logic signed [W-1:0] cos_in,
  input  logic signed [W-1:0] sin_in,
  output logic                valid_out,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);
  // if (Q1.(ADC_W-1)) * lo (Q1.(W-1)) -> Q2.(ADC_W+W-2); shift back to Q1.(W-1).
  localparam int unsigned SH = ADC_W - 1;
  localparam int unsigned PW = ADC_W + W;

  logic signed [PW-1:0] pi, pq;
  logic signed [PW:0]   ri, rq;

  assign pi = if_in * cos_in;
  assign pq = -(if_in * sin_in);
  assign ri = (PW+1)'(pi) + (PW+1)'(1 <<< (SH-1));
  assign rq = (PW+1)'(pq) + (PW+1)'(1 <<< (SH-1));

  function automatic logic signed [W-1:0] sat(input logic signed [PW:0] v);
    logic signed [PW:0] s;
    s = v >>> SH;
    if (s > (PW+1)'((1 <<< (W-1)) - 1))  return W'((1 <<< (W-1)) - 1);
    if (s < -(PW+1)'(1 <<< (W-1)))       return W'(-(1 <<< (W-1)));
    return s[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_out <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      valid_out <= valid_in;
      i_out     <= sat(ri);
      q_out     <= sat(rq);
    end
  end
endmodule
