// fir_filter: real low-pass FIR filter of the feedback receiver.
//
// After the quadrature mixers the I and Q streams hold the wanted baseband
// signal plus the mixing products at twice the IF; one of these filters per
// stream removes the latter. Direct form: y(n) = sum_k h_k x(n-k), k = 0..TAPS-1.
// Taps are 16-bit Q1.15 and programmable (coef_we/coef_addr/coef_data); at
// reset they take the values in DEFAULT_COEF, a 32-tap Hamming-windowed
// sinc low-pass with cutoff at a quarter of the sample rate, normalised to
// unity DC gain:
//   h_k = 0.5 sinc(0.5 (k - 15.5)) (0.54 - 0.46 cos(2 pi k / 31)) / sum, in Q1.15.
// It is flat within 0.05 dB up to 0.2 fs (a 90 MHz-wide band around DC at
// 245.76 MHz) and at least 43 dB down from 0.3 fs, where the image of that
// band lies when the IF is a quarter of the sample rate. clear empties the delay line so that every capture starts from rest.
// Timing: y(n) appears one clock after x(n) is presented with valid_in; the
// delay line moves only on valid_in.
// The document names an FIR filter here; its length, taps and format are
// this design's choices.
module fir_filter #(
  parameter int unsigned W    = 16,
  parameter int unsigned TAPS = 32,
  parameter logic signed [15:0] DEFAULT_COEF [32] = '{
    -16'sd38, -16'sd46, 16'sd64, 16'sd96, -16'sd143, -16'sd209, 16'sd296, 16'sd409,
    -16'sd555, -16'sd745, 16'sd998, 16'sd1349, -16'sd1877, -16'sd2786, 16'sd4823, 16'sd14747,
     16'sd14747, 16'sd4823, -16'sd2786, -16'sd1877, 16'sd1349, 16'sd998, -16'sd745, -16'sd555,
     16'sd409, 16'sd296, -16'sd209, -16'sd143, 16'sd96, 16'sd64, -16'sd46, -16'sd38}
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       clear,
  input  logic                       coef_we,
  input  logic [$clog2(TAPS)-1:0]    coef_addr,
  input  logic signed [15:0]         coef_data,
  input  logic                       valid_in,
  input  logic signed [W-1:0]        x_in,
  output logic                       valid_out,
  output logic signed [W-1:0]        y_out
);
  localparam int unsigned ACC_W = W + 16 + $clog2(TAPS) + 1;

  logic signed [15:0]  coef  [TAPS];
  logic signed [W-1:0] dline [TAPS];   // dline[k] = x(n-1-k)
  logic signed [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) coef[k] <= (k < 32) ? DEFAULT_COEF[k] : 16'sd0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  // Sum over the new sample and the stored history.
  always_comb begin
    acc = ACC_W'(x_in) * ACC_W'(coef[0]);
    for (int k = 1; k < TAPS; k++)
      acc += ACC_W'(dline[k-1]) * ACC_W'(coef[k]);
  end

  logic signed [ACC_W-1:0] acc_r;
  assign acc_r = (acc + ACC_W'(1 <<< 14)) >>> 15;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int k = 0; k < TAPS; k++) dline[k] <= '0;
      valid_out <= 1'b0;
      y_out     <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        dline[0] <= x_in;
        for (int k = 1; k < TAPS; k++) dline[k] <= dline[k-1];
        if (acc_r > ACC_W'((1 <<< (W-1)) - 1))  y_out <= W'((1 <<< (W-1)) - 1);
        else if (acc_r < -ACC_W'(1 <<< (W-1)))  y_out <= W'(-(1 <<< (W-1)));
        else                                    y_out <= acc_r[W-1:0];
      end
    end
  end
endmodule
