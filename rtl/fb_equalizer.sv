// fb_equalizer: complex FIR that post-distorts the feedback receiver output.
//
// The calibration of the platform measures the amplitude ripple of the
// feedback receiver (about +/-1.3 dB) separately from that of the transmitter
// and corrects it with an FIR filter on the received I/Q waveform. This block
// is that filter: z_out(n) = sum_k h_k z(n-k) with complex samples and
// complex taps. The taps come from the host (the ripple is solved in
// software) through tap_we/tap_addr/tap_data; tap format is Q3.15 (18 bits,
// as the LUT gains) so that gains above one can be applied. At reset tap 0
// is 1.0 and all others 0, a pass-through. clear empties the delay line.
// Timing: output one clock after input; the delay line moves on valid_in.
// The document gives the purpose (an FIR correction of the receiver
// response); the length, format and placement after the low-pass filters
// are this design's choices.
module fb_equalizer
  import radio_pkg::*;
#(
  parameter int unsigned TAPS = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clear,
  input  logic                    tap_we,
  input  logic [$clog2(TAPS)-1:0] tap_addr,
  input  gain_t                   tap_data,
  input  logic                    valid_in,
  input  sample_t                 z_in,
  output logic                    valid_out,
  output sample_t                 z_out
);
  localparam int unsigned ACC_W = SAMPLE_W + GAIN_W + $clog2(TAPS) + 2;

  gain_t   tap   [TAPS];
  sample_t dline [TAPS];     // dline[k] = z(n-1-k)
  logic signed [ACC_W-1:0] acc_re, acc_im, r_re, r_im;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) tap[k] <= '0;
      tap[0].re <= GAIN_W'(1 <<< GAIN_F);
    end else if (tap_we) begin
      tap[tap_addr] <= tap_data;
    end
  end

  always_comb begin
    acc_re = ACC_W'(z_in.re) * ACC_W'(tap[0].re) - ACC_W'(z_in.im) * ACC_W'(tap[0].im);
    acc_im = ACC_W'(z_in.re) * ACC_W'(tap[0].im) + ACC_W'(z_in.im) * ACC_W'(tap[0].re);
    for (int k = 1; k < TAPS; k++) begin
      acc_re += ACC_W'(dline[k-1].re) * ACC_W'(tap[k].re) - ACC_W'(dline[k-1].im) * ACC_W'(tap[k].im);
      acc_im += ACC_W'(dline[k-1].re) * ACC_W'(tap[k].im) + ACC_W'(dline[k-1].im) * ACC_W'(tap[k].re);
    end
  end

  assign r_re = (acc_re + ACC_W'(1 <<< (GAIN_F-1))) >>> GAIN_F;
  assign r_im = (acc_im + ACC_W'(1 <<< (GAIN_F-1))) >>> GAIN_F;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int k = 0; k < TAPS; k++) dline[k] <= '0;
      valid_out <= 1'b0;
      z_out     <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        dline[0] <= z_in;
        for (int k = 1; k < TAPS; k++) dline[k] <= dline[k-1];
        z_out.re <= sat16(64'(r_re));
        z_out.im <= sat16(64'(r_im));
      end
    end
  end
endmodule
