// nco: numerically controlled oscillator, the local oscillator of the
// digital quadrature demodulator in the feedback receiver.
//
// A PHASE_W-bit phase accumulator advances by the frequency tuning word ftw
// on every clock with en high (f_out = ftw * f_clk / 2^PHASE_W); its top
// TABLE_AW bits address a sine/cosine table. clear resets the phase to zero
// so that a capture is demodulated with a known starting phase.
// Timing: the cos/sin pair on the outputs in cycle n+1 belongs to the phase
// held in cycle n; the phase of the first enabled cycle after clear is 0.
// The document names the NCO and its cosine/sine outputs; the accumulator
// and table sizes are this design's choices.
module nco #(
  parameter int unsigned PHASE_W  = 32,
  parameter int unsigned TABLE_AW = 10,
  parameter int unsigned OUT_W    = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     en,
  input  logic [PHASE_W-1:0]       ftw,
  output logic signed [OUT_W-1:0]  cos_out,
  output logic signed [OUT_W-1:0]  sin_out
);
  logic [PHASE_W-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst || clear) phase <= '0;
    else if (en)      phase <= phase + ftw;
  end

  sine_table #(.ADDR_W(TABLE_AW), .OUT_W(OUT_W)) u_table (
    .clk     (clk),
    .phase   (phase[PHASE_W-1 -: TABLE_AW]),
    .sin_out (sin_out),
    .cos_out (cos_out)
  );
endmodule
