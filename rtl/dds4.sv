// dds4: four-channel direct digital synthesizer of the phase-coherent
// frequency synthesizer.
//
// The synthesizer feeds two analog quadrature (Hartley) modulators with a
// cosine/sine pair each: channels 0/1 carry cos(f1)/sin(f1) for the upper
// side band output f0+f1, channels 2/3 carry sin(f2)/cos(f2) for the lower
// side band output f0-f2. All four channels run from one clock and one
// synchronisation pulse (sync clears every phase accumulator in the same
// cycle), so their outputs are phase coherent. Each channel has its own
// frequency tuning word, a phase offset and an amplitude word: the fine
// phase and magnitude trims that set the side band suppression.
//
// Per channel: acc += ftw every clock; table phase = acc[top] + phase_off,
// both at the table's 12-bit resolution (the two low offset bits are
// dropped, so phase trims move in steps of 360/4096 degrees);
// out = sin(table phase) * amp / 2^AMP_W, truncated to OUT_W bits.
// Timing: two clocks from the accumulator to the output.
// Channel count and roles follow the document; the word widths (32-bit
// frequency, 14-bit phase, 10-bit amplitude and output) are this design's
// choice, typical of four-channel DDS parts.
module dds4 #(
  parameter int unsigned CH      = 4,
  parameter int unsigned PHASE_W = 32,
  parameter int unsigned POFF_W  = 14,
  parameter int unsigned AMP_W   = 10,
  parameter int unsigned OUT_W   = 10,
  parameter int unsigned TABLE_AW = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    sync,
  input  logic [PHASE_W-1:0]      ftw       [CH],
  input  logic [POFF_W-1:0]       phase_off [CH],
  input  logic [AMP_W-1:0]        amp       [CH],
  output logic signed [OUT_W-1:0] dds_out   [CH]
);
  localparam int unsigned SIN_W = 16;

  for (genvar c = 0; c < CH; c++) begin : g_ch
    logic [PHASE_W-1:0]      acc;
    logic [TABLE_AW-1:0]     tphase;
    logic signed [SIN_W-1:0] s, unused_cos;
    logic signed [SIN_W+AMP_W:0] scaled;

    always_ff @(posedge clk) begin
      if (rst || sync) acc <= '0;
      else             acc <= acc + ftw[c];
    end

    // Phase offset aligned to the top bits of the accumulator.
    assign tphase = acc[PHASE_W-1 -: TABLE_AW] + TABLE_AW'({phase_off[c], {TABLE_AW{1'b0}}} >> POFF_W);

    sine_table #(.ADDR_W(TABLE_AW), .OUT_W(SIN_W)) u_table (
      .clk(clk), .phase(tphase), .sin_out(s), .cos_out(unused_cos)
    );

    assign scaled = s * $signed({1'b0, amp[c]});

    always_ff @(posedge clk) begin
      if (rst) dds_out[c] <= '0;
      else     dds_out[c] <= OUT_W'(scaled >>> (SIN_W + AMP_W - OUT_W));
    end
  end
endmodule
