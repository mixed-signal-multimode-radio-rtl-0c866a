// sine_table: registered sine/cosine look-up ROM shared by the NCO and DDS.
//
// Holds one full period of a sine wave, 2^ADDR_W entries of OUT_W-bit
// signed samples scaled to +/-(2^(OUT_W-1)-1): entry k = round(A*sin(2*pi*k/2^ADDR_W)).
// The contents are computed at elaboration from that formula. Two read ports
// return sin(phase) and cos(phase) = sin(phase + quarter period) one clock
// after the phase is presented.
module sine_table #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned OUT_W  = 16
) (
  input  logic                    clk,
  input  logic [ADDR_W-1:0]       phase,
  output logic signed [OUT_W-1:0] sin_out,
  output logic signed [OUT_W-1:0] cos_out
);
  localparam int unsigned DEPTH   = 2**ADDR_W;
  localparam real         AMPL    = real'(2**(OUT_W-1) - 1);
  localparam real         TWO_PI  = 6.283185307179586;

  logic signed [OUT_W-1:0] rom [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++)
      rom[k] = OUT_W'($rtoi($floor(AMPL * $sin(TWO_PI * real'(k) / real'(DEPTH)) + 0.5)));
  end

  logic [ADDR_W-1:0] cos_phase;
  assign cos_phase = phase + ADDR_W'(DEPTH / 4);

  always_ff @(posedge clk) begin
    sin_out <= rom[phase];
    cos_out <= rom[cos_phase];
  end
endmodule
