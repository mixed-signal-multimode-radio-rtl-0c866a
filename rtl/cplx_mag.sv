// cplx_mag: envelope |x| = sqrt(I^2 + Q^2) of a complex sample.
//
// The polynomial predistorters need the magnitude of each input sample.
// Stage 1 registers the power I^2 + Q^2 (unsigned Q2.30). Stage 2 takes its
// integer square root, bit by bit from the most significant result bit
// (restoring method, 16 trial subtractions), and registers the 16-bit
// unsigned Q1.15 result floor(sqrt(power)). The complex sample is carried
// along so that x_out and mag_out belong together.
// Timing: two clocks from x_in to mag_out, one sample per clock.
// The document uses |x| as an input of the polynomial structure but does not
// say how it is computed; the square-root method is this design's choice.
module cplx_mag
  import radio_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                valid_in,
  input  sample_t             x_in,
  output logic                valid_out,
  output sample_t             x_out,
  output logic [SAMPLE_W-1:0] mag_out
);
  logic [31:0] power;
  sample_t     x_d;
  logic        v_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      power <= '0;
      x_d   <= '0;
      v_d   <= 1'b0;
    end else begin
      power <= 32'(x_in.re * x_in.re) + 32'(x_in.im * x_in.im);
      x_d   <= x_in;
      v_d   <= valid_in;
    end
  end

  function automatic logic [15:0] isqrt32(input logic [31:0] v);
    logic [15:0] root;
    logic [31:0] trial;
    root = '0;
    for (int b = 15; b >= 0; b--) begin
      trial = 32'(root | 16'(32'd1 << b));
      if (trial * trial <= v) root = root | 16'(32'd1 << b);
    end
    return root;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      mag_out   <= '0;
      x_out     <= '0;
      valid_out <= 1'b0;
    end else begin
      mag_out   <= isqrt32(power);
      x_out     <= x_d;
      valid_out <= v_d;
    end
  end
endmodule
