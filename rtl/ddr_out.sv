// ddr_out: double-data-rate conversion for the dual DAC.
//
// The dual DAC takes its two channels over one 16-bit bus in DDR mode: the
// I component is presented while the clock is high and the Q component
// while the clock is low. On each rising edge this block registers the
// I and Q samples of the cycle (i_reg, q_reg), re-registers Q on the falling
// edge (q_neg), and drives the pad bus from i_reg during the high phase and
// from q_neg during the low phase, the structure of a vendor DDR output
// register. Latency: a sample pair presented before rising edge n is on the
// bus as I in the high phase after edge n and as Q in the following low
// phase. valid_out marks the pairs that were presented with valid_in.
// The high/low assignment follows the document; the register structure is
// this design's choice.
module ddr_out #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             valid_in,
  input  logic [WIDTH-1:0] i_in,
  input  logic [WIDTH-1:0] q_in,
  output logic [WIDTH-1:0] dac_data,
  output logic             valid_out
);
  logic [WIDTH-1:0] i_reg, q_reg, q_neg;

  always_ff @(posedge clk) begin
    if (rst) begin
      i_reg     <= '0;
      q_reg     <= '0;
      valid_out <= 1'b0;
    end else begin
      i_reg     <= valid_in ? i_in : '0;
      q_reg     <= valid_in ? q_in : '0;
      valid_out <= valid_in;
    end
  end

  always_ff @(negedge clk) begin
    if (rst) q_neg <= '0;
    else     q_neg <= q_reg;
  end

  // Output multiplexer selected by the clock level.
  assign dac_data = clk ? i_reg : q_neg;
endmodule
