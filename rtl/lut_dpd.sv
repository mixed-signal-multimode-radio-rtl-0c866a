// lut_dpd: gain-based look-up-table digital predistorter.
//
// The table holds one complex gain G per input power level. For each input
// sample x = xI + j xQ:
//   1. power p = xI^2 + xQ^2 (Q2.30); its 16 most significant bits p[31:16]
//      index the 2^16-entry table (step 2^-15 of full-scale power);
//   2. the entry G = GI + j GQ (18-bit Q3.15 each) is read;
//   3. x*G is formed at full precision (35 bits, Q5.30) and only its 18 most
//      significant bits are kept (Q5.13);
//   4. the result is multiplied by the normalisation factor alpha
//      (alpha = 1/|G(peak power)|, computed by the host) and rounded and
//      saturated to the 16-bit Q1.15 DAC format.
// Table entries are written by the host through lut_we/lut_waddr/lut_wdata;
// the table is a simple dual-port RAM.
// Timing: one sample per clock, y_out four clocks after x_in.
// The power index, the 18-bit entry format with two integer bits, the 2^16
// table size, the 18-MSB truncation and the alpha normalisation follow the
// document; the choice of which 16 power bits form the index, the rounding
// of the final step and the pipeline are this design's.
module lut_dpd
  import radio_pkg::*;
#(
  parameter int unsigned AW = LUT_AW
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       lut_we,
  input  logic [AW-1:0]              lut_waddr,
  input  gain_t                      lut_wdata,
  input  logic signed [ALPHA_W-1:0]  alpha,
  input  logic                       valid_in,
  input  sample_t                    x_in,
  output logic                       valid_out,
  output sample_t                    y_out
);
  // Stage 1: power and table address.
  logic [31:0] power;
  sample_t     x1, x2;
  logic [3:0]  v;
  gain_t       g;

  always_ff @(posedge clk) begin
    if (rst) begin
      power <= '0;
      x1    <= '0;
      x2    <= '0;
    end else begin
      power <= 32'(x_in.re * x_in.re) + 32'(x_in.im * x_in.im);
      x1    <= x_in;
      x2    <= x1;
    end
  end

  // Stage 2: table read (registered RAM output).
  sample_ram #(.WIDTH(2*GAIN_W), .ADDR_W(AW)) u_lut (
    .clk   (clk),
    .we    (lut_we),
    .waddr (lut_waddr),
    .wdata (lut_wdata),
    .raddr (power[31 -: AW]),
    .rdata (g)
  );

  // Stage 3: complex gain multiply, keep the 18 MSBs of the 35-bit result.
  localparam int unsigned PW = SAMPLE_W + GAIN_W + 1;   // 35
  logic signed [PW-1:0] m_re, m_im;
  logic signed [GAIN_W-1:0] k_re, k_im;
  assign m_re = PW'(x2.re) * PW'(g.re) - PW'(x2.im) * PW'(g.im);
  assign m_im = PW'(x2.re) * PW'(g.im) + PW'(x2.im) * PW'(g.re);

  always_ff @(posedge clk) begin
    if (rst) begin
      k_re <= '0;
      k_im <= '0;
    end else begin
      k_re <= m_re[PW-1 -: GAIN_W];
      k_im <= m_im[PW-1 -: GAIN_W];
    end
  end

  // Stage 4: normalisation by alpha. Q5.13 * Q3.15 = Q8.28 -> Q1.15.
  localparam int unsigned SH = (GAIN_F + SAMPLE_F - (PW - GAIN_W)) + ALPHA_F - SAMPLE_F; // 13
  logic signed [GAIN_W+ALPHA_W-1:0] n_re, n_im;
  assign n_re = (GAIN_W+ALPHA_W)'(k_re) * (GAIN_W+ALPHA_W)'(alpha) + (GAIN_W+ALPHA_W)'(1 <<< (SH-1));
  assign n_im = (GAIN_W+ALPHA_W)'(k_im) * (GAIN_W+ALPHA_W)'(alpha) + (GAIN_W+ALPHA_W)'(1 <<< (SH-1));

  always_ff @(posedge clk) begin
    if (rst) begin
      y_out <= '0;
      v     <= '0;
    end else begin
      y_out.re <= sat16(64'(n_re >>> SH));
      y_out.im <= sat16(64'(n_im >>> SH));
      v        <= {v[2:0], valid_in};
    end
  end
  assign valid_out = v[3];
endmodule
