// poly_stage: the replicated "common block" of the memoryless polynomial.
//
// The predistorter evaluates its polynomial in nested (Horner) form with the
// coefficients replaced by ratios of adjacent coefficients, so every stage
// does the same thing:
//   s_out = 1 + r * |x| * s_in
// with r = a_k / a_(k-1) a complex ratio, |x| the real input envelope and
// s_in the complex result of the stage above (the top stage gets s_in = 1).
// The order of operations follows the block: |x| times r, that product times
// s_in, then plus one. Every product is rounded back to Q8.16 and saturated,
// which keeps each stage at two chained multiplications.
// Formats: r, s_in, s_out are Q8.16 complex (24+24 bits); mag is unsigned
// Q1.15. Timing: one register, s_out one clock after the inputs.
module poly_stage
  import radio_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  coef_t               ratio,
  input  logic [SAMPLE_W-1:0] mag,
  input  coef_t               s_in,
  output coef_t               s_out
);
  // p = r * |x| : Q8.16 * Q1.15 -> Q8.16 after a rounded 15-bit shift.
  logic signed [COEF_W+SAMPLE_W:0]   p_re_w, p_im_w;
  logic signed [COEF_W-1:0]          p_re, p_im;
  assign p_re_w = ((COEF_W+SAMPLE_W+1)'(ratio.re) * $signed({1'b0, mag})
                   + (COEF_W+SAMPLE_W+1)'(1 <<< (SAMPLE_F-1))) >>> SAMPLE_F;
  assign p_im_w = ((COEF_W+SAMPLE_W+1)'(ratio.im) * $signed({1'b0, mag})
                   + (COEF_W+SAMPLE_W+1)'(1 <<< (SAMPLE_F-1))) >>> SAMPLE_F;
  assign p_re = sat24(64'(p_re_w));
  assign p_im = sat24(64'(p_im_w));

  // q = p * s_in : complex Q8.16 * Q8.16 -> Q8.16.
  logic signed [2*COEF_W:0] q_re_w, q_im_w;
  assign q_re_w = ((2*COEF_W+1)'(p_re) * (2*COEF_W+1)'(s_in.re) - (2*COEF_W+1)'(p_im) * (2*COEF_W+1)'(s_in.im)
                   + (2*COEF_W+1)'(1 <<< (COEF_F-1))) >>> COEF_F;
  assign q_im_w = ((2*COEF_W+1)'(p_re) * (2*COEF_W+1)'(s_in.im) + (2*COEF_W+1)'(p_im) * (2*COEF_W+1)'(s_in.re)
                   + (2*COEF_W+1)'(1 <<< (COEF_F-1))) >>> COEF_F;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_out <= '0;
    end else begin
      s_out.re <= sat24(64'(q_re_w) + 64'(1 <<< COEF_F));
      s_out.im <= sat24(64'(q_im_w));
    end
  end
endmodule
