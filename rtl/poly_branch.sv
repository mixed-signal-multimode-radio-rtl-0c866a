// poly_branch: one complete memoryless polynomial in ratio/Horner form.
//
//   y = a1 * x * (1 + (a2/a1)|x| (1 + (a3/a2)|x| ( ... (1 + (aN/aN-1)|x|))))
//
// ORDER-1 poly_stage blocks are chained from the innermost ratio aN/aN-1
// (whose s_in is the constant 1) down to a2/a1; a final block multiplies x by
// a1 and then by the chain result. The chain is pipelined one register per
// stage, so |x| and x are delayed inside the branch to meet the stage that
// uses them.
// Coefficients: coef[0] = a1, coef[k] = a(k+1)/a(k) for k = 1..ORDER-1, all
// complex Q8.16. Output y is complex Q8.16 (not yet scaled for the DAC).
// Timing: y_out belongs to the x/mag presented ORDER clocks earlier.
module poly_branch
  import radio_pkg::*;
#(
  parameter int unsigned ORDER = 9
) (
  input  logic                clk,
  input  logic                rst,
  input  coef_t               coef [ORDER],
  input  sample_t             x_in,
  input  logic [SAMPLE_W-1:0] mag_in,
  output coef_t               y_out
);
  localparam int unsigned NS = ORDER - 1;   // number of common blocks
  localparam coef_t ONE = '{re: COEF_W'(1 <<< COEF_F), im: '0};

  // Delay lines: mag_d[k] and x_d[k] are the inputs delayed by k clocks.
  logic [SAMPLE_W-1:0] mag_d [ORDER];
  sample_t             x_d   [ORDER];
  assign mag_d[0] = mag_in;
  assign x_d[0]   = x_in;
  for (genvar k = 1; k < ORDER; k++) begin : g_dly
    always_ff @(posedge clk) begin
      if (rst) begin
        mag_d[k] <= '0;
        x_d[k]   <= '0;
      end else begin
        mag_d[k] <= mag_d[k-1];
        x_d[k]   <= x_d[k-1];
      end
    end
  end

  // s[k] is the output of chain stage k-1; s[0] is the constant one.
  coef_t s [NS+1];
  assign s[0] = ONE;
  for (genvar k = 0; k < NS; k++) begin : g_stage
    poly_stage u_stage (
      .clk   (clk),
      .rst   (rst),
      .ratio (coef[ORDER-1-k]),
      .mag   (mag_d[k]),
      .s_in  (s[k]),
      .s_out (s[k+1])
    );
  end

  // Final block: t = a1 * x (Q8.16), y = t * s.
  sample_t xf;
  coef_t   sf;
  assign xf = x_d[NS];
  assign sf = s[NS];

  logic signed [COEF_W+SAMPLE_W:0] t_re_w, t_im_w;
  logic signed [COEF_W-1:0]        t_re, t_im;
  assign t_re_w = ((COEF_W+SAMPLE_W+1)'(coef[0].re) * (COEF_W+SAMPLE_W+1)'(xf.re)
                 - (COEF_W+SAMPLE_W+1)'(coef[0].im) * (COEF_W+SAMPLE_W+1)'(xf.im)
                 + (COEF_W+SAMPLE_W+1)'(1 <<< (SAMPLE_F-1))) >>> SAMPLE_F;
  assign t_im_w = ((COEF_W+SAMPLE_W+1)'(coef[0].re) * (COEF_W+SAMPLE_W+1)'(xf.im)
                 + (COEF_W+SAMPLE_W+1)'(coef[0].im) * (COEF_W+SAMPLE_W+1)'(xf.re)
                 + (COEF_W+SAMPLE_W+1)'(1 <<< (SAMPLE_F-1))) >>> SAMPLE_F;
  assign t_re = sat24(64'(t_re_w));
  assign t_im = sat24(64'(t_im_w));

  logic signed [2*COEF_W:0] y_re_w, y_im_w;
  assign y_re_w = ((2*COEF_W+1)'(t_re) * (2*COEF_W+1)'(sf.re) - (2*COEF_W+1)'(t_im) * (2*COEF_W+1)'(sf.im)
                  + (2*COEF_W+1)'(1 <<< (COEF_F-1))) >>> COEF_F;
  assign y_im_w = ((2*COEF_W+1)'(t_re) * (2*COEF_W+1)'(sf.im) + (2*COEF_W+1)'(t_im) * (2*COEF_W+1)'(sf.re)
                  + (2*COEF_W+1)'(1 <<< (COEF_F-1))) >>> COEF_F;

  always_ff @(posedge clk) begin
    if (rst) begin
      y_out <= '0;
    end else begin
      y_out.re <= sat24(64'(y_re_w));
      y_out.im <= sat24(64'(y_im_w));
    end
  end

  initial assert (ORDER >= 2) else $error("poly_branch: ORDER must be at least 2");
endmodule
