// poly_dpd: memoryless polynomial digital predistorter.
//
//   y(n) = alpha * a1 x(n) (1 + (a2/a1)|x(n)| (1 + ... (1 + (aN/aN-1)|x(n)|)))
//
// which equals alpha * sum_i a_i x(n)|x(n)|^(i-1), rewritten so that no more
// than two multiplications are chained per stage and the coefficients,
// replaced by ratios of neighbours, span a small range. |x| comes from
// cplx_mag, the nested form from poly_branch, and a last stage scales by
// alpha (Q3.15) and rounds and saturates to the 16-bit Q1.15 DAC format.
// Coefficients live in a register file written by the host:
// coef_addr 0 = a1, coef_addr k = a(k+1)/a(k); data packed {re, im}, Q8.16 each.
// Reset loads a1 = 1 and all ratios 0, so an unprogrammed block passes
// alpha * x.
// Timing: one sample per clock; y_out appears ORDER + 3 clocks after x_in.
module poly_dpd
  import radio_pkg::*;
#(
  parameter int unsigned ORDER = 9
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       coef_we,
  input  logic [$clog2(ORDER)-1:0]   coef_addr,
  input  coef_t                      coef_wdata,
  input  logic signed [ALPHA_W-1:0]  alpha,
  input  logic                       valid_in,
  input  sample_t                    x_in,
  output logic                       valid_out,
  output sample_t                    y_out
);
  localparam int unsigned LAT = ORDER + 3;

  coef_t coef [ORDER];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < ORDER; k++) coef[k] <= '0;
      coef[0].re <= COEF_W'(1 <<< COEF_F);
    end else if (coef_we && coef_addr < ORDER) begin
      coef[coef_addr] <= coef_wdata;
    end
  end

  sample_t             xm;
  logic [SAMPLE_W-1:0] mag;
  logic                vm;
  cplx_mag u_mag (
    .clk(clk), .rst(rst), .valid_in(valid_in), .x_in(x_in),
    .valid_out(vm), .x_out(xm), .mag_out(mag)
  );

  coef_t yb;
  poly_branch #(.ORDER(ORDER)) u_branch (
    .clk(clk), .rst(rst), .coef(coef), .x_in(xm), .mag_in(mag), .y_out(yb)
  );

  // Output scaling: Q8.16 * Q3.15 -> Q1.15 (shift by 16).
  logic signed [COEF_W+ALPHA_W-1:0] o_re, o_im;
  assign o_re = (COEF_W+ALPHA_W)'(yb.re) * (COEF_W+ALPHA_W)'(alpha) + (COEF_W+ALPHA_W)'(1 <<< (COEF_F-1));
  assign o_im = (COEF_W+ALPHA_W)'(yb.im) * (COEF_W+ALPHA_W)'(alpha) + (COEF_W+ALPHA_W)'(1 <<< (COEF_F-1));

  logic [LAT-1:0] v;
  always_ff @(posedge clk) begin
    if (rst) begin
      y_out <= '0;
      v     <= '0;
    end else begin
      y_out.re <= sat16(64'(o_re >>> COEF_F));
      y_out.im <= sat16(64'(o_im >>> COEF_F));
      v        <= {v[LAT-2:0], valid_in};
    end
  end
  assign valid_out = v[LAT-1];

  logic unused;
  assign unused = vm;
endmodule
