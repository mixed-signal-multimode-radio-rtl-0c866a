// mp_dpd: memory polynomial digital predistorter.
//
//   y(n) = alpha * sum_{j=0}^{DEPTH-1} sum_{i=1}^{ORDER} a_ij x(n-j)|x(n-j)|^(i-1)
//
// built from DEPTH copies of the memoryless polynomial branch. Branch 0 takes
// x(n); a chain of one-sample delay registers (z^-1) gives branches 1..DEPTH-1
// the samples x(n-1)..x(n-DEPTH+1) together with their magnitudes, so |x| is
// computed once. Each branch evaluates its own polynomial in ratio/Horner
// form; the branch outputs are summed (Q8.16 plus growth bits) and the sum is
// rescaled by alpha and rounded and saturated to the 16-bit Q1.15 DAC format.
// The delay line advances only on valid samples.
// Coefficients: coef_addr = j*ORDER + k, with k = 0 for a_1j and
// k = a(k+1)j / a(k)j otherwise; data packed {re, im}, Q8.16 each. Reset gives
// branch 0 a1 = 1 and everything else 0: y = alpha * x.
// Timing: one sample per clock; y_out appears ORDER + 4 clocks after x_in.
module mp_dpd
  import radio_pkg::*;
#(
  parameter int unsigned ORDER = 9,
  parameter int unsigned DEPTH = 5
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic                             coef_we,
  input  logic [$clog2(ORDER*DEPTH)-1:0]   coef_addr,
  input  coef_t                            coef_wdata,
  input  logic signed [ALPHA_W-1:0]        alpha,
  input  logic                             valid_in,
  input  sample_t                          x_in,
  output logic                             valid_out,
  output sample_t                          y_out
);
  localparam int unsigned LAT   = ORDER + 4;
  localparam int unsigned SUM_W = COEF_W + $clog2(DEPTH) + 1;

  coef_t coef [DEPTH][ORDER];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < DEPTH; j++)
        for (int k = 0; k < ORDER; k++) coef[j][k] <= '0;
      coef[0][0].re <= COEF_W'(1 <<< COEF_F);
    end else if (coef_we && coef_addr < ORDER*DEPTH) begin
      coef[coef_addr / ORDER][coef_addr % ORDER] <= coef_wdata;
    end
  end

  sample_t             xm;
  logic [SAMPLE_W-1:0] mag;
  logic                vm;
  cplx_mag u_mag (
    .clk(clk), .rst(rst), .valid_in(valid_in), .x_in(x_in),
    .valid_out(vm), .x_out(xm), .mag_out(mag)
  );

  // Memory taps: tap 0 is the current sample, tap j the j-th previous one.
  sample_t             x_tap   [DEPTH];
  logic [SAMPLE_W-1:0] mag_tap [DEPTH];
  assign x_tap[0]   = xm;
  assign mag_tap[0] = mag;
  for (genvar j = 1; j < DEPTH; j++) begin : g_z
    always_ff @(posedge clk) begin
      if (rst) begin
        x_tap[j]   <= '0;
        mag_tap[j] <= '0;
      end else if (vm) begin
        x_tap[j]   <= x_tap[j-1];
        mag_tap[j] <= mag_tap[j-1];
      end
    end
  end

  coef_t yb [DEPTH];
  for (genvar j = 0; j < DEPTH; j++) begin : g_br
    poly_branch #(.ORDER(ORDER)) u_branch (
      .clk(clk), .rst(rst), .coef(coef[j]), .x_in(x_tap[j]), .mag_in(mag_tap[j]), .y_out(yb[j])
    );
  end

  // Sum of the branches, registered.
  logic signed [SUM_W-1:0] sum_re, sum_im, acc_re, acc_im;
  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int j = 0; j < DEPTH; j++) begin
      acc_re += SUM_W'(yb[j].re);
      acc_im += SUM_W'(yb[j].im);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_re <= '0;
      sum_im <= '0;
    end else begin
      sum_re <= acc_re;
      sum_im <= acc_im;
    end
  end

  // Rescaling for the DAC: Q(8+g).16 * Q3.15 -> Q1.15.
  logic signed [SUM_W+ALPHA_W-1:0] o_re, o_im;
  assign o_re = (SUM_W+ALPHA_W)'(sum_re) * (SUM_W+ALPHA_W)'(alpha) + (SUM_W+ALPHA_W)'(1 <<< (COEF_F-1));
  assign o_im = (SUM_W+ALPHA_W)'(sum_im) * (SUM_W+ALPHA_W)'(alpha) + (SUM_W+ALPHA_W)'(1 <<< (COEF_F-1));

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
endmodule
