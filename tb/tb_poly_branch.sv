// tb_poly_branch: programs a random order-9 polynomial in ratio form
// (a1 and a(k+1)/a(k)), streams random samples with their exact envelopes one
// per clock, and checks every output, exactly ORDER clocks later, against the
// direct sum  sum_i a_i x |x|^(i-1)  with a_i = a1 * prod(ratios), evaluated
// in floating point. This checks that the nested ratio form implements the
// ordinary memoryless polynomial.
module tb_poly_branch;
  import radio_pkg::*;
  localparam int ORDER = 9;
  localparam real SC = 65536.0;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  logic rst; coef_t coef [ORDER]; sample_t x_in; logic [15:0] mag_in; coef_t y_out;
  poly_branch #(.ORDER(ORDER)) dut (.*);

  real ar [ORDER], ai [ORDER];   // a_(i+1), direct-form coefficients
  real er_q [$], ei_q [$];

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real pr, pi, tr, ti, xr, xi, m, yr, yi, powm;
    rst = 1; x_in = '0; mag_in = 0;
    // a1 near 1, ratios of modest size
    coef[0].re = 24'(60000 + int'($urandom % 10000));
    coef[0].im = 24'($signed(14'($urandom)));
    for (int k = 1; k < ORDER; k++) begin
      coef[k].re = 24'($signed(17'($urandom)));   // |r| < 1
      coef[k].im = 24'($signed(17'($urandom)));
    end
    ar[0] = real'(coef[0].re) / SC; ai[0] = real'(coef[0].im) / SC;
    for (int k = 1; k < ORDER; k++) begin
      pr = real'(coef[k].re) / SC; pi = real'(coef[k].im) / SC;
      ar[k] = ar[k-1] * pr - ai[k-1] * pi;
      ai[k] = ar[k-1] * pi + ai[k-1] * pr;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 600 + ORDER; n++) begin
      if (n < 600) begin
        x_in.re = 16'($signed(16'($urandom)) / 2);
        x_in.im = 16'($signed(16'($urandom)) / 2);
        xr = real'(x_in.re) / 32768.0; xi = real'(x_in.im) / 32768.0;
        m = $sqrt(xr*xr + xi*xi);
        mag_in = 16'($rtoi(m * 32768.0));
        m = real'(mag_in) / 32768.0;
        yr = 0.0; yi = 0.0; powm = 1.0;
        for (int i = 0; i < ORDER; i++) begin
          tr = ar[i] * powm; ti = ai[i] * powm;
          yr += tr * xr - ti * xi;
          yi += tr * xi + ti * xr;
          powm *= m;
        end
        er_q.push_back(yr); ei_q.push_back(yi);
      end
      @(posedge clk); #1;
      if (n >= ORDER - 1 && er_q.size() > 0) begin
        real er, ei;
        er = er_q.pop_front(); ei = ei_q.pop_front();
        checks++;
        if (fabs(real'(y_out.re) / SC - er) > 12.0 / SC || fabs(real'(y_out.im) / SC - ei) > 12.0 / SC) begin
          failures++; $display("n=%0d got (%f,%f) exp (%f,%f)", n, real'(y_out.re)/SC, real'(y_out.im)/SC, er, ei);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
