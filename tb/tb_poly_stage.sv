// tb_poly_stage: random complex ratios r, envelopes |x| and partial results
// s_in; expects s_out = 1 + r*|x|*s_in (computed in floating point) one clock
// later, within the rounding of the two Q8.16 products.
module tb_poly_stage;
  import radio_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  logic rst; coef_t ratio, s_in, s_out; logic [15:0] mag;
  poly_stage dut (.*);

  localparam real SC = 65536.0;

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real rr, ri, m, sr, si, er, ei, tol;
    rst = 1; ratio = '0; s_in = '0; mag = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 1000; n++) begin
      ratio.re = 24'($signed(19'($urandom)) * 2);   // |r| < 8
      ratio.im = 24'($signed(19'($urandom)) * 2);
      s_in.re  = 24'($signed(19'($urandom)));       // |s| < 4
      s_in.im  = 24'($signed(19'($urandom)));
      mag      = 16'($urandom % 46341);             // |x| <= sqrt(2)
      rr = real'(ratio.re) / SC; ri = real'(ratio.im) / SC;
      sr = real'(s_in.re) / SC;  si = real'(s_in.im) / SC;
      m  = real'(mag) / 32768.0;
      er = 1.0 + (rr * m * sr - ri * m * si);
      ei =       (rr * m * si + ri * m * sr);
      tol = (3.0 + 2.0 * ($sqrt(sr*sr + si*si))) / SC;
      @(posedge clk); #1;
      checks++;
      if (fabs(real'(s_out.re) / SC - er) > tol || fabs(real'(s_out.im) / SC - ei) > tol) begin
        failures++; $display("n=%0d got (%f,%f) exp (%f,%f)", n, real'(s_out.re)/SC, real'(s_out.im)/SC, er, ei);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
