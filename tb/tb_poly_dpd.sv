// tb_poly_dpd: memoryless polynomial predistorter of order 9. Programs a1
// and the coefficient ratios through the coefficient port, streams random
// samples (with idle cycles in the second half) and compares each output with
//   y(n) = alpha * sum_i a_i x(n) |x(n)|^(i-1)
// in floating point, the a_i rebuilt from the programmed ratios. Also checks
// the reset pass-through y = alpha * x and the latency of ORDER+3 clocks.
module tb_poly_dpd;
  import radio_pkg::*;
  localparam int ORDER = 9, DEPTH = 1;
  localparam real SC = 65536.0;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  logic rst, coef_we, valid_in, valid_out;
  logic [3:0] coef_addr; coef_t coef_wdata; logic signed [17:0] alpha;
  sample_t x_in, y_out;
  poly_dpd #(.ORDER(ORDER)) dut (.*);

  real ar [DEPTH][ORDER], ai [DEPTH][ORDER];
  real hr [DEPTH], hi [DEPTH];
  real er_q [$], ei_q [$];
  int  in_cyc [$];
  int  cyc = 0, lat_err = 0, lat_seen = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!rst && valid_out) begin
      real er, ei; int c0;
      checks++;
      if (er_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        er = er_q.pop_front(); ei = ei_q.pop_front(); c0 = in_cyc.pop_front();
        lat_seen++;
        if (cyc - c0 != ORDER + 3) lat_err++;
        if (fabs(real'(y_out.re) - er) > 4.0 || fabs(real'(y_out.im) - ei) > 4.0) begin
          failures++; $display("got (%0d,%0d) exp (%f,%f)", y_out.re, y_out.im, er, ei);
        end
      end
    end
  end

  function automatic void model_push(input sample_t x);
    real m, yr, yi, powm, tr, ti, sr, si;
    for (int j = DEPTH-1; j > 0; j--) begin hr[j] = hr[j-1]; hi[j] = hi[j-1]; end
    hr[0] = real'(x.re) / 32768.0; hi[0] = real'(x.im) / 32768.0;
    sr = 0.0; si = 0.0;
    for (int j = 0; j < DEPTH; j++) begin
      m = $sqrt(hr[j]*hr[j] + hi[j]*hi[j]);
      powm = 1.0;
      for (int i = 0; i < ORDER; i++) begin
        tr = ar[j][i] * powm; ti = ai[j][i] * powm;
        sr += tr * hr[j] - ti * hi[j];
        si += tr * hi[j] + ti * hr[j];
        powm *= m;
      end
    end
    yr = sr * real'(alpha) / 32768.0 * 32768.0;
    yi = si * real'(alpha) / 32768.0 * 32768.0;
    if (yr > 32767.0) yr = 32767.0;
    if (yr < -32768.0) yr = -32768.0;
    if (yi > 32767.0) yi = 32767.0;
    if (yi < -32768.0) yi = -32768.0;
    er_q.push_back(yr); ei_q.push_back(yi);
  endfunction

  task automatic stream(input int n, input bit gaps);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (gaps && ($urandom % 5 == 0)) begin valid_in = 0; continue; end
      valid_in = 1;
      x_in.re = 16'($signed(16'($urandom)) / 2);
      x_in.im = 16'($signed(16'($urandom)) / 2);
      model_push(x_in);
      in_cyc.push_back(cyc);
    end
    @(negedge clk) valid_in = 0;
    repeat (ORDER + 8) @(negedge clk);
  endtask

  initial begin
    real pr, pi;
    rst = 1; coef_we = 0; coef_addr = 0; coef_wdata = '0; valid_in = 0; x_in = '0;
    alpha = 18'sd16384;   // 0.5
    for (int j = 0; j < DEPTH; j++) begin
      hr[j] = 0.0; hi[j] = 0.0;
      for (int i = 0; i < ORDER; i++) begin ar[j][i] = 0.0; ai[j][i] = 0.0; end
    end
    ar[0][0] = 1.0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // reset coefficients: y = alpha * x
    stream(50, 0);
    // program random coefficients
    for (int j = 0; j < DEPTH; j++) begin
      for (int i = 0; i < ORDER; i++) begin
        coef_t c;
        if (i == 0) begin
          c.re = (j == 0) ? 24'(60000 + int'($urandom % 8000)) : 24'($signed(15'($urandom)));
          c.im = 24'($signed(13'($urandom)));
        end else begin
          c.re = 24'($signed(17'($urandom)));
          c.im = 24'($signed(17'($urandom)));
        end
        @(negedge clk);
        coef_we = 1; coef_addr = 4'(i); coef_wdata = c;
        if (i == 0) begin
          ar[j][0] = real'(c.re) / SC; ai[j][0] = real'(c.im) / SC;
        end else begin
          pr = real'(c.re) / SC; pi = real'(c.im) / SC;
          ar[j][i] = ar[j][i-1] * pr - ai[j][i-1] * pi;
          ai[j][i] = ar[j][i-1] * pi + ai[j][i-1] * pr;
        end
      end
    end
    @(negedge clk) coef_we = 0;
    stream(1000, 0);
    stream(1000, 1);
    checks++;
    if (er_q.size() != 0) begin failures++; $display("%0d outputs missing", er_q.size()); end
    checks++;
    if (lat_err != 0 || lat_seen == 0) begin failures++; $display("latency wrong on %0d samples", lat_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
