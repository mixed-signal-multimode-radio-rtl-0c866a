// tb_lut_dpd: fills the 2^16-entry gain table with a smooth complex gain
// curve G(p) = (1 + 0.6 p) + j 0.25 p (p = table index / 2^15, i.e. the
// input power), streams random samples one per clock, and compares every
// output, exactly four clocks later, with an independent integer model of
// the datapath: index = top 16 bits of xI^2 + xQ^2, full-precision complex
// product, keep the 18 MSBs of 35, multiply by alpha, round, saturate.
// A second pass rewrites a few entries and checks they take effect.
module tb_lut_dpd;
  import radio_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, lut_we, valid_in, valid_out;
  logic [15:0] lut_waddr; gain_t lut_wdata; logic signed [17:0] alpha;
  sample_t x_in, y_out;
  lut_dpd dut (.*);

  longint g_re [65536], g_im [65536];

  function automatic longint sra(input longint v, input int s);
    return v >>> s;
  endfunction

  function automatic sample_t model(input sample_t x);
    longint p, mr, mi, kr, ki, yr, yi; int idx; sample_t y;
    p   = longint'(x.re) * x.re + longint'(x.im) * x.im;
    idx = int'(p >> 16);
    mr  = longint'(x.re) * g_re[idx] - longint'(x.im) * g_im[idx];
    mi  = longint'(x.re) * g_im[idx] + longint'(x.im) * g_re[idx];
    kr  = sra(mr, 17); ki = sra(mi, 17);
    yr  = sra(kr * longint'(alpha) + 4096, 13);
    yi  = sra(ki * longint'(alpha) + 4096, 13);
    y.re = (yr > 32767) ? 16'sd32767 : (yr < -32768) ? -16'sd32768 : 16'(yr);
    y.im = (yi > 32767) ? 16'sd32767 : (yi < -32768) ? -16'sd32768 : 16'(yi);
    return y;
  endfunction

  sample_t exp_q [$];
  int cyc = 0, first_out = -1;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Output checker
  always @(posedge clk) begin
    #1;
    if (!rst && valid_out) begin
      sample_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (y_out != e) begin failures++; $display("got (%0d,%0d) exp (%0d,%0d)", y_out.re, y_out.im, e.re, e.im); end
      end
    end
  end

  task automatic stream(input int n);
    int start;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      valid_in = 1;
      x_in.re = 16'($urandom); x_in.im = 16'($urandom);
      if (k % 3 == 0) begin x_in.re = x_in.re >>> 2; x_in.im = x_in.im >>> 2; end
      exp_q.push_back(model(x_in));
      if (k == 0) begin
        start = cyc;
        fork begin
          int s0; s0 = start;
          wait (valid_out); first_out = cyc - s0;
        end join_none
      end
    end
    @(negedge clk); valid_in = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    rst = 1; lut_we = 0; lut_waddr = 0; lut_wdata = '0; valid_in = 0; x_in = '0;
    alpha = 18'sd26214;   // 0.8
    for (int a = 0; a < 65536; a++) begin
      real p;
      p = real'(a) / 32768.0;
      g_re[a] = longint'($floor((1.0 + 0.6 * p) * 32768.0 + 0.5));
      g_im[a] = longint'($floor(0.25 * p * 32768.0 + 0.5));
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < 65536; a++) begin
      lut_we = 1; lut_waddr = 16'(a); lut_wdata.re = 18'(g_re[a]); lut_wdata.im = 18'(g_im[a]);
      @(negedge clk);
    end
    lut_we = 0;
    stream(2000);
    checks++;
    if (first_out != 4) begin failures++; $display("latency %0d, expected 4", first_out); end
    // rewrite the low-power region with a different gain
    for (int a = 0; a < 4096; a++) begin
      g_re[a] = 16384; g_im[a] = -8192;
      lut_we = 1; lut_waddr = 16'(a); lut_wdata.re = 18'(g_re[a]); lut_wdata.im = 18'(g_im[a]);
      @(negedge clk);
    end
    lut_we = 0;
    alpha = 18'sd40000;
    stream(2000);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
