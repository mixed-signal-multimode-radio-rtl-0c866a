// tb_fir_filter: checks the impulse response against the default taps,
// unity DC gain, then loads random taps and compares a random input stream
// with a reference convolution round(sum h_k x(n-k) / 2^15), saturated.
// Also checks that clear empties the delay line and that gaps in valid_in
// do not move it.
module tb_fir_filter;
  localparam int TAPS = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, clear, coef_we, valid_in, valid_out;
  logic [4:0] coef_addr; logic signed [15:0] coef_data, x_in, y_out;
  fir_filter #(.W(16), .TAPS(TAPS)) dut (.*);

  int h [TAPS];
  int hist [TAPS];

  function automatic int conv();
    real s; int v;
    s = 0.0;
    for (int k = 0; k < TAPS; k++) s += real'(h[k]) * real'(hist[k]);
    v = int'($floor(s / 32768.0 + 0.5));
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  task automatic push(input int x, input bit check);
    int e;
    for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    e = conv();
    valid_in = 1; x_in = 16'(x);
    @(posedge clk); #1;
    valid_in = 0;
    if (check) begin
      checks++;
      if (int'(y_out) != e || !valid_out) begin failures++; $display("y %0d exp %0d", y_out, e); end
    end
  endtask

  initial begin
    repeat (2000000 / 10) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; clear = 0; coef_we = 0; coef_addr = 0; coef_data = 0; valid_in = 0; x_in = 0;
    // reference taps: Hamming-windowed sinc, cutoff fs/4, unity DC gain
    begin
      real ht [TAPS], sum;
      sum = 0.0;
      for (int k = 0; k < TAPS; k++) begin
        real t; t = real'(k) - 15.5;
        ht[k] = 0.5 * $sin(3.141592653589793 * 0.5 * t) / (3.141592653589793 * 0.5 * t)
              * (0.54 - 0.46 * $cos(6.283185307179586 * real'(k) / 31.0));
        sum += ht[k];
      end
      for (int k = 0; k < TAPS; k++) begin
        h[k] = $rtoi($floor(ht[k] / sum * 32768.0 + 0.5));
        hist[k] = 0;
      end
    end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // impulse response: y(k) = h_k for a unit (0.99997) impulse of 32767
    push(32767, 1);
    for (int k = 1; k < TAPS + 2; k++) push(0, 1);
    // DC gain close to one
    for (int k = 0; k < TAPS; k++) push(10000, k == TAPS-1);
    checks++;
    if (int'(y_out) < 9998 || int'(y_out) > 10002) begin failures++; $display("DC gain %0d", y_out); end
    // random taps
    for (int k = 0; k < TAPS; k++) begin
      h[k] = int'($signed(16'($urandom))) / 4;
      coef_we = 1; coef_addr = 5'(k); coef_data = 16'(h[k]);
      @(posedge clk); #1;
    end
    coef_we = 0;
    clear = 1; @(posedge clk); #1 clear = 0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    for (int n = 0; n < 300; n++) begin
      push(int'($signed(16'($urandom))), 1);
      if (n % 7 == 0) begin @(posedge clk); #1; end   // idle cycle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
