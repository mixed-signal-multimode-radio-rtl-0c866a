// tb_fb_equalizer: checks the reset pass-through, then programs random
// complex taps and compares the output with a reference complex convolution
// round(sum h_k z(n-k) / 2^15), saturated, computed independently.
module tb_fb_equalizer;
  import radio_pkg::*;
  localparam int TAPS = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, clear, tap_we, valid_in, valid_out;
  logic [2:0] tap_addr; gain_t tap_data; sample_t z_in, z_out;
  fb_equalizer #(.TAPS(TAPS)) dut (.*);

  int hr [TAPS], hi [TAPS], xr [TAPS], xi [TAPS];

  function automatic int rsat(input real s);
    int v;
    v = int'($floor(s / 32768.0 + 0.5));
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  task automatic push(input int r, input int i);
    real sr, si; int er, ei;
    for (int k = TAPS-1; k > 0; k--) begin xr[k] = xr[k-1]; xi[k] = xi[k-1]; end
    xr[0] = r; xi[0] = i;
    sr = 0.0; si = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      sr += real'(hr[k]) * real'(xr[k]) - real'(hi[k]) * real'(xi[k]);
      si += real'(hr[k]) * real'(xi[k]) + real'(hi[k]) * real'(xr[k]);
    end
    er = rsat(sr); ei = rsat(si);
    valid_in = 1; z_in.re = 16'(r); z_in.im = 16'(i);
    @(posedge clk); #1;
    valid_in = 0;
    checks++;
    if (int'(z_out.re) != er || int'(z_out.im) != ei || !valid_out) begin
      failures++; $display("got %0d,%0d exp %0d,%0d", z_out.re, z_out.im, er, ei);
    end
  endtask

  initial begin
    repeat (2000000 / 10) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; clear = 0; tap_we = 0; tap_addr = 0; tap_data = '0; valid_in = 0; z_in = '0;
    for (int k = 0; k < TAPS; k++) begin hr[k] = 0; hi[k] = 0; xr[k] = 0; xi[k] = 0; end
    hr[0] = 32768;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 50; n++) push(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    for (int k = 0; k < TAPS; k++) begin
      hr[k] = (k == 0) ? 30000 + int'($urandom % 10000) : int'($signed(18'($urandom))) / 16;
      hi[k] = int'($signed(18'($urandom))) / 16;
      tap_we = 1; tap_addr = 3'(k); tap_data.re = 18'(hr[k]); tap_data.im = 18'(hi[k]);
      @(posedge clk); #1;
    end
    tap_we = 0;
    clear = 1; @(posedge clk); #1 clear = 0;
    for (int k = 0; k < TAPS; k++) begin xr[k] = 0; xi[k] = 0; end
    for (int n = 0; n < 300; n++) push(int'($signed(16'($urandom))) / 2, int'($signed(16'($urandom))) / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
