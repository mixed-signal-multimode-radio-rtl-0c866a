// tb_rx_calibration: the feedback receiver running the multi-tone ripple
// measurement at full size, through the complete platform.
//
// Stimulus: 30 tones spaced 3 MHz apart (2 x 1.5 MHz half-spacing), centred
// on an IF of a quarter of the 245.76 MHz sample rate, so they span 90 MHz.
// Each tone falls on the frequency grid of a 2^16-sample record (1.5 MHz is
// exactly 400 bins), so a capture holds whole periods. Newman phases
// (pi k^2 / 30) keep the crest factor low; the sum is scaled to 0.9 of the
// 12-bit ADC range.
// Every capture stores 2^16 ADC samples, runs them through the demodulator,
// low-pass filters and equaliser, and is read back over the host port; the
// testbench takes the DFT at each tone's bin and compares the magnitude with
// the value predicted from the tone amplitude, the low-pass response
// (recomputed here from its window formula) and any ripple applied.
// Captures:
//   1. flat input, LO at the IF: magnitudes within 0.5 %, spread < 0.15 dB
//   2. an echo c = 0.15 three samples later added in front of the ADC gives
//      a receiver ripple of about +-1.3 dB: magnitudes match the prediction
//   3. equaliser loaded with the truncated inverse of that echo: the ripple
//      drops below 0.2 dB peak to peak
//   4./5. LO moved up and down by one tone spacing (the two extra
//      measurements of the ripple-separation method): the tones appear
//      shifted by one spacing with the predicted magnitudes.
module tb_rx_calibration;
  import radio_pkg::*;
  localparam int  N    = 65536;
  localparam int  M    = 30;
  localparam real PI   = 3.141592653589793;
  localparam real ECHO = 0.15;
  localparam int  TONE_BINS = 800;          // 3 MHz at 245.76 MHz over 2^16 samples

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, host_we, host_re, host_rvalid, dac_valid, adc_valid, dds_sync;
  logic [HOST_AW-1:0] host_addr; logic [HOST_DW-1:0] host_wdata, host_rdata;
  logic [15:0] dac_data; logic signed [11:0] adc_data;
  logic [31:0] dds_ftw [4]; logic [13:0] dds_phase [4]; logic [9:0] dds_amp [4];
  logic signed [9:0] dds_out [4];

  radio_platform_top dut (.*);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic hwr(input logic [3:0] r, input logic [15:0] off, input logic [HOST_DW-1:0] d);
    @(negedge clk);
    host_we = 1; host_addr = {r, off}; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic hrd(input logic [3:0] r, input logic [15:0] off, output logic [HOST_DW-1:0] d);
    @(negedge clk);
    host_re = 1; host_addr = {r, off};
    @(negedge clk);
    host_re = 0;
    @(posedge host_rvalid); #1;
    d = host_rdata;
  endtask

  // ------------------------------------------------------------ stimulus
  int  bin_of [M];                 // baseband bin of tone k with the LO at the IF
  real tone_amp;                   // ADC counts per tone
  int  tab_flat [N], tab_echo [N]; // one period of the ADC signal
  bit  use_echo = 0;
  int  n_adc = 0;

  always @(posedge clk) begin
    adc_data <= 12'(use_echo ? tab_echo[n_adc] : tab_flat[n_adc]);
    n_adc    <= (n_adc + 1) % N;
  end

  // ------------------------------------------------------------- models
  real hfir [32];

  // |H(f)| of a real FIR at f cycles per sample
  function automatic real fir_mag(input real f);
    real re, im;
    re = 0.0; im = 0.0;
    for (int k = 0; k < 32; k++) begin
      re += hfir[k] * $cos(2.0 * PI * f * real'(k));
      im -= hfir[k] * $sin(2.0 * PI * f * real'(k));
    end
    return $sqrt(re * re + im * im);
  endfunction

  // receiver echo at real frequency f: |1 + c e^{-j 2 pi f 3}|
  function automatic real echo_mag(input real f);
    real re, im;
    re = 1.0 + ECHO * $cos(2.0 * PI * f * 3.0);
    im = -ECHO * $sin(2.0 * PI * f * 3.0);
    return $sqrt(re * re + im * im);
  endfunction

  // equaliser 1 - (jc) z^-3 + (jc)^2 z^-6 at baseband frequency f
  function automatic real eq_mag(input real f);
    real re, im, w;
    w = 2.0 * PI * f;
    // -(jc) e^{-j3w} = -c (j cos3w + sin3w) ; (jc)^2 = -c^2
    re = 1.0 - ECHO * $sin(3.0 * w) - ECHO * ECHO * $cos(6.0 * w);
    im = -ECHO * $cos(3.0 * w) + ECHO * ECHO * $sin(6.0 * w);
    return $sqrt(re * re + im * im);
  endfunction

  // ------------------------------------------------------------ capture
  real zr [N], zi [N];

  task automatic capture();
    logic [HOST_DW-1:0] st, di, dq;
    hwr(REG_CTRL, 4, 48'd1);
    do hrd(REG_CTRL, 6, st); while (!st[17]);
    for (int k = 0; k < N; k++) begin
      hrd(REG_FB_I, 16'(k), di); hrd(REG_FB_Q, 16'(k), dq);
      zr[k] = real'($signed(di[15:0])); zi[k] = real'($signed(dq[15:0]));
    end
  endtask

  function automatic real dft_mag(input int bin);
    real re, im, w;
    re = 0.0; im = 0.0;
    w = 2.0 * PI * real'(bin) / real'(N);
    for (int n = 0; n < N; n++) begin
      re += zr[n] * $cos(w * real'(n)) + zi[n] * $sin(w * real'(n));
      im += zi[n] * $cos(w * real'(n)) - zr[n] * $sin(w * real'(n));
    end
    return $sqrt(re * re + im * im) / real'(N);
  endfunction

  // measure every tone, compare with the model, return the spread in dB
  function automatic real measure(input string name, input int shift, input bit echo, input bit eq);
    real mx, mn, got, exp_v, fb, db;
    mx = -1.0e9; mn = 1.0e9;
    for (int k = 0; k < M; k++) begin
      int b; b = bin_of[k] - shift;
      fb  = real'(b) / real'(N);
      got = dft_mag(b);
      exp_v = tone_amp / 2048.0 * 32768.0 / 2.0 * fir_mag(fb);
      if (echo) exp_v *= echo_mag(real'(bin_of[k]) / real'(N) + 0.25);
      if (eq)   exp_v *= eq_mag(fb);
      checks++;
      if (got < 0.995 * exp_v || got > 1.005 * exp_v) begin
        failures++;
        $display("%s tone %0d: %f expected %f", name, k, got, exp_v);
      end
      db = 20.0 * $log10(got);
      if (db > mx) mx = db;
      if (db < mn) mn = db;
    end
    $display("%s: 30 tones, spread %0.3f dB peak to peak", name, mx - mn);
    return mx - mn;
  endfunction

  // ---------------------------------------------------------------- main
  initial begin
    repeat (80 * N) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real pk, s, sp, v;
    rst = 1; host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0; adc_valid = 1;
    dds_sync = 0;
    foreach (dds_ftw[c]) begin dds_ftw[c] = 0; dds_phase[c] = 0; dds_amp[c] = 0; end

    // low-pass reference: Hamming-windowed sinc, cutoff fs/4, unity DC gain
    s = 0.0;
    for (int k = 0; k < 32; k++) begin
      real t; t = real'(k) - 15.5;
      hfir[k] = 0.5 * $sin(PI * 0.5 * t) / (PI * 0.5 * t) * (0.54 - 0.46 * $cos(2.0 * PI * real'(k) / 31.0));
      s += hfir[k];
    end
    for (int k = 0; k < 32; k++) hfir[k] = real'($rtoi($floor(hfir[k] / s * 32768.0 + 0.5))) / 32768.0;

    // tone k at (2k - 29) x 1.5 MHz from the IF
    for (int k = 0; k < M; k++) bin_of[k] = (2 * k - (M - 1)) * (TONE_BINS / 2);
    pk = 0.0;
    for (int n = 0; n < N; n++) begin
      s = 0.0; sp = 0.0;
      for (int k = 0; k < M; k++) begin
        real w; w = 2.0 * PI * real'(bin_of[k] + N / 4) / real'(N);
        s  += $cos(w * real'(n) + PI * real'(k * k) / real'(M));
        sp += $cos(w * real'(n - 3) + PI * real'(k * k) / real'(M));
      end
      zr[n] = s; zi[n] = s + ECHO * sp;      // scratch: flat and echoed sums
      if (zi[n] > pk) pk = zi[n];
      if (-zi[n] > pk) pk = -zi[n];
    end
    tone_amp = 0.9 * 2047.0 / pk;
    for (int n = 0; n < N; n++) begin
      v = zr[n] * tone_amp; tab_flat[n] = $rtoi($floor(v + 0.5));
      v = zi[n] * tone_amp; tab_echo[n] = $rtoi($floor(v + 0.5));
    end

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    hwr(REG_CTRL, 3, HOST_DW'(N - 1));                // full-length capture
    hwr(REG_CTRL, 5, HOST_DW'(32'h4000_0000));        // LO at fs/4

    use_echo = 0;
    capture();
    chk(measure("flat input", 0, 0, 0) < 0.15, "flat response across 90 MHz");

    use_echo = 1;
    capture();
    begin
      real r_before, r_after;
      r_before = measure("receiver ripple", 0, 1, 0);
      chk(r_before > 2.0, "ripple present before correction");
      // taps: 1, -(jc) at 3, (jc)^2 = -c^2 at 6, Q3.15 {re, im}
      hwr(REG_EQ, 3, HOST_DW'({18'sd0, -18'($rtoi(ECHO * 32768.0))}));
      hwr(REG_EQ, 6, HOST_DW'({-18'($rtoi(ECHO * ECHO * 32768.0)), 18'sd0}));
      capture();
      r_after = measure("equalised", 0, 1, 1);
      chk(r_after < 0.2, "ripple removed by the equaliser");
      $display("ripple %0.2f dB -> %0.2f dB peak to peak", r_before, r_after);
    end

    // the two shifted-LO measurements, equaliser back to pass-through
    hwr(REG_EQ, 3, 48'd0);
    hwr(REG_EQ, 6, 48'd0);
    use_echo = 0;
    hwr(REG_CTRL, 5, HOST_DW'(32'h4000_0000 + 32'd52428800));  // + 3 MHz
    capture();
    void'(measure("LO + 3 MHz", TONE_BINS, 0, 0));
    hwr(REG_CTRL, 5, HOST_DW'(32'h4000_0000 - 32'd52428800));  // - 3 MHz
    capture();
    void'(measure("LO - 3 MHz", -TONE_BINS, 0, 0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
