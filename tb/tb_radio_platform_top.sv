// tb_radio_platform_top: end-to-end test of the platform at its default
// parameters, driven only through the host port, the ADC input and the DDS
// ports, observed at the DDR DAC bus, the host read-back and the DDS outputs.
//
// Transmitter: loads an N-sample two-tone I/Q waveform, the 2^16 LUT gains
// and polynomial and memory polynomial coefficients, then plays the waveform
// in each predistortion mode. Sampling the DAC bus in the high (I) and low
// (Q) clock phases, it checks one full steady-state pass against
// independent models: bypass = x; LUT = integer model of the table path;
// polynomial and memory polynomial = floating-point direct sums (memory
// taps taken circularly, as the waveform loops). Modes are changed both with
// the transmitter stopped and on the fly.
// Receiver: feeds a tone at the NCO frequency and one offset from it,
// captures N samples, reads the feedback I/Q RAMs back and checks that the
// demodulated tone has the expected amplitude (half the ADC amplitude) and
// rotates by the expected phase step per sample; a second capture with the
// equalizer taps set to 0.5 must halve the amplitude.
// Synthesizer: checks that DDS channels 0/1 form a quadrature pair.
// Each mechanism is counted and a mechanism that never occurs is a failure.
module tb_radio_platform_top;
  import radio_pkg::*;
  localparam int  N     = 256;   // waveform and capture length used here
  localparam bit  FULL  = 0;     // 1: only the memory polynomial mode
  localparam int  ORDER = 9, DEPTH = 5;
  localparam real SC    = 65536.0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, host_we, host_re, host_rvalid, dac_valid, adc_valid, dds_sync;
  logic [HOST_AW-1:0] host_addr; logic [HOST_DW-1:0] host_wdata, host_rdata;
  logic [15:0] dac_data; logic signed [11:0] adc_data;
  logic [31:0] dds_ftw [4]; logic [13:0] dds_phase [4]; logic [9:0] dds_amp [4];
  logic signed [9:0] dds_out [4];

  radio_platform_top dut (.*);

  // ---------------------------------------------------------------- helpers
  int cnt_mode [4], cnt_fly_switch, cnt_wrap_passes, cnt_dac, cnt_capture, cnt_eq, cnt_lut_wr,
      cnt_coef_wr, cnt_dds, cnt_sat;

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

  // ------------------------------------------------------ waveform & models
  int xr [N], xi [N];
  longint g_re [65536], g_im [65536];
  real pa_r [ORDER], pa_i [ORDER];                       // memoryless a_i
  real ma_r [DEPTH][ORDER], ma_i [DEPTH][ORDER];         // memory a_ij
  int  alpha_v;

  function automatic void lut_model(input int r, input int i, output int yr, output int yi);
    longint p, mr, mi, kr, ki, a, b; int idx;
    p = longint'(r) * r + longint'(i) * i;
    idx = int'(p >> 16);
    mr = longint'(r) * g_re[idx] - longint'(i) * g_im[idx];
    mi = longint'(r) * g_im[idx] + longint'(i) * g_re[idx];
    kr = mr >>> 17; ki = mi >>> 17;
    a = (kr * alpha_v + 4096) >>> 13;
    b = (ki * alpha_v + 4096) >>> 13;
    yr = (a > 32767) ? 32767 : (a < -32768) ? -32768 : int'(a);
    yi = (b > 32767) ? 32767 : (b < -32768) ? -32768 : int'(b);
  endfunction

  function automatic void poly_model(input int n, input int depth, output real yr, output real yi);
    real hr, hi, m, pw, tr, ti, ar, ai;
    yr = 0.0; yi = 0.0;
    for (int j = 0; j < depth; j++) begin
      int k; k = (n - j + N) % N;
      hr = real'(xr[k]) / 32768.0; hi = real'(xi[k]) / 32768.0;
      m = $sqrt(hr*hr + hi*hi); pw = 1.0;
      for (int i = 0; i < ORDER; i++) begin
        ar = (depth == 1) ? pa_r[i] : ma_r[j][i];
        ai = (depth == 1) ? pa_i[i] : ma_i[j][i];
        tr = ar * pw; ti = ai * pw;
        yr += tr * hr - ti * hi;
        yi += tr * hi + ti * hr;
        pw *= m;
      end
    end
    yr = yr * real'(alpha_v);
    yi = yi * real'(alpha_v);
    if (yr > 32767.0) yr = 32767.0;
    if (yr < -32768.0) yr = -32768.0;
    if (yi > 32767.0) yi = 32767.0;
    if (yi < -32768.0) yi = -32768.0;
  endfunction

  // ------------------------------------------------------------ DAC capture
  int dac_i [$], dac_q [$];
  bit capture_on = 0;
  always @(posedge clk) begin
    #2;
    if (capture_on && dac_valid && dac_i.size() < N) begin
      int vi; vi = int'($signed(dac_data));
      @(negedge clk); #2;
      dac_i.push_back(vi); dac_q.push_back(int'($signed(dac_data)));
      cnt_dac++;
    end
  end

  // Plays the waveform for a few passes in the current mode and checks the
  // third pass after the start (the first one that is entirely predistorted
  // with this mode and with circular memory history).
  task automatic check_mode(input dpd_mode_e m, input bit on_the_fly);
    int base, yi_i, yr_i, bad;
    real yr, yi, tol;
    logic [HOST_DW-1:0] st;
    if (!on_the_fly) hwr(REG_CTRL, 0, 48'h0);
    dac_i.delete(); dac_q.delete();
    hwr(REG_CTRL, 0, HOST_DW'({m, 1'b1}));
    if (on_the_fly) cnt_fly_switch++;
    cnt_mode[m]++;
    // wait until two complete passes have happened, then collect one pass
    hrd(REG_CTRL, 6, st); base = int'(st[15:0]);
    do hrd(REG_CTRL, 6, st); while (int'(st[15:0]) < base + 2);
    // next wrap marks address 0
    // (address 0 is read in the clock after the wrap and reaches the DAC
    // bus in the high phase two clocks later)
    @(posedge dut.tx_wrap);
    @(posedge clk);
    @(negedge clk);
    dac_i.delete(); dac_q.delete();
    capture_on = 1;
    repeat (N + 2) @(posedge clk);
    @(negedge clk); #3;
    capture_on = 0;
    cnt_wrap_passes += 1;
    bad = 0;
    tol = (m == DPD_POLY || m == DPD_MP) ? 4.0 : 0.0;
    chk(dac_i.size() == N, $sformatf("mode %0d: %0d DAC samples in one pass", m, dac_i.size()));
    for (int k = 0; k < N && k < dac_i.size(); k++) begin
      int a; a = k;   // the collected pass starts at address 0
      case (m)
        DPD_BYPASS: begin yr = real'(xr[a]); yi = real'(xi[a]); end
        DPD_LUT:    begin lut_model(xr[a], xi[a], yr_i, yi_i); yr = real'(yr_i); yi = real'(yi_i); end
        DPD_POLY:   poly_model(a, 1, yr, yi);
        default:    poly_model(a, DEPTH, yr, yi);
      endcase
      if (fabs(yr) >= 32767.0 || fabs(yi) >= 32767.0) cnt_sat++;
      checks++;
      if (fabs(real'(dac_i[k]) - yr) > tol || fabs(real'(dac_q[k]) - yi) > tol) begin
        failures++; bad++;
        if (bad < 5) $display("mode %0d addr %0d: DAC (%0d,%0d) exp (%f,%f)", m, a, dac_i[k], dac_q[k], yr, yi);
      end
    end
  endtask

  // --------------------------------------------------------------- receiver
  longint adc_n = 0;
  real adc_amp = 1500.0, adc_f = 0.2, adc_ph = 0.7;
  always @(posedge clk) begin
    adc_n <= adc_n + 1;
    adc_data <= 12'($rtoi($floor(adc_amp * $cos(6.283185307179586 * adc_f * real'(adc_n) + adc_ph) + 0.5)));
  end

  task automatic capture_and_check(input real df, input real gain);
    logic [HOST_DW-1:0] st, di, dq;
    real ir [N], iq [N], mag, ph0, ph1, dph, exp_dph, exp_mag;
    int bad;
    adc_f = 0.2 + df;
    hwr(REG_CTRL, 4, 48'd1);
    cnt_capture++;
    do hrd(REG_CTRL, 6, st); while (!st[17]);
    for (int k = 0; k < N; k++) begin
      hrd(REG_FB_I, 16'(k), di); hrd(REG_FB_Q, 16'(k), dq);
      ir[k] = real'($signed(di[15:0])); iq[k] = real'($signed(dq[15:0]));
    end
    exp_mag = adc_amp / 2048.0 * 32768.0 / 2.0 * gain;
    exp_dph = 6.283185307179586 * df;    // with Q = -if*sin a tone above the LO rotates positively
    bad = 0;
    for (int k = 48; k < N; k++) begin
      mag = $sqrt(ir[k]*ir[k] + iq[k]*iq[k]);
      ph0 = $atan2(iq[k-1], ir[k-1]); ph1 = $atan2(iq[k], ir[k]);
      dph = ph1 - ph0;
      if (dph > 3.141592653589793) dph -= 6.283185307179586;
      if (dph < -3.141592653589793) dph += 6.283185307179586;
      checks++;
      if (fabs(mag - exp_mag) > 0.02 * exp_mag || fabs(dph - exp_dph) > 0.01) begin
        failures++; bad++;
        if (bad < 5) $display("rx k=%0d mag %f exp %f dphi %f exp %f", k, mag, exp_mag, dph, exp_dph);
      end
    end
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    repeat (40 * N * 20 + 400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [HOST_DW-1:0] d;
    rst = 1; host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0; adc_valid = 1; dds_sync = 0;
    foreach (cnt_mode[m]) cnt_mode[m] = 0;
    {cnt_fly_switch, cnt_wrap_passes, cnt_dac, cnt_capture, cnt_eq, cnt_lut_wr, cnt_coef_wr, cnt_dds, cnt_sat} = '0;
    dds_ftw[0] = 32'd300000000; dds_ftw[1] = 32'd300000000; dds_ftw[2] = 32'd900000000; dds_ftw[3] = 32'd900000000;
    dds_phase[0] = 14'd4096; dds_phase[1] = 14'd0; dds_phase[2] = 14'd0; dds_phase[3] = 14'd4096;
    foreach (dds_amp[c]) dds_amp[c] = 10'd1023;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // two-tone waveform, peak about 0.9 of full scale
    for (int n = 0; n < N; n++) begin
      real t; t = 6.283185307179586 * real'(n) / real'(N);
      xr[n] = $rtoi($floor(14000.0 * $cos(3.0 * t) + 13000.0 * $cos(11.0 * t + 0.3) + 0.5));
      xi[n] = $rtoi($floor(14000.0 * $sin(3.0 * t) + 13000.0 * $sin(11.0 * t + 0.3) + 0.5));
      hwr(REG_TX_I, 16'(n), HOST_DW'(16'(xr[n])));
      hwr(REG_TX_Q, 16'(n), HOST_DW'(16'(xi[n])));
    end
    hwr(REG_CTRL, 1, HOST_DW'(N - 1));
    hwr(REG_CTRL, 3, HOST_DW'(N - 1));
    alpha_v = 32768;

    // LUT gains G(p) = (1 + 0.6 p) + j 0.25 p, one host write per clock
    if (!FULL) begin
      for (int a = 0; a < 65536; a++) begin
        real p; p = real'(a) / 32768.0;
        g_re[a] = longint'($floor((1.0 + 0.6 * p) * 32768.0 + 0.5));
        g_im[a] = longint'($floor(0.25 * p * 32768.0 + 0.5));
      end
      @(negedge clk);
      for (int a = 0; a < 65536; a++) begin
        host_we = 1; host_addr = {REG_LUT, 16'(a)};
        host_wdata = HOST_DW'({18'(g_re[a]), 18'(g_im[a])});
        cnt_lut_wr++;
        @(negedge clk);
      end
      host_we = 0;
    end

    // polynomial coefficients: a1 near one, ratios below one
    for (int i = 0; i < ORDER; i++) begin
      coef_t c;
      c.re = (i == 0) ? 24'sd62000 : 24'($signed(17'($urandom)) / 2);
      c.im = (i == 0) ? 24'sd3000  : 24'($signed(17'($urandom)) / 2);
      if (i == 0) begin pa_r[0] = real'(c.re) / SC; pa_i[0] = real'(c.im) / SC; end
      else begin
        real pr, pi; pr = real'(c.re) / SC; pi = real'(c.im) / SC;
        pa_r[i] = pa_r[i-1] * pr - pa_i[i-1] * pi;
        pa_i[i] = pa_r[i-1] * pi + pa_i[i-1] * pr;
      end
      hwr(REG_POLY, 16'(i), HOST_DW'(c));
      cnt_coef_wr++;
    end
    for (int j = 0; j < DEPTH; j++) begin
      for (int i = 0; i < ORDER; i++) begin
        coef_t c;
        if (i == 0) begin
          c.re = (j == 0) ? 24'sd60000 : 24'($signed(14'($urandom)));
          c.im = 24'($signed(12'($urandom)));
          ma_r[j][0] = real'(c.re) / SC; ma_i[j][0] = real'(c.im) / SC;
        end else begin
          real pr, pi;
          c.re = 24'($signed(17'($urandom)) / 2); c.im = 24'($signed(17'($urandom)) / 2);
          pr = real'(c.re) / SC; pi = real'(c.im) / SC;
          ma_r[j][i] = ma_r[j][i-1] * pr - ma_i[j][i-1] * pi;
          ma_i[j][i] = ma_r[j][i-1] * pi + ma_i[j][i-1] * pr;
        end
        hwr(REG_MP, 16'(j * ORDER + i), HOST_DW'(c));
        cnt_coef_wr++;
      end
    end

    // ---- transmitter in every mode
    if (!FULL) begin
      check_mode(DPD_BYPASS, 0);
      alpha_v = 26214; hwr(REG_CTRL, 2, HOST_DW'(alpha_v));
      check_mode(DPD_LUT, 1);                 // switched while running
      alpha_v = 24000; hwr(REG_CTRL, 2, HOST_DW'(alpha_v));
      check_mode(DPD_POLY, 0);
    end
    alpha_v = 20000; hwr(REG_CTRL, 2, HOST_DW'(alpha_v));
    check_mode(DPD_MP, !FULL);
    if (!FULL) begin
      // large alpha drives the output into saturation
      alpha_v = 60000; hwr(REG_CTRL, 2, HOST_DW'(alpha_v));
      check_mode(DPD_LUT, 1);
    end
    hwr(REG_CTRL, 0, 48'h0);

    // ---- feedback receiver
    hwr(REG_CTRL, 5, HOST_DW'(32'd858993459));   // NCO at 0.2 fs
    capture_and_check(0.0, 1.0);
    capture_and_check(0.01, 1.0);
    if (!FULL) begin
      hwr(REG_EQ, 0, HOST_DW'({18'sd16384, 18'sd0}));   // equalizer tap 0 = 0.5
      cnt_eq++;
      capture_and_check(0.01, 0.5);
    end

    // ---- synthesizer DDS: quadrature pair on channels 0/1
    @(negedge clk) dds_sync = 1;
    @(negedge clk) dds_sync = 0;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      real r;
      @(posedge clk); #1;
      r = $sqrt(real'(dds_out[0]) ** 2 + real'(dds_out[1]) ** 2);
      checks++;
      if (r < 505.0 || r > 516.0) begin failures++; $display("DDS pair radius %f", r); end
      cnt_dds++;
    end

    // ---- every mechanism must have happened
    $display("modes: bypass %0d lut %0d poly %0d mp %0d; on-the-fly switches %0d; passes %0d; DAC samples %0d",
             cnt_mode[0], cnt_mode[1], cnt_mode[2], cnt_mode[3], cnt_fly_switch, cnt_wrap_passes, cnt_dac);
    $display("captures %0d; equalizer loads %0d; LUT writes %0d; coefficient writes %0d; saturated samples %0d; DDS samples %0d",
             cnt_capture, cnt_eq, cnt_lut_wr, cnt_coef_wr, cnt_sat, cnt_dds);
    chk(cnt_mode[DPD_MP] > 0, "memory polynomial mode used");
    chk(cnt_capture > 0 && cnt_dac > 0 && cnt_dds > 0 && cnt_coef_wr > 0 && cnt_wrap_passes > 0, "core mechanisms");
    if (!FULL) begin
      chk(cnt_mode[DPD_BYPASS] > 0 && cnt_mode[DPD_LUT] > 0 && cnt_mode[DPD_POLY] > 0, "every mode used");
      chk(cnt_fly_switch > 0, "on-the-fly mode switch");
      chk(cnt_eq > 0 && cnt_lut_wr == 65536, "equalizer and full LUT load");
      chk(cnt_sat > 0, "output saturation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
