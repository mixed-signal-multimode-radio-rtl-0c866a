// tb_dpd_workloads: accuracy of the three predistorters on WCDMA-like
// signals, run through the complete platform at its default sizes.
//
// Each case loads a full 2^16-sample record through the host port, selects
// one predistorter, lets the transmitter loop until the DAC plays a record
// that was wholly predistorted in that mode, captures one record from the
// DAC bus and compares it with a floating-point evaluation of the same
// model. The figure of merit is the normalised mean square error
//   NMSE = 10 log10( sum |y_dac - y_ref|^2 / sum |y_ref|^2 ).
// Cases:
//   LUT,                 one carrier    (gain table sampled from the model)
//   memoryless, order 9, one carrier
//   memory polynomial,   two carriers 10 MHz apart (order 9, depth 5)
//   memory polynomial,   four carriers 5 MHz apart
// Signals: random-phase tones on the record's frequency grid (so the looped
// record is seamless), 3.84 MHz wide per carrier at a 245.76 MHz sample
// rate, hard-clipped to a peak-to-average ratio of 7.2 dB (one carrier) or
// 7.4 dB (several), peak 0.5 of full scale. Coefficients are a plausible
// gain-expanding inverse of a compressing amplifier: a1 = 1 and decreasing
// higher orders; the memory branches are scaled-down, rotated copies.
// Each case must reach NMSE below -60 dB and use no output saturation.
module tb_dpd_workloads;
  import radio_pkg::*;
  localparam int  N     = 65536;
  localparam int  ORDER = 9, DEPTH = 5;
  localparam real PI2   = 6.283185307179586;
  localparam real LIMIT = -60.0;

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

  // ------------------------------------------------------------- model
  real a_r [DEPTH][ORDER], a_i [DEPTH][ORDER];   // exact coefficients
  real xr [N], xi [N];                           // quantised input, as reals in [-1, 1)
  real sr [N], si [N];                           // unquantised signal being built
  int  alpha_v = 32768;

  // gain of branch j at magnitude m: sum_i a_ji m^(i-1)
  function automatic void gain(input int j, input real m, output real gr, output real gi);
    real pw; pw = 1.0; gr = 0.0; gi = 0.0;
    for (int i = 0; i < ORDER; i++) begin
      gr += a_r[j][i] * pw; gi += a_i[j][i] * pw; pw *= m;
    end
  endfunction

  function automatic void reference(input int n, input int depth, output real yr, output real yi);
    real gr, gi, hr, hi;
    yr = 0.0; yi = 0.0;
    for (int j = 0; j < depth; j++) begin
      int k; k = (n - j + N) % N;
      hr = xr[k]; hi = xi[k];
      gain(j, $sqrt(hr * hr + hi * hi), gr, gi);
      yr += gr * hr - gi * hi; yi += gr * hi + gi * hr;
    end
    yr *= real'(alpha_v) / 32768.0; yi *= real'(alpha_v) / 32768.0;
  endfunction

  // --------------------------------------------------------- stimulus
  // ncar carriers of width 3.84 MHz centred at the given offsets (MHz)
  task automatic make_signal(input int ncar, input real centres [4], input real papr_db);
    real rms, clip, m;
    int  nt;
    foreach (sr[n]) begin sr[n] = 0.0; si[n] = 0.0; end
    nt = 256 / ncar;
    for (int c = 0; c < ncar; c++) begin
      int cb; cb = $rtoi(centres[c] / 245.76 * real'(N));
      for (int t = 0; t < nt; t++) begin
        int  bin; real ph, w;
        bin = cb - 512 + t * (1024 / nt);              // 1024 bins = 3.84 MHz
        ph  = PI2 * real'($urandom % 100000) / 100000.0;
        w   = PI2 * real'(bin) / real'(N);
        for (int n = 0; n < N; n++) begin
          sr[n] += $cos(w * real'(n) + ph);
          si[n] += $sin(w * real'(n) + ph);
        end
      end
    end
    rms = 0.0;
    foreach (sr[n]) rms += sr[n] * sr[n] + si[n] * si[n];
    rms = $sqrt(rms / real'(N));
    clip = rms * (10.0 ** (papr_db / 20.0));
    foreach (sr[n]) begin
      m = $sqrt(sr[n] * sr[n] + si[n] * si[n]);
      if (m > clip) begin sr[n] *= clip / m; si[n] *= clip / m; end
    end
    // peak 0.5 of full scale, quantised to 16 bits
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      int qr, qi;
      qr = $rtoi($floor(sr[n] / clip * 16384.0 + 0.5));
      qi = $rtoi($floor(si[n] / clip * 16384.0 + 0.5));
      xr[n] = real'(qr) / 32768.0; xi[n] = real'(qi) / 32768.0;
      host_we = 1; host_addr = {REG_TX_I, 16'(n)}; host_wdata = HOST_DW'(16'(qr));
      @(negedge clk);
      host_addr = {REG_TX_Q, 16'(n)}; host_wdata = HOST_DW'(16'(qi));
      @(negedge clk);
    end
    host_we = 0;
  endtask

  // ------------------------------------------------------ DAC capture
  int dac_i [$], dac_q [$];
  bit capture_on = 0;
  always @(posedge clk) begin
    #2;
    if (capture_on && dac_valid && dac_i.size() < N) begin
      int vi; vi = int'($signed(dac_data));
      @(negedge clk); #2;
      dac_i.push_back(vi); dac_q.push_back(int'($signed(dac_data)));
    end
  end

  task automatic run_case(input string name, input dpd_mode_e m, input int depth);
    logic [HOST_DW-1:0] st;
    int  base, nsat;
    real err, pwr, yr, yi, nmse;
    hwr(REG_CTRL, 0, HOST_DW'({m, 1'b1}));
    hrd(REG_CTRL, 6, st); base = int'(st[15:0]);
    do hrd(REG_CTRL, 6, st); while (int'(st[15:0]) < base + 2);
    @(posedge dut.tx_wrap);
    @(posedge clk);
    @(negedge clk);
    dac_i.delete(); dac_q.delete();
    capture_on = 1;
    repeat (N + 2) @(posedge clk);
    @(negedge clk); #3;
    capture_on = 0;
    hwr(REG_CTRL, 0, 48'h0);
    chk(dac_i.size() == N, $sformatf("%s: %0d samples captured", name, dac_i.size()));
    err = 0.0; pwr = 0.0; nsat = 0;
    for (int k = 0; k < N && k < dac_i.size(); k++) begin
      reference(k, depth, yr, yi);
      yr *= 32768.0; yi *= 32768.0;
      if (dac_i[k] == 32767 || dac_i[k] == -32768 || dac_q[k] == 32767 || dac_q[k] == -32768) nsat++;
      err += (real'(dac_i[k]) - yr) ** 2 + (real'(dac_q[k]) - yi) ** 2;
      pwr += yr * yr + yi * yi;
    end
    nmse = 10.0 * $log10(err / pwr);
    $display("%s: NMSE %0.1f dB over %0d samples, %0d saturated", name, nmse, dac_i.size(), nsat);
    chk(nmse < LIMIT, $sformatf("%s: NMSE %0.1f dB", name, nmse));
    chk(nsat == 0, $sformatf("%s: %0d saturated samples", name, nsat));
  endtask

  // ------------------------------------------------------------- main
  initial begin
    repeat (40 * N) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real base_r [ORDER] = '{1.0, 0.05, 0.30, -0.10, 0.08, -0.04, 0.02, -0.01, 0.005};
    real base_i [ORDER] = '{0.0, -0.02, 0.10, 0.05, -0.03, 0.02, -0.01, 0.005, -0.002};
    real c1 [4] = '{0.0, 0.0, 0.0, 0.0};
    real c2 [4] = '{-5.0, 5.0, 0.0, 0.0};
    real c4 [4] = '{-7.5, -2.5, 2.5, 7.5};
    rst = 1; host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0; adc_valid = 0; adc_data = 0;
    dds_sync = 0;
    foreach (dds_ftw[c]) begin dds_ftw[c] = 0; dds_phase[c] = 0; dds_amp[c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // branch j = base * s_j * exp(i th_j), s = 1, 0.1, -0.05, 0.025, -0.0125
    for (int j = 0; j < DEPTH; j++) begin
      real s, th;
      s  = (j == 0) ? 1.0 : 0.1 * ((-0.5) ** (j - 1));
      th = 0.3 * real'(j);
      for (int i = 0; i < ORDER; i++) begin
        a_r[j][i] = s * (base_r[i] * $cos(th) - base_i[i] * $sin(th));
        a_i[j][i] = s * (base_r[i] * $sin(th) + base_i[i] * $cos(th));
      end
    end
    // host words: a1, then ratios a(k+1)/a(k), Q8.16
    for (int j = 0; j < DEPTH; j++) begin
      for (int i = 0; i < ORDER; i++) begin
        real wr, wi, d;
        coef_t c;
        if (i == 0) begin wr = a_r[j][0]; wi = a_i[j][0]; end
        else begin
          d  = a_r[j][i-1] ** 2 + a_i[j][i-1] ** 2;
          wr = (a_r[j][i] * a_r[j][i-1] + a_i[j][i] * a_i[j][i-1]) / d;
          wi = (a_i[j][i] * a_r[j][i-1] - a_r[j][i] * a_i[j][i-1]) / d;
        end
        c.re = 24'($rtoi($floor(wr * 65536.0 + 0.5)));
        c.im = 24'($rtoi($floor(wi * 65536.0 + 0.5)));
        if (j == 0) hwr(REG_POLY, 16'(i), HOST_DW'(c));
        hwr(REG_MP, 16'(j * ORDER + i), HOST_DW'(c));
      end
    end
    // gain table: the memoryless gain at the centre of each power bin
    @(negedge clk);
    for (int a = 0; a < 65536; a++) begin
      real gr, gi; int qr, qi;
      gain(0, $sqrt((real'(a) + 0.5) / 16384.0), gr, gi);
      qr = $rtoi($floor(gr * 32768.0 + 0.5)); qi = $rtoi($floor(gi * 32768.0 + 0.5));
      qr = (qr > 131071) ? 131071 : (qr < -131072) ? -131072 : qr;
      qi = (qi > 131071) ? 131071 : (qi < -131072) ? -131072 : qi;
      host_we = 1; host_addr = {REG_LUT, 16'(a)}; host_wdata = HOST_DW'({18'(qr), 18'(qi)});
      @(negedge clk);
    end
    host_we = 0;
    hwr(REG_CTRL, 2, HOST_DW'(alpha_v));

    make_signal(1, c1, 7.2);
    run_case("LUT, 1 carrier", DPD_LUT, 1);
    run_case("memoryless polynomial, 1 carrier", DPD_POLY, 1);
    make_signal(2, c2, 7.4);
    run_case("memory polynomial, 2 carriers", DPD_MP, DEPTH);
    make_signal(4, c4, 7.4);
    run_case("memory polynomial, 4 carriers", DPD_MP, DEPTH);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
