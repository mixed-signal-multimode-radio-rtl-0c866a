// tb_synth_sideband: single-sideband suppression of the phase-coherent
// synthesizer, using the four DDS channels of the platform.
//
// The two analog quadrature modulators are modelled here at complex
// baseband around the LO f0: a modulator with in-phase gain gi, quadrature
// gain gq and an LO quadrature error phi turns its DDS pair (I, Q) into
//   z = gi I + j gq e^{j phi} Q.
// Modulator 1 gets cos(f1)/sin(f1) (channels 0/1) and should keep only
// f0 + f1; modulator 2 gets sin(f2)/cos(f2) (channels 2/3) and should keep
// only f0 - f2. The testbench takes a DFT of z over 4096 samples (f1 and f2
// on the DFT grid) and reports the wanted / unwanted sideband ratio.
// Each modulator is given an imbalance (about 0.3 dB and 3 degrees), which
// leaves roughly 30 dB of suppression. The imbalance is then trimmed out
// with the DDS amplitude words (scale the stronger path down) and the phase
// offset of the quadrature channel (shifted to cancel phi). With the trims the
// suppression must reach 50 dB, and without them it must stay below 40 dB.
// The channels are restarted together with dds_sync before every record.
module tb_synth_sideband;
  import radio_pkg::*;
  localparam int  NS  = 4096;
  localparam real PI  = 3.141592653589793;
  localparam int  K1  = 300, K2 = 700;      // tone bins of f1 and f2

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

  real smp [4][NS];

  task automatic record();
    @(negedge clk) dds_sync = 1;
    @(negedge clk) dds_sync = 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      @(posedge clk); #1;
      for (int c = 0; c < 4; c++) smp[c][n] = real'(dds_out[c]);
    end
  endtask

  // |DFT| of z = gi I + j gq e^{j phi} Q at bin k
  function automatic real dft(input int ci, input int cq, input real gi, input real gq,
                              input real phi, input int k);
    real re, im, zr, zi, w;
    re = 0.0; im = 0.0;
    w = 2.0 * PI * real'(k) / real'(NS);
    for (int n = 0; n < NS; n++) begin
      zr = gi * smp[ci][n] - gq * $sin(phi) * smp[cq][n];
      zi = gq * $cos(phi) * smp[cq][n];
      re += zr * $cos(w * real'(n)) + zi * $sin(w * real'(n));
      im += zi * $cos(w * real'(n)) - zr * $sin(w * real'(n));
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real suppression(input int ci, input int cq, input real gi, input real gq,
                                      input real phi, input int k_want);
    return 20.0 * $log10(dft(ci, cq, gi, gq, phi, k_want) / dft(ci, cq, gi, gq, phi, -k_want));
  endfunction

  initial begin
    repeat (20 * NS) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // modulator imbalances
    real g1i = 1.0, g1q = 0.965, p1 = 3.0 * PI / 180.0;
    real g2i = 0.97, g2q = 1.0,  p2 = -2.5 * PI / 180.0;
    real s1, s2;
    rst = 1; host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0; adc_valid = 0; adc_data = 0;
    dds_sync = 0;
    dds_ftw[0] = 32'(K1) << 20; dds_ftw[1] = 32'(K1) << 20;     // 2^32 / 4096 = 2^20
    dds_ftw[2] = 32'(K2) << 20; dds_ftw[3] = 32'(K2) << 20;
    // untrimmed: cos = sin advanced by a quarter turn (4096 of 16384)
    dds_phase[0] = 14'd4096; dds_phase[1] = 14'd0;
    dds_phase[2] = 14'd0;    dds_phase[3] = 14'd4096;
    foreach (dds_amp[c]) dds_amp[c] = 10'd1023;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    record();
    s1 = suppression(0, 1, g1i, g1q, p1, K1);
    s2 = suppression(2, 3, g2i, g2q, p2, -K2);
    $display("untrimmed: upper-sideband modulator %0.1f dB, lower-sideband modulator %0.1f dB", s1, s2);
    chk(s1 < 40.0 && s2 < 40.0, "imbalance visible before trimming");

    // trims: stronger path scaled down, quadrature channel shifted by phi
    dds_amp[0] = 10'($rtoi($floor(1023.0 * g1q / g1i + 0.5)));
    dds_phase[1] = 14'($rtoi($floor(p1 / (2.0 * PI) * 16384.0 + 0.5)));
    dds_amp[3] = 10'($rtoi($floor(1023.0 * g2i / g2q + 0.5)));
    dds_phase[3] = 14'(4096 - $rtoi($floor(p2 / (2.0 * PI) * 16384.0 + 0.5)));
    record();
    s1 = suppression(0, 1, g1i, g1q, p1, K1);
    s2 = suppression(2, 3, g2i, g2q, p2, -K2);
    $display("trimmed:   upper-sideband modulator %0.1f dB, lower-sideband modulator %0.1f dB", s1, s2);
    chk(s1 >= 50.0, $sformatf("upper sideband kept with %0.1f dB suppression", s1));
    chk(s2 >= 50.0, $sformatf("lower sideband kept with %0.1f dB suppression", s2));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
