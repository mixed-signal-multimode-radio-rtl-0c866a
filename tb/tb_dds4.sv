// tb_dds4: programs the four DDS channels as the synthesizer uses them
// (cos/sin at f1 on channels 0/1, sin/cos at f2 on channels 2/3, 90-degree
// offsets through the phase words), synchronises them and compares every
// output sample with amp/1024 * 511 * sin(2*pi*(n*ftw/2^32 + off/2^14))
// computed in floating point. Checks the quadrature relation, an amplitude
// trim, a phase trim and that sync restarts all channels together.
module tb_dds4;
  localparam int CH = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, sync; logic [31:0] ftw [CH]; logic [13:0] phase_off [CH]; logic [9:0] amp [CH];
  logic signed [9:0] dds_out [CH];
  dds4 #(.CH(CH)) dut (.*);

  function automatic real expv(input int c, input longint n);
    real ph;
    longint unsigned acc;
    acc = (longint'(n) * longint'(ftw[c])) & 64'hFFFF_FFFF;
    // table phase: top 12 accumulator bits plus the top 12 bits of the offset
    ph = real'((acc >> 20) + (phase_off[c] >> 2)) / 4096.0;
    return real'(amp[c]) / 1024.0 * 32767.0 / 64.0 * $sin(6.283185307179586 * ph);
  endfunction

  initial begin
    repeat (50000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int n);
    real e, d;
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    // accumulator is 0 after the sync edge; output lags the accumulator by two clocks
    @(posedge clk); #1;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      for (int c = 0; c < CH; c++) begin
        e = expv(c, k);
        d = real'(dds_out[c]) - e;
        checks++;
        if (d > 1.5 || d < -1.5) begin failures++; $display("ch%0d n=%0d got %0d exp %f", c, k, dds_out[c], e); end
      end
    end
  endtask

  initial begin
    rst = 1; sync = 0;
    // f1 = 0.1 fs on channels 0/1, f2 = 0.37 fs on channels 2/3
    ftw[0] = 32'd429496730;  ftw[1] = 32'd429496730;
    ftw[2] = 32'd1589137899; ftw[3] = 32'd1589137899;
    phase_off[0] = 14'd4096; phase_off[1] = 14'd0;     // cos, sin
    phase_off[2] = 14'd0;    phase_off[3] = 14'd4096;  // sin, cos
    foreach (amp[c]) amp[c] = 10'd1023;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(300);
    // fine trims of magnitude and phase as used for side band suppression
    amp[1] = 10'd1000; phase_off[1] = 14'd37; phase_off[3] = 14'd4100;
    run(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
