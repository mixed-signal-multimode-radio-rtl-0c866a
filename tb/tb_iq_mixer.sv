// tb_iq_mixer: random 12-bit IF samples and random cosine/sine values;
// expects I = round(if*cos/2^11) and Q = round(-if*sin/2^11), saturated to
// 16 bits, one clock later, including the full-scale corner cases.
module tb_iq_mixer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, valid_in, valid_out;
  logic signed [11:0] if_in; logic signed [15:0] cos_in, sin_in, i_out, q_out;
  iq_mixer #(.ADC_W(12), .W(16)) dut (.*);

  function automatic int expv(input int a, input int b);
    real r; int v;
    r = $floor(real'(a) * real'(b) / 2048.0 + 0.5);
    v = int'(r);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  initial begin
    repeat (100000 / 10) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ei, eq;
    rst = 1; valid_in = 0; if_in = 0; cos_in = 0; sin_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 400; n++) begin
      valid_in = 1;
      if (n == 0) begin if_in = -12'sd2048; cos_in = -16'sd32768; sin_in = -16'sd32768; end
      else if (n == 1) begin if_in = 12'sd2047; cos_in = 16'sd32767; sin_in = -16'sd32768; end
      else begin if_in = 12'($urandom); cos_in = 16'($urandom); sin_in = 16'($urandom); end
      ei = expv(int'(if_in), int'(cos_in));
      eq = expv(int'(if_in), -int'(sin_in));
      @(posedge clk); #1;
      checks++;
      if (int'(i_out) != ei || int'(q_out) != eq || !valid_out) begin
        failures++; $display("n=%0d I %0d/%0d Q %0d/%0d", n, i_out, ei, q_out, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
