// tb_nco: clears the NCO, enables it with several tuning words and compares
// each cosine/sine output with round(32767*cos/sin(2*pi*p/1024)), where p is
// the top ten bits of n*ftw for the n-th enabled cycle. Also checks that
// the phase holds while en is low.
module tb_nco;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, clear, en; logic [31:0] ftw; logic signed [15:0] cos_out, sin_out;
  nco #(.PHASE_W(32), .TABLE_AW(10), .OUT_W(16)) dut (.*);

  function automatic int refv(input longint unsigned ph, input bit is_cos);
    real a;
    a = 6.283185307179586 * real'(ph[31:22]) / 1024.0;
    return int'($floor(32767.0 * (is_cos ? $cos(a) : $sin(a)) + 0.5));
  endfunction

  initial begin
    repeat (1000000 / 10) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint unsigned ph;
    int ec, es;
    rst = 1; clear = 0; en = 0; ftw = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 4; t++) begin
      ftw = (t == 0) ? 32'h0400_0000 : (t == 1) ? 32'h1234_5678 : $urandom;
      clear = 1; @(posedge clk); #1 clear = 0; en = 1;
      ph = 0;
      for (int n = 0; n < 200; n++) begin
        @(posedge clk); #1;
        ec = refv(ph, 1); es = refv(ph, 0);
        checks++;
        if (int'(cos_out) - ec > 1 || ec - int'(cos_out) > 1 || int'(sin_out) - es > 1 || es - int'(sin_out) > 1) begin
          failures++; $display("n=%0d cos %0d/%0d sin %0d/%0d", n, cos_out, ec, sin_out, es);
        end
        ph = (ph + ftw) & 64'hFFFF_FFFF;
      end
      // hold
      en = 0;
      repeat (3) @(posedge clk);
      #1; ec = refv(ph, 1);
      checks++;
      if (int'(cos_out) - ec > 1 || ec - int'(cos_out) > 1) begin failures++; $display("hold failed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
