// tb_cplx_mag: streams random complex samples (one per clock) and the
// extreme values, and checks that two clocks later mag_out equals
// floor(sqrt(re^2 + im^2)) and x_out the delayed sample.
module tb_cplx_mag;
  import radio_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, valid_in, valid_out; sample_t x_in, x_out; logic [15:0] mag_out;
  cplx_mag dut (.*);

  sample_t q_x [$];

  initial begin
    repeat (1000000 / 10) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; valid_in = 0; x_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 1002; n++) begin
      if (n < 1000) begin
        valid_in = 1;
        if (n == 0) begin x_in.re = -16'sd32768; x_in.im = -16'sd32768; end
        else if (n == 1) begin x_in.re = 16'sd32767; x_in.im = 16'sd0; end
        else if (n == 2) begin x_in.re = 16'sd3; x_in.im = 16'sd4; end
        else begin x_in.re = 16'($urandom); x_in.im = 16'($urandom); end
        q_x.push_back(x_in);
      end else valid_in = 0;
      @(posedge clk); #1;
      if (n >= 1) begin
        // output of sample n-1 appears after the second edge
      end
      if (n >= 1 && q_x.size() > 0 && valid_out) begin
        sample_t e; int em;
        e = q_x.pop_front();
        em = int'($floor($sqrt(real'(e.re) * real'(e.re) + real'(e.im) * real'(e.im))));
        checks++;
        if (int'(mag_out) != em || x_out != e) begin
          failures++; $display("x=(%0d,%0d) mag %0d exp %0d", e.re, e.im, mag_out, em);
        end
      end
    end
    checks++;
    if (q_x.size() != 0) begin failures++; $display("latency: %0d outputs missing", q_x.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
