// tb_ddr_out: feeds random I/Q pairs and samples the DDR bus in the middle
// of the high and the low clock phase: I must appear in the high phase after
// the rising edge that registered it, Q in the low phase that follows.
module tb_ddr_out;
  localparam int W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, valid_in, valid_out; logic [W-1:0] i_in, q_in, dac_data;
  ddr_out #(.WIDTH(W)) dut (.*);

  initial begin
    repeat (100000 / 10) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] ei, eq;
    rst = 1; valid_in = 0; i_in = 0; q_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      valid_in = 1; i_in = W'($urandom); q_in = W'($urandom);
      ei = i_in; eq = q_in;
      @(posedge clk); #2;               // high phase after the capturing edge
      checks++;
      if (dac_data !== ei || !valid_out) begin failures++; $display("I phase: got %h exp %h", dac_data, ei); end
      @(negedge clk); #2;               // following low phase
      checks++;
      if (dac_data !== eq) begin failures++; $display("Q phase: got %h exp %h", dac_data, eq); end
      valid_in = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
