// tb_addr_counter: runs the playback counter with several record lengths,
// checks the address sequence 0..last, the wrap pulse on every wrap, holding
// when run is low, and clear.
module tb_addr_counter;
  localparam int AW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, run, clear, wrap; logic [AW-1:0] last, addr;
  addr_counter #(.ADDR_W(AW)) dut (.*);

  task automatic chk(input bit cond, input string msg);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500000 / 10) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_addr, wraps;
    rst = 1; run = 0; clear = 0; last = 8'd9;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(addr == 0, "reset address");
    for (int t = 0; t < 3; t++) begin
      last = (t == 0) ? 8'd9 : (t == 1) ? 8'd0 : 8'd255;
      clear = 1; @(posedge clk); #1 clear = 0; run = 1;
      exp_addr = 0; wraps = 0;
      for (int n = 0; n < 3 * (int'(last) + 1); n++) begin
        chk(addr == AW'(exp_addr), $sformatf("addr %0d exp %0d", addr, exp_addr));
        @(posedge clk); #1;
        if (exp_addr == int'(last)) begin
          exp_addr = 0; wraps++;
          chk(wrap == 1'b1, "wrap pulse missing");
        end else begin
          exp_addr++;
          chk(wrap == 1'b0, "spurious wrap");
        end
      end
      chk(wraps == 3, "three passes");
      // hold
      run = 0;
      begin
        logic [AW-1:0] held;
        held = addr;
        repeat (4) @(posedge clk);
        #1 chk(addr == held, "hold while run low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
