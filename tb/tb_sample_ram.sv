// tb_sample_ram: writes random words to random addresses of a small RAM,
// keeps a reference copy, and checks every read one clock later, including
// read-during-write of the same address (old word expected).
module tb_sample_ram;
  localparam int W = 16, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we; logic [AW-1:0] waddr, raddr; logic [W-1:0] wdata, rdata;
  sample_ram #(.WIDTH(W), .ADDR_W(AW)) dut (.*);

  logic [W-1:0] ref_mem [2**AW];

  initial begin
    repeat (200000 / 10) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = W'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      logic [W-1:0] expect_v;
      @(negedge clk);
      raddr = AW'($urandom);
      we = ($urandom % 2) == 1;
      waddr = ($urandom % 4 == 0) ? raddr : AW'($urandom);
      wdata = W'($urandom);
      expect_v = ref_mem[raddr];
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_v) begin
        failures++; $display("mismatch addr %0d got %h exp %h", raddr, rdata, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
