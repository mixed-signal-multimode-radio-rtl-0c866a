// tb_host_regs: writes every control register and reads it back (data two
// clocks after host_re), checks the write strobes and offsets for each memory
// region, the one-clock rx_start pulse, the status word, and the read-back of
// the feedback RAM words through the host port.
module tb_host_regs;
  import radio_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, host_we, host_re, host_rvalid;
  logic [HOST_AW-1:0] host_addr; logic [HOST_DW-1:0] host_wdata, host_rdata, wr_data;
  logic [15:0] wr_mem, wr_offset; logic [15:0] fb_raddr, fb_i_rdata, fb_q_rdata;
  logic tx_run, rx_start, rx_busy, rx_done; dpd_mode_e dpd_mode;
  logic [15:0] tx_last, rx_last, tx_passes; logic signed [17:0] alpha; logic [31:0] nco_ftw;
  host_regs #(.ADDR_W(16)) dut (.*);

  // feedback RAM stand-in: word = f(address), one clock read latency
  always_ff @(posedge clk) begin
    fb_i_rdata <= fb_raddr ^ 16'hA5A5;
    fb_q_rdata <= fb_raddr + 16'd7;
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wr(input logic [3:0] reg_region, input logic [15:0] off, input logic [HOST_DW-1:0] d);
    @(negedge clk);
    host_we = 1; host_addr = {reg_region, off}; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic rd(input logic [3:0] reg_region, input logic [15:0] off, output logic [HOST_DW-1:0] d);
    @(negedge clk);
    host_re = 1; host_addr = {reg_region, off};
    @(negedge clk);
    host_re = 0;
    chk(!host_rvalid, "rvalid too early");
    @(negedge clk);
    chk(host_rvalid, "rvalid after two clocks");
    d = host_rdata;
  endtask

  int strobes [16];
  always @(posedge clk) begin
    #1;
    for (int r = 0; r < 16; r++) if (wr_mem[r]) strobes[r]++;
  end
  int starts = 0;
  always @(posedge clk) begin #1; if (rx_start) starts++; end

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [HOST_DW-1:0] d;
    rst = 1; host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0;
    rx_busy = 0; rx_done = 1; tx_passes = 16'd1234;
    foreach (strobes[r]) strobes[r] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(!tx_run && dpd_mode == DPD_BYPASS && alpha == 18'sd32768 && tx_last == 16'hFFFF, "reset values");
    wr(REG_CTRL, 0, 48'h7);          // run, mode 3
    chk(tx_run && dpd_mode == DPD_MP, "ctrl write");
    wr(REG_CTRL, 1, 48'd99);
    wr(REG_CTRL, 2, 48'd20000);
    wr(REG_CTRL, 3, 48'd511);
    wr(REG_CTRL, 5, 48'hDEADBEEF);
    chk(tx_last == 99 && alpha == 18'sd20000 && rx_last == 511 && nco_ftw == 32'hDEADBEEF, "register values");
    rd(REG_CTRL, 0, d); chk(d == 48'h7, "read ctrl");
    rd(REG_CTRL, 1, d); chk(d == 48'd99, "read tx_last");
    rd(REG_CTRL, 2, d); chk(d == 48'd20000, "read alpha");
    rd(REG_CTRL, 5, d); chk(d == 48'hDEADBEEF, "read ftw");
    rd(REG_CTRL, 6, d); chk(d == {30'd0, 1'b1, 1'b0, 16'd1234}, "read status");
    wr(REG_CTRL, 4, 48'd1);
    chk(starts == 1, "rx_start pulse");
    repeat (3) @(negedge clk);
    chk(starts == 1 && !rx_start, "rx_start is one clock");
    // memory regions
    for (int r = 0; r < 10; r++) begin
      if (r == int'(REG_CTRL)) continue;
      @(negedge clk);
      host_we = 1; host_addr = {4'(r), 16'(r * 1000 + 3)}; host_wdata = 48'(r) << 40 | 48'h1234;
      @(negedge clk);
      host_we = 0;
      chk(wr_mem == (16'd1 << r) && wr_offset == 16'(r * 1000 + 3) && wr_data == (48'(r) << 40 | 48'h1234),
          $sformatf("strobe region %0d", r));
    end
    for (int r = 0; r < 16; r++) chk(strobes[r] == ((r < 10 && r != REG_CTRL) ? 1 : 0), $sformatf("strobe count %0d", r));
    for (int a = 0; a < 40; a++) begin
      logic [15:0] ad;
      ad = 16'($urandom);
      rd(REG_FB_I, ad, d); chk(d == 48'(ad ^ 16'hA5A5), "fb I read");
      rd(REG_FB_Q, ad, d); chk(d == 48'(ad + 16'd7), "fb Q read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
