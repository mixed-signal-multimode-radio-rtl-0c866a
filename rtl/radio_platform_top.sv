// radio_platform_top: FPGA side of the mixed-signal multimode radio platform.
//
// Transmitter (advanced baseband transmitter): the host loads an I/Q
// waveform into two 16-bit RAMs. While tx_run is set, one address counter
// plays the RAMs in a loop; every sample goes through the selected digital
// predistorter (bypass, gain-based LUT, memoryless polynomial or memory
// polynomial; all four run in parallel and dpd_mode picks the output) and
// is written into the predistorted I/Q RAMs at its own address. The same
// counter reads the predistorted RAMs into the DDR converter that drives the
// dual DAC, I while the clock is high and Q while it is low. So each pass
// plays the waveform predistorted during the previous pass, and a mode or
// coefficient change reaches the DAC one pass later.
//
// Feedback receiver: a capture (host write rx_start) stores rx_last+1
// samples of the 12-bit IF ADC in the IF RAM, then replays them through the
// digital quadrature demodulator (NCO plus two multipliers), the two
// low-pass FIR filters and the complex equalizer that corrects the
// receiver's amplitude ripple, into the 16-bit feedback I/Q RAMs, which the
// host reads back. rx_busy/rx_done report the capture in the status register.
//
// Synthesizer: the four-channel DDS that feeds the two Hartley modulators of
// the phase-coherent frequency synthesizer is a separate function on the
// same clock, with its tuning words brought out as ports.
//
// The FPGA PLLs, converters, RF parts and the JTAG/dashboard link are
// outside: clk is the PLL output, and the host port stands for the link.
// One clock serves transmitter and receiver (the document derives both from
// the converter board's clock distribution; a single domain is this
// design's choice).
// Transmit pipeline (clk cycles): address -> source RAM 1 -> DPD (0, 4,
// ORDER+3 or ORDER+4) -> predistorted RAM; predistorted RAM read 1 -> DDR 1.
module radio_platform_top
  import radio_pkg::*;
#(
  parameter int unsigned ADDR_W    = 16,   // waveform RAM depth 2^ADDR_W
  parameter int unsigned LUT_AWID  = 16,   // LUT entries 2^LUT_AWID
  parameter int unsigned ORDER     = 9,    // polynomial order
  parameter int unsigned DEPTH     = 5,    // memory depth of the MP DPD
  parameter int unsigned FIR_TAPS  = 32,
  parameter int unsigned EQ_TAPS   = 8,
  parameter int unsigned DDS_CH    = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  // host link
  input  logic                      host_we,
  input  logic                      host_re,
  input  logic [HOST_AW-1:0]        host_addr,
  input  logic [HOST_DW-1:0]        host_wdata,
  output logic [HOST_DW-1:0]        host_rdata,
  output logic                      host_rvalid,
  // dual DAC (DDR bus)
  output logic [SAMPLE_W-1:0]       dac_data,
  output logic                      dac_valid,
  // feedback ADC
  input  logic signed [ADC_W-1:0]   adc_data,
  input  logic                      adc_valid,
  // 4-channel DDS of the frequency synthesizer
  input  logic                      dds_sync,
  input  logic [31:0]               dds_ftw   [DDS_CH],
  input  logic [13:0]               dds_phase [DDS_CH],
  input  logic [9:0]                dds_amp   [DDS_CH],
  output logic signed [9:0]         dds_out   [DDS_CH]
);
  localparam int unsigned LAT_LUT  = 4;
  localparam int unsigned LAT_POLY = ORDER + 3;
  localparam int unsigned LAT_MP   = ORDER + 4;
  localparam int unsigned LAT_MAX  = LAT_MP;

  // ------------------------------------------------------------------ host
  logic [15:0]               wr_mem, wr_offset;
  logic [HOST_DW-1:0]        wr_data;
  logic [ADDR_W-1:0]         fb_raddr, tx_last, rx_last;
  logic [SAMPLE_W-1:0]       fb_i_rdata, fb_q_rdata;
  logic                      tx_run, rx_start, rx_busy, rx_done;
  dpd_mode_e                 dpd_mode;
  logic signed [ALPHA_W-1:0] alpha;
  logic [31:0]               nco_ftw;
  logic [15:0]               tx_passes;

  host_regs #(.ADDR_W(ADDR_W)) u_host (
    .clk, .rst, .host_we, .host_re, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .wr_mem, .wr_offset, .wr_data, .fb_raddr, .fb_i_rdata, .fb_q_rdata,
    .tx_run, .dpd_mode, .tx_last, .alpha, .rx_last, .rx_start, .nco_ftw,
    .rx_busy, .rx_done, .tx_passes
  );

  // ----------------------------------------------------------- transmitter
  logic [ADDR_W-1:0] tx_addr, tx_addr1;
  logic              tx_wrap, tx_v1;

  addr_counter #(.ADDR_W(ADDR_W)) u_addr (
    .clk, .rst, .run(tx_run), .clear(!tx_run), .last(tx_last), .addr(tx_addr), .wrap(tx_wrap)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_v1     <= 1'b0;
      tx_addr1  <= '0;
      tx_passes <= '0;
    end else begin
      tx_v1     <= tx_run;
      tx_addr1  <= tx_addr;
      if (tx_wrap) tx_passes <= tx_passes + 1'b1;
    end
  end

  sample_t x_src;
  sample_ram #(.WIDTH(SAMPLE_W), .ADDR_W(ADDR_W)) u_ram_i (
    .clk, .we(wr_mem[REG_TX_I]), .waddr(wr_offset[ADDR_W-1:0]), .wdata(wr_data[SAMPLE_W-1:0]),
    .raddr(tx_addr), .rdata(x_src.re)
  );
  sample_ram #(.WIDTH(SAMPLE_W), .ADDR_W(ADDR_W)) u_ram_q (
    .clk, .we(wr_mem[REG_TX_Q]), .waddr(wr_offset[ADDR_W-1:0]), .wdata(wr_data[SAMPLE_W-1:0]),
    .raddr(tx_addr), .rdata(x_src.im)
  );

  // The predistorters.
  sample_t y_lut, y_poly, y_mp;
  logic    v_lut, v_poly, v_mp;

  lut_dpd #(.AW(LUT_AWID)) u_lut (
    .clk, .rst, .lut_we(wr_mem[REG_LUT]), .lut_waddr(wr_offset[LUT_AWID-1:0]),
    .lut_wdata(gain_t'(wr_data[2*GAIN_W-1:0])), .alpha,
    .valid_in(tx_v1), .x_in(x_src), .valid_out(v_lut), .y_out(y_lut)
  );

  poly_dpd #(.ORDER(ORDER)) u_poly (
    .clk, .rst, .coef_we(wr_mem[REG_POLY]), .coef_addr(wr_offset[$clog2(ORDER)-1:0]),
    .coef_wdata(coef_t'(wr_data[2*COEF_W-1:0])), .alpha,
    .valid_in(tx_v1), .x_in(x_src), .valid_out(v_poly), .y_out(y_poly)
  );

  mp_dpd #(.ORDER(ORDER), .DEPTH(DEPTH)) u_mp (
    .clk, .rst, .coef_we(wr_mem[REG_MP]), .coef_addr(wr_offset[$clog2(ORDER*DEPTH)-1:0]),
    .coef_wdata(coef_t'(wr_data[2*COEF_W-1:0])), .alpha,
    .valid_in(tx_v1), .x_in(x_src), .valid_out(v_mp), .y_out(y_mp)
  );

  // Address delay line matching the predistorter latencies.
  logic [ADDR_W-1:0] addr_dly [LAT_MAX+1];
  assign addr_dly[0] = tx_addr1;
  for (genvar k = 1; k <= LAT_MAX; k++) begin : g_adly
    always_ff @(posedge clk) begin
      if (rst) addr_dly[k] <= '0;
      else     addr_dly[k] <= addr_dly[k-1];
    end
  end

  sample_t           pd_w;
  logic              pd_we;
  logic [ADDR_W-1:0] pd_waddr;
  always_comb begin
    unique case (dpd_mode)
      DPD_LUT:  begin pd_w = y_lut;  pd_we = v_lut;  pd_waddr = addr_dly[LAT_LUT];  end
      DPD_POLY: begin pd_w = y_poly; pd_we = v_poly; pd_waddr = addr_dly[LAT_POLY]; end
      DPD_MP:   begin pd_w = y_mp;   pd_we = v_mp;   pd_waddr = addr_dly[LAT_MP];   end
      default:  begin pd_w = x_src;  pd_we = tx_v1;  pd_waddr = addr_dly[0];        end
    endcase
  end

  sample_t x_pd;
  sample_ram #(.WIDTH(SAMPLE_W), .ADDR_W(ADDR_W)) u_pd_i (
    .clk, .we(pd_we), .waddr(pd_waddr), .wdata(pd_w.re), .raddr(tx_addr), .rdata(x_pd.re)
  );
  sample_ram #(.WIDTH(SAMPLE_W), .ADDR_W(ADDR_W)) u_pd_q (
    .clk, .we(pd_we), .waddr(pd_waddr), .wdata(pd_w.im), .raddr(tx_addr), .rdata(x_pd.im)
  );

  ddr_out #(.WIDTH(SAMPLE_W)) u_ddr (
    .clk, .rst, .valid_in(tx_v1), .i_in(x_pd.re), .q_in(x_pd.im),
    .dac_data, .valid_out(dac_valid)
  );

  // ------------------------------------------------------ feedback receiver
  typedef enum logic [1:0] {RX_IDLE, RX_CAPTURE, RX_PROCESS} rx_state_e;
  rx_state_e         rx_state;
  logic [ADDR_W-1:0] cap_addr, rd_addr, fb_waddr;
  logic              rd_issue, rd_v1, flush;
  logic              mix_v, lpf_v, lpf_vq, eq_v;
  sample_t           mix, lpf, eq;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_state <= RX_IDLE;
      cap_addr <= '0;
      rd_addr  <= '0;
      rd_issue <= 1'b0;
      flush    <= 1'b0;
      rx_done  <= 1'b0;
    end else begin
      flush <= 1'b0;
      unique case (rx_state)
        RX_IDLE: begin
          if (rx_start) begin
            rx_state <= RX_CAPTURE;
            cap_addr <= '0;
            rx_done  <= 1'b0;
          end
        end
        RX_CAPTURE: begin
          if (adc_valid) begin
            cap_addr <= cap_addr + 1'b1;
            if (cap_addr == rx_last) begin
              rx_state <= RX_PROCESS;
              rd_addr  <= '0;
              rd_issue <= 1'b1;
              flush    <= 1'b1;
            end
          end
        end
        RX_PROCESS: begin
          if (rd_issue) begin
            if (rd_addr == rx_last) rd_issue <= 1'b0;
            else                    rd_addr  <= rd_addr + 1'b1;
          end
          if (eq_v && fb_waddr == rx_last) begin
            rx_state <= RX_IDLE;
            rx_done  <= 1'b1;
          end
        end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end
  assign rx_busy = (rx_state != RX_IDLE);

  logic signed [ADC_W-1:0] if_rd;
  sample_ram #(.WIDTH(ADC_W), .ADDR_W(ADDR_W)) u_ram_if (
    .clk, .we(rx_state == RX_CAPTURE && adc_valid), .waddr(cap_addr), .wdata(adc_data),
    .raddr(rd_addr), .rdata(if_rd)
  );

  logic signed [SAMPLE_W-1:0] lo_cos, lo_sin;
  nco #(.PHASE_W(32), .TABLE_AW(10), .OUT_W(SAMPLE_W)) u_nco (
    .clk, .rst, .clear(flush), .en(rd_issue), .ftw(nco_ftw), .cos_out(lo_cos), .sin_out(lo_sin)
  );

  always_ff @(posedge clk) begin
    if (rst) rd_v1 <= 1'b0;
    else     rd_v1 <= rd_issue;
  end

  iq_mixer #(.ADC_W(ADC_W), .W(SAMPLE_W)) u_mix (
    .clk, .rst, .valid_in(rd_v1), .if_in(if_rd), .cos_in(lo_cos), .sin_in(lo_sin),
    .valid_out(mix_v), .i_out(mix.re), .q_out(mix.im)
  );

  fir_filter #(.W(SAMPLE_W), .TAPS(FIR_TAPS)) u_fir_i (
    .clk, .rst, .clear(flush), .coef_we(wr_mem[REG_FIR]), .coef_addr(wr_offset[$clog2(FIR_TAPS)-1:0]),
    .coef_data(wr_data[15:0]), .valid_in(mix_v), .x_in(mix.re), .valid_out(lpf_v), .y_out(lpf.re)
  );
  fir_filter #(.W(SAMPLE_W), .TAPS(FIR_TAPS)) u_fir_q (
    .clk, .rst, .clear(flush), .coef_we(wr_mem[REG_FIR]), .coef_addr(wr_offset[$clog2(FIR_TAPS)-1:0]),
    .coef_data(wr_data[15:0]), .valid_in(mix_v), .x_in(mix.im), .valid_out(lpf_vq), .y_out(lpf.im)
  );

  fb_equalizer #(.TAPS(EQ_TAPS)) u_eq (
    .clk, .rst, .clear(flush), .tap_we(wr_mem[REG_EQ]), .tap_addr(wr_offset[$clog2(EQ_TAPS)-1:0]),
    .tap_data(gain_t'(wr_data[2*GAIN_W-1:0])), .valid_in(lpf_v), .z_in(lpf),
    .valid_out(eq_v), .z_out(eq)
  );

  always_ff @(posedge clk) begin
    if (rst || flush)  fb_waddr <= '0;
    else if (eq_v)     fb_waddr <= fb_waddr + 1'b1;
  end

  sample_ram #(.WIDTH(SAMPLE_W), .ADDR_W(ADDR_W)) u_fb_i (
    .clk, .we(eq_v), .waddr(fb_waddr), .wdata(eq.re), .raddr(fb_raddr), .rdata(fb_i_rdata)
  );
  sample_ram #(.WIDTH(SAMPLE_W), .ADDR_W(ADDR_W)) u_fb_q (
    .clk, .we(eq_v), .waddr(fb_waddr), .wdata(eq.im), .raddr(fb_raddr), .rdata(fb_q_rdata)
  );

  // ------------------------------------------------------------ synthesizer
  dds4 #(.CH(DDS_CH)) u_dds (
    .clk, .rst, .sync(dds_sync), .ftw(dds_ftw), .phase_off(dds_phase), .amp(dds_amp), .dds_out
  );

  // Both FIR branches are fed together; their valid flags are identical.
  always_ff @(posedge clk) begin
    if (!rst) assert (lpf_v == lpf_vq) else $error("FIR I/Q valid mismatch");
  end
endmodule
