// host_regs: host access to the FPGA, the hardware end of the dashboard link.
//
// The dashboard uploads waveforms, LUT gains, polynomial coefficients and
// filter taps, sets the operating mode and downloads received waveforms.
// This block decodes a plain memory-mapped host port for that: the upper
// four address bits select a region (radio_pkg::host_region_e), the lower
// sixteen are the offset inside it. Writes to a memory region are forwarded
// as a one-clock strobe (wr_mem[region]) with the shared wr_offset/wr_data;
// writes to the control region update the registers below.
//
// Control region (REG_CTRL) offsets:
//   0 ctrl     [0] tx_run, [2:1] dpd_mode          (read/write)
//   1 tx_last  index of the last transmit sample   (read/write)
//   2 alpha    output scale, Q3.15                 (read/write)
//   3 rx_last  index of the last captured sample   (read/write)
//   4 rx_start write: start one capture (pulse)
//   5 nco_ftw  receiver NCO tuning word            (read/write)
//   6 status   {rx_done, rx_busy, tx_passes[15:0]} (read only)
// Reads: host_rdata is valid (host_rvalid) two clocks after host_re; feedback
// RAM regions return the RAM word at the offset.
// Reset values: transmitter stopped, bypass, full-length records, alpha = 1.
// The register map and the read/write protocol are this design's choices;
// the document specifies only what the host must be able to do.
module host_regs
  import radio_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  // host port
  input  logic                        host_we,
  input  logic                        host_re,
  input  logic [HOST_AW-1:0]          host_addr,
  input  logic [HOST_DW-1:0]          host_wdata,
  output logic [HOST_DW-1:0]          host_rdata,
  output logic                        host_rvalid,
  // memory write strobes
  output logic [15:0]                 wr_mem,
  output logic [15:0]                 wr_offset,
  output logic [HOST_DW-1:0]          wr_data,
  // feedback RAM read-back
  output logic [ADDR_W-1:0]           fb_raddr,
  input  logic [SAMPLE_W-1:0]         fb_i_rdata,
  input  logic [SAMPLE_W-1:0]         fb_q_rdata,
  // control
  output logic                        tx_run,
  output dpd_mode_e                   dpd_mode,
  output logic [ADDR_W-1:0]           tx_last,
  output logic signed [ALPHA_W-1:0]   alpha,
  output logic [ADDR_W-1:0]           rx_last,
  output logic                        rx_start,
  output logic [31:0]                 nco_ftw,
  // status
  input  logic                        rx_busy,
  input  logic                        rx_done,
  input  logic [15:0]                 tx_passes
);
  host_region_e region, rd_region;
  logic [15:0]  offset;
  logic [15:0]  rd_offset;
  logic         rd_pend;

  assign region = host_region_e'(host_addr[HOST_AW-1 -: 4]);
  assign offset = host_addr[15:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_mem    <= '0;
      wr_offset <= '0;
      wr_data   <= '0;
      tx_run    <= 1'b0;
      dpd_mode  <= DPD_BYPASS;
      tx_last   <= '1;
      alpha     <= ALPHA_W'(1 <<< ALPHA_F);
      rx_last   <= '1;
      rx_start  <= 1'b0;
      nco_ftw   <= '0;
    end else begin
      wr_mem    <= '0;
      rx_start  <= 1'b0;
      wr_offset <= offset;
      wr_data   <= host_wdata;
      if (host_we) begin
        if (region == REG_CTRL) begin
          unique case (offset)
            16'd0: begin
              tx_run   <= host_wdata[0];
              dpd_mode <= dpd_mode_e'(host_wdata[2:1]);
            end
            16'd1: tx_last  <= host_wdata[ADDR_W-1:0];
            16'd2: alpha    <= host_wdata[ALPHA_W-1:0];
            16'd3: rx_last  <= host_wdata[ADDR_W-1:0];
            16'd4: rx_start <= 1'b1;
            16'd5: nco_ftw  <= host_wdata[31:0];
            default: ;
          endcase
        end else begin
          wr_mem[region] <= 1'b1;
        end
      end
    end
  end

  // Reads: cycle 1 presents the RAM address and latches the request,
  // cycle 2 selects the returned word.
  assign fb_raddr = offset[ADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_pend     <= 1'b0;
      rd_region   <= REG_CTRL;
      rd_offset   <= '0;
      host_rvalid <= 1'b0;
      host_rdata  <= '0;
    end else begin
      rd_pend     <= host_re;
      rd_region   <= region;
      rd_offset   <= offset;
      host_rvalid <= rd_pend;
      if (rd_pend) begin
        host_rdata <= '0;
        case (rd_region)
          REG_FB_I: host_rdata <= HOST_DW'(fb_i_rdata);
          REG_FB_Q: host_rdata <= HOST_DW'(fb_q_rdata);
          REG_CTRL: begin
            case (rd_offset)
              16'd0: host_rdata <= HOST_DW'({dpd_mode, tx_run});
              16'd1: host_rdata <= HOST_DW'(tx_last);
              16'd2: host_rdata <= HOST_DW'(alpha);
              16'd3: host_rdata <= HOST_DW'(rx_last);
              16'd5: host_rdata <= HOST_DW'(nco_ftw);
              16'd6: host_rdata <= HOST_DW'({rx_done, rx_busy, tx_passes});
              default: ;
            endcase
          end
          default: ;
        endcase
      end
    end
  end

  // Host port rule: one access per clock, never a read and a write together.
  a_one_access: assert property (@(posedge clk) disable iff (rst) !(host_we && host_re))
    else $error("host_regs: read and write requested in the same clock");
endmodule
