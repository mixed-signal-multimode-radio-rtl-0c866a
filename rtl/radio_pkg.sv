// radio_pkg: number formats and shared types of the radio platform RTL.
//
// Formats (signed two's complement unless noted, Qm.f = m integer bits
// including the sign, f fraction bits):
//   sample  : 16-bit Q1.15, the format the dual DAC takes (16 signed
//             fractional bits).
//   LUT gain: 18-bit Q3.15 (one sign bit, two integer bits, fifteen
//             fraction bits), as specified for the look-up table entries.
//   |x|     : 16-bit unsigned Q1.15 (|x| of a Q1.15 complex sample is < 1.42).
//   polynomial coefficient / Horner partial result: 24-bit Q8.16, i.e. one
//             sign bit, seven integer bits (enough for the 10^2 range of the
//             rescaled coefficient ratios) and sixteen fraction bits. The
//             fraction width is this design's choice.
//   alpha   : output scale factor, 18-bit Q3.15 like the LUT gain.
package radio_pkg;

  localparam int unsigned SAMPLE_W = 16;   // DAC / baseband sample width
  localparam int unsigned SAMPLE_F = 15;
  localparam int unsigned ADC_W    = 12;   // feedback ADC width
  localparam int unsigned GAIN_W   = 18;   // LUT entry width
  localparam int unsigned GAIN_F   = 15;
  localparam int unsigned LUT_AW   = 16;   // LUT index width (2^16 entries)
  localparam int unsigned COEF_W   = 24;   // polynomial coefficient width
  localparam int unsigned COEF_F   = 16;
  localparam int unsigned ALPHA_W  = 18;
  localparam int unsigned ALPHA_F  = 15;
  localparam int unsigned HOST_AW  = 20;   // host address: 4-bit region + 16-bit offset
  localparam int unsigned HOST_DW  = 48;   // host data: wide enough for one complex coefficient

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } sample_t;

  typedef struct packed {
    logic signed [GAIN_W-1:0] re;
    logic signed [GAIN_W-1:0] im;
  } gain_t;

  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  // Predistortion scheme applied by the transmitter.
  typedef enum logic [1:0] {
    DPD_BYPASS = 2'd0,
    DPD_LUT    = 2'd1,
    DPD_POLY   = 2'd2,
    DPD_MP     = 2'd3
  } dpd_mode_e;

  // Host address regions (upper four bits of the host address).
  typedef enum logic [3:0] {
    REG_TX_I    = 4'h0,  // write: transmit I waveform RAM
    REG_TX_Q    = 4'h1,  // write: transmit Q waveform RAM
    REG_LUT     = 4'h2,  // write: LUT complex gains, packed {re, im}
    REG_POLY    = 4'h3,  // write: memoryless polynomial coefficients
    REG_MP      = 4'h4,  // write: memory polynomial coefficients
    REG_CTRL    = 4'h5,  // read/write: control and status registers
    REG_FB_I    = 4'h6,  // read: feedback I RAM
    REG_FB_Q    = 4'h7,  // read: feedback Q RAM
    REG_FIR     = 4'h8,  // write: receiver low-pass FIR taps
    REG_EQ      = 4'h9   // write: feedback equalizer complex taps
  } host_region_e;

  // Saturate a wide signed value to OUT_W bits is done in each module with
  // explicit comparisons; this helper covers the common 16-bit sample case.
  function automatic logic signed [SAMPLE_W-1:0] sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sd32767;
    else if (v < -64'sd32768) return -16'sd32768;
    else                      return v[SAMPLE_W-1:0];
  endfunction

  function automatic logic signed [COEF_W-1:0] sat24(input logic signed [63:0] v);
    if (v > 64'sd8388607)       return 24'sd8388607;
    else if (v < -64'sd8388608) return -24'sd8388608;
    else                        return v[COEF_W-1:0];
  endfunction

endpackage
