// sample_ram: simple dual-port waveform memory.
//
// The platform keeps every waveform in on-chip RAM: the I and Q transmit
// components, the predistorted I and Q components, the 12-bit feedback IF
// samples from the ADC and the demodulated feedback I and Q components.
// This one module serves all of them with a parameterised width.
//
// Interface: one write port (we, waddr, wdata) and one read port (raddr,
// rdata), both on clk. Timing: a write takes effect at the clock edge; a
// read returns the word at raddr one clock later (registered output, as a
// block RAM does). A read of the address being written returns the old word.
// Depth 2^16 is this design's choice: the document gives the word widths
// (16 bits, 12 bits for the IF) but no depth; 2^16 matches the record length
// used for the receiver calibration.
module sample_ram #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
