// addr_counter: playback address generator of the baseband transmitter.
//
// While run is high the counter steps through 0..last, one address per
// clock, and wraps to 0, so a stored waveform of last+1 samples is played
// over and over. wrap pulses for one clock on the cycle the counter leaves
// address `last`. With run low the counter holds; clear returns it to 0.
// The document shows the counter driving the RAM read addresses; the
// programmable length, the run/clear controls and the wrap flag are this
// design's choices. Reset is synchronous, active high.
module addr_counter #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  input  logic              clear,
  input  logic [ADDR_W-1:0] last,
  output logic [ADDR_W-1:0] addr,
  output logic              wrap
);
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      addr <= '0;
      wrap <= 1'b0;
    end else if (run) begin
      if (addr >= last) begin
        addr <= '0;
        wrap <= 1'b1;
      end else begin
        addr <= addr + 1'b1;
        wrap <= 1'b0;
      end
    end else begin
      wrap <= 1'b0;
    end
  end
endmodule
