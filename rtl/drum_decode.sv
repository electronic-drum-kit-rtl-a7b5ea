// drum_decode: route the hit strength of an SPI word to the drum it belongs to.
//
// The 2-bit drum ID from the SPI word selects which playback voice receives
// the 8-bit hit strength. The selected output carries SPI_volume, the other
// carries 0; an ID that names no drum (0, which the microcontroller sends in
// the "clear" word that follows every hit, or 3) gives 0 on both.
//
// Timing: registered, one clk cycle from input to output, so a one-cycle
// strength pulse from spi_rcv becomes a one-cycle pulse on one output.
//
// Following the original design: the mapping ID 1 -> snare, ID 2 -> cymbal and
// the zero-unless-selected outputs. This design's own choices: the IDs are
// parameters, and the outputs reset to 0.
module drum_decode #(
  parameter logic [1:0] SNARE_ID  = drum_pkg::SNARE_ID,
  parameter logic [1:0] CYMBAL_ID = drum_pkg::CYMBAL_ID
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] drum_num,
  input  logic [7:0] SPI_volume,
  output logic [7:0] to_snare,
  output logic [7:0] to_cymbal
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      to_snare  <= '0;
      to_cymbal <= '0;
    end else begin
      to_snare  <= (drum_num == SNARE_ID)  ? SPI_volume : 8'd0;
      to_cymbal <= (drum_num == CYMBAL_ID) ? SPI_volume : 8'd0;
    end
  end

endmodule
