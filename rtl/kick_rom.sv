// kick_rom: 8k x 8 synchronous ROM holding the kick drum sound for the EEPROM.
//
// Source of the bytes that write_eeprom copies into the external EEPROM. The
// sample at `address` appears on `q` one clock cycle after the rising edge.
// The first KICK_SAMPLES (7755, addresses 0..7754) words hold the sound, the
// rest are 0.
//
// The contents are computed at elaboration by drum_pkg::kick_sample(), a
// synthetic kick (a low triangle tone under a quadratic decay, unsigned 8 bit
// centred on 128) standing in for a recorded sample.
//
// Following the original design: an 8-bit ROM addressed by 13 bits with
// (address, clock, q) ports and 7755 samples. This design's own choices: the
// synchronous read and the waveform itself.
module kick_rom #(
  parameter int unsigned DEPTH  = drum_pkg::KICK_DEPTH,
  parameter int unsigned ADDR_W = 13
) (
  input  logic [ADDR_W-1:0] address,
  input  logic              clock,
  output logic [7:0]        q
);

  logic [7:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = drum_pkg::kick_sample(i);
  end

  always_ff @(posedge clock) q <= mem[address];

endmodule
