// lpm_rom_snare: 16k x 8 synchronous ROM holding the snare drum sound.
//
// A single-port ROM with a registered output: the sample at `address` appears
// on `q` one clock cycle later. The first SNARE_SAMPLES (11600) words hold the
// sound; the remaining words are 0 and are never addressed during playback.
//
// The contents are computed at elaboration by drum_pkg::snare_sample(), a
// synthetic snare (noise plus a low tone under a quadratic decay, unsigned
// 8 bit centred on 128) standing in for a recorded sample. To play a real
// recording, replace the initial block with $readmemh of the sample file.
//
// Following the original design: 8-bit words, 16384 of them, synchronous read,
// zeros past the last sample, the port names of the vendor ROM it replaces.
// This design's own choice: the waveform itself.
module lpm_rom_snare #(
  parameter int unsigned DEPTH  = drum_pkg::ROM_DEPTH,
  parameter int unsigned ADDR_W = drum_pkg::ROM_AW
) (
  input  logic [ADDR_W-1:0] address,
  input  logic              clock,
  output logic [7:0]        q
);

  logic [7:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = drum_pkg::snare_sample(i);
  end

  always_ff @(posedge clock) q <= mem[address];

endmodule
