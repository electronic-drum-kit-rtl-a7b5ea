// add_sounds: mix the two scaled voices into the 8-bit DAC word.
//
// The snare and cymbal samples are added and the low 8 bits of the sum are
// the output. A sum above 255 wraps around rather than saturating; with the
// volume shifts applied upstream two voices rarely reach that, and no bits are
// given up to prevent it. Purely combinational.
//
// Following the original design: plain addition truncated to 8 bits.
module add_sounds (
  input  logic [7:0] snare,
  input  logic [7:0] cymbal,
  output logic [7:0] combined_out
);

  // 8-bit sum: the carry out (overflow) is dropped, the DAC takes 8 bits
  assign combined_out = snare + cymbal;

endmodule
