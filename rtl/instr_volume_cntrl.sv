// instr_volume_cntrl: scale one voice's samples by hit strength and master volume.
//
// Volume is applied with right shifts instead of a multiplier, in two stages.
// Stage 1 follows the hit strength: below 128 the sample is shifted right by 3,
// 128..159 by 2, 160..191 by 1, and 192 or more is left as it is. Stage 2
// follows the 6-bit universal volume, whose range is cut into eight equal
// bands of 8: 0..7 mutes the voice, 8..15 shifts by 7, 16..23 by 6, and so on
// down to 56..62, which shifts by 1; only 63 passes the stage-1 result unshifted.
//
// The hit strength and universal volume arrive from the SPI receiver as
// one-cycle values that are 0 the rest of the time, so both are captured in
// registers whenever they are non-zero and held for the whole playback. A value
// of 0 therefore never changes a register. While playback_active is low (the
// voice's FSM is idle) the output is 0, so an idle voice adds nothing to the mix.
//
// Interface: instr_sample is the ROM output of the voice, instr_out the scaled
// sample. Timing: the registers update on the clk edge that sees a non-zero
// input; instr_out is combinational from instr_sample, the registers and
// playback_active.
//
// Following the original design: the two shift stages and all their thresholds,
// and holding the volumes through playback. This design's own choices: muting
// the output while idle and the reset values (0, which mutes until the first
// hit message arrives).
module instr_volume_cntrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] instr_sample,
  input  logic [7:0] instr_volume,
  input  logic [5:0] universal_volume,
  input  logic       playback_active,
  output logic [7:0] instr_out
);

  logic [7:0] volume_reg;
  logic [5:0] univ_vol_reg;
  logic [1:0] hit_shift;
  logic [3:0] univ_shift;
  logic [7:0] instr_vol_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      volume_reg   <= '0;
      univ_vol_reg <= '0;
    end else begin
      if (instr_volume != 8'd0)     volume_reg   <= instr_volume;
      if (universal_volume != 6'd0) univ_vol_reg <= universal_volume;
    end
  end

  // Stage 1: 0..3 bits from the hit strength.
  always_comb begin
    if      (volume_reg < 8'd128) hit_shift = 2'd3;
    else if (volume_reg < 8'd160) hit_shift = 2'd2;
    else if (volume_reg < 8'd192) hit_shift = 2'd1;
    else                          hit_shift = 2'd0;
  end

  // Stage 2: 8 - (band number) bits, band = universal volume / 8; 63 is unshifted.
  always_comb begin
    if (univ_vol_reg == 6'd63) univ_shift = 4'd0;
    else                       univ_shift = 4'd8 - {1'b0, univ_vol_reg[5:3]};
  end

  assign instr_vol_out = instr_sample >> hit_shift;

  always_comb begin
    if (!playback_active || univ_vol_reg < 6'd8) instr_out = 8'd0;
    else                                         instr_out = instr_vol_out >> univ_shift;
  end

endmodule
