// drum_kit_top: FPGA side of a two-pad electronic drum kit, plus the EEPROM tools.
//
// Drum kit. A microcontroller watches the piezo pads and, for every hit, sends
// one 16-bit SPI word {universal volume[5:0], drum ID[1:0], hit strength[7:0]}.
// spi_rcv turns the serial word into two bytes that are valid for one clk
// cycle; drum_decode hands the hit strength to the snare voice (ID 1) or the
// cymbal voice (ID 2). Each voice is a playback_fsm stepping a sample ROM
// address at the sound's sample rate, the ROM (lpm_rom_snare / lpm_rom_cymbal),
// and an instr_volume_cntrl that right-shifts each sample by amounts set by the
// hit strength and the universal volume. add_sounds adds the two voices into
// the 8-bit word for the external R-2R DAC. The voices run independently, so a
// hit on one pad does not cut off the other, and a new hit on a playing pad
// restarts its sound.
//
// EEPROM tools. write_eeprom (copies kick_rom into an external 32k x 8 EEPROM)
// and read_eeprom (steps through an EEPROM and shows each byte) were separate
// FPGA programs; here they stand beside the drum kit with ports of their own
// (ew_* and er_*) and share only clk and rst_n with it.
//
// Parameters: *_DURATION_LIMIT is the clk cycles per sample of a sound (clk
// frequency / sample rate), *_ADDR_LIMIT its number of samples. The defaults
// are those of the original kit: 997 cycles and 11600 samples for the snare,
// 2750 cycles and 12986 samples for the cymbal.
//
// Timing: sound_out is registered. Call E the first clk edge that samples the
// last bit's SPI_clk high. spi_rcv presents the word after E+2, drum_decode
// after E+3, the voice is in S1_START after E+4 and its first sample, scaled,
// is on sound_out after E+5. The universal volume of the word applies to both
// voices from E+4 on the output.
//
// Following the original design: the blocks, their connections and the default
// parameters. This design's own choices: the active-low synchronous reset, the
// output register and bringing the EEPROM tools into the same top.
module drum_kit_top #(
  parameter logic [drum_pkg::DUR_W-1:0]  SNARE_DURATION_LIMIT  = 27'd997,
  parameter logic [drum_pkg::ROM_AW-1:0] SNARE_ADDR_LIMIT      = 14'd11600,
  parameter logic [drum_pkg::DUR_W-1:0]  CYMBAL_DURATION_LIMIT = 27'd2750,
  parameter logic [drum_pkg::ROM_AW-1:0] CYMBAL_ADDR_LIMIT     = 14'd12986,
  parameter int unsigned EW_BYTE_PERIOD = 1_000_000,
  parameter int unsigned EW_WE_START    = 800_000,
  parameter int unsigned ER_STEP_LOG2   = 26
) (
  input  logic        clk,          // 40 MHz board clock
  input  logic        rst_n,
  // drum kit
  input  logic        SPI_clk,
  input  logic        SPI_in,
  output logic [7:0]  sound_out,    // to the DAC
  // EEPROM writer
  output logic        ew_not_CE,
  output logic        ew_not_WE,
  output logic        ew_not_OE,
  output logic [14:0] ew_addr,
  output logic [7:0]  ew_data,
  output logic        ew_WRITE_LED,
  output logic        ew_DONE_LED,
  // EEPROM reader
  input  logic [7:0]  er_data_in,
  output logic [14:0] er_addr,
  output logic [7:0]  er_data_out,
  output logic        er_not_CE,
  output logic        er_not_OE,
  output logic        er_not_WE
);
  import drum_pkg::*;

  logic [7:0]        spi_info;      // universal volume and drum ID
  logic [7:0]        spi_volume;    // hit strength
  spi_msg_t          msg;           // the two bytes as one hit word
  logic [7:0]        snare_volume, cymbal_volume;
  logic [ROM_AW-1:0] snare_addr, cymbal_addr;
  logic              snare_running, cymbal_running;
  logic [7:0]        snare_rom_out, cymbal_rom_out;
  logic [7:0]        snare_out, cymbal_out;
  logic [7:0]        mix;

  spi_rcv u_spi_rcv (
    .clk     (clk),
    .rst_n   (rst_n),
    .SPI_CLK (SPI_clk),
    .SPI_IN  (SPI_in),
    .signal_1(spi_info),
    .signal_2(spi_volume)
  );

  assign msg = {spi_info, spi_volume};

  drum_decode u_drum_decode (
    .clk       (clk),
    .rst_n     (rst_n),
    .drum_num  (msg.drum_id),
    .SPI_volume(msg.hit),
    .to_snare  (snare_volume),
    .to_cymbal (cymbal_volume)
  );

  playback_fsm u_snare_fsm (
    .clk           (clk),
    .rst_n         (rst_n),
    .volume        (snare_volume),
    .duration_limit(SNARE_DURATION_LIMIT),
    .addr_limit    (SNARE_ADDR_LIMIT),
    .addr          (snare_addr),
    .FSM_RUNNING   (snare_running)
  );

  playback_fsm u_cymbal_fsm (
    .clk           (clk),
    .rst_n         (rst_n),
    .volume        (cymbal_volume),
    .duration_limit(CYMBAL_DURATION_LIMIT),
    .addr_limit    (CYMBAL_ADDR_LIMIT),
    .addr          (cymbal_addr),
    .FSM_RUNNING   (cymbal_running)
  );

  lpm_rom_snare u_snare_rom (
    .address(snare_addr),
    .clock  (clk),
    .q      (snare_rom_out)
  );

  lpm_rom_cymbal u_cymbal_rom (
    .address(cymbal_addr),
    .clock  (clk),
    .q      (cymbal_rom_out)
  );

  instr_volume_cntrl u_snare_vol (
    .clk             (clk),
    .rst_n           (rst_n),
    .instr_sample    (snare_rom_out),
    .instr_volume    (snare_volume),
    .universal_volume(msg.univ_vol),
    .playback_active (snare_running),
    .instr_out       (snare_out)
  );

  instr_volume_cntrl u_cymbal_vol (
    .clk             (clk),
    .rst_n           (rst_n),
    .instr_sample    (cymbal_rom_out),
    .instr_volume    (cymbal_volume),
    .universal_volume(msg.univ_vol),
    .playback_active (cymbal_running),
    .instr_out       (cymbal_out)
  );

  add_sounds u_add_sounds (
    .snare       (snare_out),
    .cymbal      (cymbal_out),
    .combined_out(mix)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) sound_out <= '0;
    else        sound_out <= mix;
  end

  write_eeprom #(
    .BYTE_PERIOD(EW_BYTE_PERIOD),
    .WE_START   (EW_WE_START)
  ) u_write_eeprom (
    .clk      (clk),
    .rst_n    (rst_n),
    .not_CE   (ew_not_CE),
    .not_WE   (ew_not_WE),
    .not_OE   (ew_not_OE),
    .addr     (ew_addr),
    .data     (ew_data),
    .WRITE_LED(ew_WRITE_LED),
    .DONE_LED (ew_DONE_LED)
  );

  read_eeprom #(
    .STEP_LOG2(ER_STEP_LOG2)
  ) u_read_eeprom (
    .clk     (clk),
    .rst_n   (rst_n),
    .data_in (er_data_in),
    .addr    (er_addr),
    .data_out(er_data_out),
    .not_CE  (er_not_CE),
    .not_OE  (er_not_OE),
    .not_WE  (er_not_WE)
  );

endmodule
