// drum_pkg: types, default sizes and sample-table formulas shared by the drum kit.
//
// The SPI word sent by the microcontroller for every drum hit is 16 bits, most
// significant first: 6 bits of universal (master) volume, 2 bits of drum ID and
// 8 bits of hit strength. spi_msg_t gives that layout a name.
//
// The sample ROMs of the original kit held recorded snare, cymbal and kick
// drum sounds. Those recordings are not part of this RTL, so the ROMs are filled
// at elaboration with synthetic drum-like waveforms computed by the functions
// below: a pseudo-random noise value from an integer hash of the address, a
// triangle tone, and a quadratic decay envelope. Every value is unsigned 8 bit,
// centred on 128, as the original samples were scaled to 0..255. Addresses at or
// beyond a sound's sample count read as 0.
package drum_pkg;

  typedef struct packed {
    logic [5:0] univ_vol;  // universal volume, from the potentiometer
    logic [1:0] drum_id;   // which pad was hit (0 = no drum)
    logic [7:0] hit;       // hit strength (peak ADC reading)
  } spi_msg_t;

  // Drum IDs as sent by the microcontroller: ADC channel 1 sends 1, channel 2 sends 2.
  localparam logic [1:0] SNARE_ID  = 2'd1;
  localparam logic [1:0] CYMBAL_ID = 2'd2;

  localparam int unsigned ROM_DEPTH    = 16384;  // words per drum ROM
  localparam int unsigned ROM_AW       = 14;     // address width of a drum ROM
  localparam int unsigned DUR_W        = 27;     // width of duration_limit
  localparam int unsigned SNARE_SAMPLES  = 11600;
  localparam int unsigned CYMBAL_SAMPLES = 12986;
  localparam int unsigned KICK_SAMPLES   = 7755;  // addresses 0..7754
  localparam int unsigned KICK_DEPTH     = 8192;

  // Pseudo-random byte, a function of n only: upper bits of a linear
  // congruential step 1103515245*n + 12345 (mod 2^32), bits 23:16.
  function automatic logic [7:0] noise8(input int unsigned n);
    return 8'((32'(n) * 32'd1103515245 + 32'd12345) >> 16);
  endfunction

  // Triangle wave of the given period, -128..127.
  function automatic int tri_wave(input int unsigned n, input int unsigned period);
    int unsigned ph;
    int v;
    ph = (n % period) * 512 / period;  // 0..511
    if (ph < 256) v = int'(ph) - 128;
    else          v = 383 - int'(ph);
    return v;
  endfunction

  // Quadratic decay from 255 at n = 0 to 0 at n = len.
  function automatic int env_q(input int unsigned n, input int unsigned len);
    int lin;
    lin = int'((len - n) * 255 / len);
    return lin * lin / 255;
  endfunction

  // Snare: mostly noise with a 180 Hz-like tone (period 245 samples), fast decay.
  function automatic logic [7:0] snare_sample(input int unsigned n);
    int mix;
    if (n >= SNARE_SAMPLES) return 8'd0;
    mix = ((int'(noise8(n)) - 128) * 3 + tri_wave(n, 245)) / 4;
    return 8'(128 + mix * env_q(n, SNARE_SAMPLES) / 256);
  endfunction

  // Cymbal: high-passed noise (difference of neighbouring noise values), linear decay.
  function automatic logic [7:0] cymbal_sample(input int unsigned n);
    int hp;
    int lin;
    if (n >= CYMBAL_SAMPLES) return 8'd0;
    hp  = (int'(noise8(n)) - int'(noise8(n + 1))) / 2;
    lin = int'((CYMBAL_SAMPLES - n) * 255 / CYMBAL_SAMPLES);
    return 8'(128 + hp * lin / 256);
  endfunction

  // Kick: low triangle tone (period 400 samples) with quadratic decay.
  function automatic logic [7:0] kick_sample(input int unsigned n);
    if (n >= KICK_SAMPLES) return 8'd0;
    return 8'(128 + tri_wave(n, 400) * env_q(n, KICK_SAMPLES) / 256);
  endfunction

endpackage
