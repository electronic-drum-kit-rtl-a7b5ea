// tb_ref_pkg: reference arithmetic for the drum kit testbenches.
//
// Written apart from the RTL: 64-bit arithmetic for the sample formulas and
// lookup tables for the volume shifts, so that a slip in the RTL's version of
// a formula or threshold shows up as a mismatch.
package tb_ref_pkg;

  localparam int SNARE_N  = 11600;
  localparam int CYMBAL_N = 12986;
  localparam int KICK_N   = 7755;

  function automatic int ref_noise(input longint n);
    longint h;
    h = (n * 64'd1103515245 + 64'd12345) & 64'hFFFF_FFFF;
    return int'((h >> 16) & 64'hFF);
  endfunction

  // triangle: rises -128..127 over the first half period, falls 127..-128 over the second
  function automatic int ref_tri(input longint n, input longint period);
    longint ph;
    ph = ((n % period) * 512) / period;
    return (ph < 256) ? int'(ph - 128) : int'(383 - ph);
  endfunction

  function automatic int ref_env_q(input longint n, input longint len);
    longint lin;
    lin = ((len - n) * 255) / len;
    return int'((lin * lin) / 255);
  endfunction

  // C-style truncating division, as SystemVerilog integer division does
  function automatic int tdiv(input longint a, input longint b);
    return int'(a / b);
  endfunction

  function automatic int ref_snare(input int n);
    longint m;
    if (n >= SNARE_N) return 0;
    m = tdiv((ref_noise(n) - 128) * 3 + ref_tri(n, 245), 4);
    return int'((128 + tdiv(m * ref_env_q(n, SNARE_N), 256)) & 255);
  endfunction

  function automatic int ref_cymbal(input int n);
    longint hp, lin;
    if (n >= CYMBAL_N) return 0;
    hp  = tdiv(ref_noise(n) - ref_noise(n + 1), 2);
    lin = ((CYMBAL_N - n) * 255) / CYMBAL_N;
    return int'((128 + tdiv(hp * lin, 256)) & 255);
  endfunction

  function automatic int ref_kick(input int n);
    if (n >= KICK_N) return 0;
    return int'((128 + tdiv(ref_tri(n, 400) * ref_env_q(n, KICK_N), 256)) & 255);
  endfunction

  // stage-1 shift by hit strength: bands [0,128) [128,160) [160,192) [192,256)
  function automatic int ref_hit_shift(input int v);
    int bounds[3] = '{128, 160, 192};
    int s = 3;
    foreach (bounds[i]) if (v >= bounds[i]) s = 2 - i;
    return s;
  endfunction

  // stage-2 shift by universal volume; -1 means muted
  function automatic int ref_univ_shift(input int u);
    int table8[8] = '{-1, 7, 6, 5, 4, 3, 2, 1};
    if (u == 63) return 0;
    return table8[u / 8];
  endfunction

  function automatic int ref_scale(input int sample, input int hit, input int univ);
    int s2;
    s2 = ref_univ_shift(univ);
    if (s2 < 0) return 0;
    return (sample >> ref_hit_shift(hit)) >> s2;
  endfunction

endpackage
