// drum_kit_scoreboard: SPI driver and cycle-exact reference model of the drum kit.
//
// send() shifts one 16-bit word out on sck/sdi like the microcontroller's SPI
// master (MSB first, data set while sck is low, sck high and low for HALF clk
// cycles each). From the clk edge at which the last bit's sck is first seen
// (edge X+1, X = edges so far), the model takes the word to be decoded at edge
// n = X+3: the universal volume (if non-zero) is held from edge n+1, and a hit
// for drum 1 (snare) or 2 (cymbal) with non-zero strength starts that voice at
// edge n+2. A started voice plays address 0 for D+1 edges and each of the
// addresses 1..L-1 for D edges, D and L being that voice's duration and
// sample-count parameters.
//
// Every clk cycle after reset, the model predicts sound_out after edge t as
// the 8-bit sum, over both voices, of the ROM sample at the voice's address
// after edge t-2, scaled (tb_ref_pkg::ref_scale) by the voice's hit strength
// and the universal volume after edge t-1, for a voice running after edge t-1.
// Any difference counts a failure. It also counts the events an end-to-end
// test must produce: hits per voice, restarts of a playing voice, cycles with
// both voices sounding, sums that wrap past 255, muted cycles, hit-strength
// bands, ignored words and sounds that ran to their end.
module drum_kit_scoreboard #(
  parameter int SD   = 997,
  parameter int SL   = 11600,
  parameter int CD   = 2750,
  parameter int CL   = 12986,
  parameter int HALF = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       sck,
  output logic       sdi,
  input  logic [7:0] sound_out
);
  import tb_ref_pkg::*;

  longint e_cnt = 0;
  longint trig[2][$];
  int     hitv[2][$];
  longint u_edge[$];
  int     u_val[$];

  int checks = 0, failures = 0;
  int hits[2] = '{0, 0};
  int restarts = 0, overlap = 0, wraps = 0, muted = 0, ignored = 0, ends = 0;
  int band[4] = '{0, 0, 0, 0};
  bit was_running[2] = '{0, 0};

  initial begin sck = 1'b0; sdi = 1'b0; end

  always @(posedge clk) e_cnt <= e_cnt + 1;

  function automatic int dur(input int v);  return (v == 0) ? SD : CD; endfunction
  function automatic int len(input int v);  return (v == 0) ? SL : CL; endfunction
  function automatic int rom(input int v, input int a); return (v == 0) ? ref_snare(a) : ref_cymbal(a); endfunction

  // state of voice v after edge e
  function automatic void voice_at(input int v, input longint e, output bit run, output int addr, output int hit);
    longint rel;
    int k;
    run = 0; addr = 0; hit = 0;
    for (int i = trig[v].size() - 1; i >= 0; i--) begin
      if (trig[v][i] <= e) begin
        hit = hitv[v][i];
        rel = e - trig[v][i];
        k   = (rel == 0) ? 0 : int'((rel - 1) / dur(v));
        if (k < len(v)) begin run = 1; addr = k; end
        return;
      end
    end
  endfunction

  function automatic int univ_at(input longint e);
    for (int i = u_edge.size() - 1; i >= 0; i--) if (u_edge[i] <= e) return u_val[i];
    return 0;
  endfunction

  task automatic send(input logic [15:0] w);
    longint x;
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk); sdi = w[i];
      repeat (HALF) @(negedge clk);
      sck = 1'b1;
      x = e_cnt;
      if (i == 0) record(w, x + 3);  // before the model needs it at edge x+4
      repeat (HALF) @(negedge clk);
      sck = 1'b0;
    end
  endtask

  // enter the effects of word w, decoded by spi_rcv at edge n, into the model
  task automatic record(input logic [15:0] w, input longint n);
    bit r; int a, h;
    if (w[15:10] != 0) begin u_edge.push_back(n + 1); u_val.push_back(int'(w[15:10])); end
    if ((w[9:8] == 2'd1 || w[9:8] == 2'd2) && w[7:0] != 0) begin
      int v;
      v = int'(w[9:8]) - 1;
      voice_at(v, n + 1, r, a, h);
      if (r) restarts++;
      hits[v]++;
      band[ref_hit_shift(int'(w[7:0]))]++;
      trig[v].push_back(n + 2);
      hitv[v].push_back(int'(w[7:0]));
    end else ignored++;
  endtask

  // true once both voices are idle and no start is pending
  function automatic bit idle();
    bit r0, r1; int a, h;
    voice_at(0, e_cnt, r0, a, h);
    voice_at(1, e_cnt, r1, a, h);
    return !r0 && !r1 && (trig[0].size() == 0 || trig[0][$] <= e_cnt)
                       && (trig[1].size() == 0 || trig[1][$] <= e_cnt);
  endfunction

  always @(negedge clk) if (rst_n && e_cnt > 8) begin
    int exp, sum, u;
    bit run1, run2; int a1, a2, h1, h2, nrun;
    exp = 0; sum = 0; nrun = 0;
    u = univ_at(e_cnt - 1);
    for (int v = 0; v < 2; v++) begin
      voice_at(v, e_cnt - 1, run1, a1, h1);
      voice_at(v, e_cnt - 2, run2, a2, h2);
      if (run1) begin
        sum += ref_scale(rom(v, a2), h1, u);
        nrun++;
        if (ref_univ_shift(u) < 0) muted++;
      end
      if (was_running[v] && !run1) ends++;
      was_running[v] = run1;
    end
    if (nrun == 2) overlap++;
    if (sum > 255) wraps++;
    exp = sum % 256;
    checks++;
    if (int'(sound_out) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL edge %0d: sound_out %0d expected %0d", e_cnt, sound_out, exp);
    end
  end
endmodule
