// tb_drum_kit_top: end-to-end testbench of drum_kit_top at reduced sizes.
//
// The drum kit runs with short sounds (snare 200 samples of 9 cycles, cymbal
// 300 samples of 13 cycles) and SPI_clk = clk/16; drum_kit_scoreboard sends the
// SPI words and checks sound_out on every cycle against its own model. The
// sequence: a loud snare hit played to its end, the all-zero clear word, a
// cymbal hit, a snare hit over the ringing cymbal (both voices sound and their
// sum wraps past 255), cymbal and snare restarts, a word for the unused drum
// ID 3 that only changes the universal volume, a hit at master volume 0..7
// (muted), and hits in every hit-strength band. Each of these must happen at
// least once.
//
// The EEPROM tools run alongside with a 10-cycle byte period and 4-cycle
// address steps: the writer fills a behavioural EEPROM, which must then hold the
// kick sound, and the reader, looking at that same EEPROM, must show on its LEDs
// the byte at its current address.
module tb_drum_kit_top;
  import tb_ref_pkg::*;
  localparam int SD = 9, SL = 200, CD = 13, CL = 300;
  localparam int BP = 10, WS = 6, RS = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sck, sdi;
  logic [7:0] sound_out;
  logic ew_not_CE, ew_not_WE, ew_not_OE, ew_wled, ew_dled;
  logic [14:0] ew_addr, er_addr;
  logic [7:0] ew_data, er_data_in, er_data_out, unused_q;
  logic er_not_CE, er_not_OE, er_not_WE;
  int checks = 0, failures = 0, reader_bad = 0, reader_checks = 0;

  drum_kit_top #(
    .SNARE_DURATION_LIMIT(27'(SD)), .SNARE_ADDR_LIMIT(14'(SL)),
    .CYMBAL_DURATION_LIMIT(27'(CD)), .CYMBAL_ADDR_LIMIT(14'(CL)),
    .EW_BYTE_PERIOD(BP), .EW_WE_START(WS), .ER_STEP_LOG2(RS)
  ) dut (
    .clk(clk), .rst_n(rst_n), .SPI_clk(sck), .SPI_in(sdi), .sound_out(sound_out),
    .ew_not_CE(ew_not_CE), .ew_not_WE(ew_not_WE), .ew_not_OE(ew_not_OE), .ew_addr(ew_addr),
    .ew_data(ew_data), .ew_WRITE_LED(ew_wled), .ew_DONE_LED(ew_dled),
    .er_data_in(er_data_in), .er_addr(er_addr), .er_data_out(er_data_out),
    .er_not_CE(er_not_CE), .er_not_OE(er_not_OE), .er_not_WE(er_not_WE));

  drum_kit_scoreboard #(.SD(SD), .SL(SL), .CD(CD), .CL(CL), .HALF(8)) sb (
    .clk(clk), .rst_n(rst_n), .sck(sck), .sdi(sdi), .sound_out(sound_out));

  at28c256_model eeprom (.not_CE(ew_not_CE), .not_OE(ew_not_OE), .not_WE(ew_not_WE),
                         .addr(ew_addr), .d(ew_data), .q(unused_q));

  // the reader sees the same EEPROM contents on its own bus
  assign er_data_in = (!er_not_CE && !er_not_OE) ? eeprom.mem[er_addr] : 8'h00;

  always #12.5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    reader_checks++;
    if (er_data_out != eeprom.mem[er_addr] || !er_not_WE) reader_bad++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic hit(input int univ, input int id, input int strength);
    sb.send({6'(univ), 2'(id), 8'(strength)});
  endtask

  task automatic wait_idle();
    while (!sb.idle()) @(negedge clk);
    repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb.checks, failures + sb.failures);
    $finish;
  end

  initial begin
    int bad;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    foreach (eeprom.mem[i]) eeprom.mem[i] = 8'hFF;
    eeprom.n_writes = 0;
    repeat (20) @(negedge clk);
    hit(63, 1, 200);            // loud snare, to its end
    sb.send(16'h0000);          // clear word
    wait_idle();
    check(sb.ends >= 1, "snare ran to its end");
    hit(63, 2, 250);            // loud cymbal
    sb.send(16'h0000);
    hit(63, 1, 255);            // snare over the cymbal: both sound, sums wrap
    repeat (400) @(negedge clk);
    hit(56, 2, 170);            // restart cymbal, quieter master volume
    hit(40, 1, 130);            // restart snare
    hit(20, 3, 99);             // drum ID 3: no drum, master volume changes
    wait_idle();
    hit(5, 1, 220);             // master volume 5: muted
    wait_idle();
    hit(30, 2, 60);             // softest hit-strength band
    repeat (100) @(negedge clk);
    hit(63, 1, 180);
    hit(48, 2, 140);
    wait_idle();
    for (int k = 0; k < 6; k++) begin
      hit($urandom_range(8, 63), $urandom_range(1, 2), $urandom_range(1, 255));
      repeat ($urandom_range(0, 900)) @(negedge clk);
    end
    wait_idle();
    // EEPROM copy
    wait (ew_dled);
    repeat (50) @(negedge clk);
    check(eeprom.n_writes == KICK_N, $sformatf("%0d EEPROM bytes written", eeprom.n_writes));
    bad = 0;
    for (int i = 0; i < KICK_N; i++) if (int'(eeprom.mem[i]) != ref_kick(i)) bad++;
    check(bad == 0, $sformatf("%0d EEPROM bytes wrong", bad));
    check(reader_bad == 0 && reader_checks > 1000, "reader shows the EEPROM byte at its address");
    // every mechanism happened
    check(sb.hits[0] >= 3 && sb.hits[1] >= 3, "both voices hit");
    check(sb.restarts >= 2, $sformatf("restarts %0d", sb.restarts));
    check(sb.overlap > 100, $sformatf("overlap cycles %0d", sb.overlap));
    check(sb.wraps > 0, $sformatf("wrapping sums %0d", sb.wraps));
    check(sb.muted > 100, $sformatf("muted cycles %0d", sb.muted));
    check(sb.ignored >= 3, $sformatf("ignored words %0d", sb.ignored));
    check(sb.ends >= 4, $sformatf("sounds ended %0d", sb.ends));
    foreach (sb.band[i]) check(sb.band[i] > 0, $sformatf("hit band %0d used", i));
    $display("events: hits %0d/%0d restarts %0d overlap %0d wraps %0d muted %0d ignored %0d ends %0d",
             sb.hits[0], sb.hits[1], sb.restarts, sb.overlap, sb.wraps, sb.muted, sb.ignored, sb.ends);
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb.checks, failures + sb.failures);
    $finish;
  end
endmodule
