// tb_drum_kit_full: drum_kit_top at its default parameters, one complete hit.
//
// With the full-size sounds (snare 11600 samples of 997 cycles, cymbal 12986
// samples of 2750 cycles) and SPI_clk = clk/32 as in the original kit, a snare
// hit and, while it rings, a cymbal hit are sent, and both sounds play to the
// end (about 36 million cycles, 0.9 s of a 40 MHz clock). drum_kit_scoreboard
// checks sound_out on every cycle. Alongside, the EEPROM writer, at its real
// pace of one byte per 1000001 cycles, must have stored its first bytes
// correctly by then, and the reader, whose address moves every 2**26 cycles,
// must still show the byte at address 0.
module tb_drum_kit_full;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sck, sdi;
  logic [7:0] sound_out;
  logic ew_not_CE, ew_not_WE, ew_not_OE, ew_wled, ew_dled;
  logic [14:0] ew_addr, er_addr;
  logic [7:0] ew_data, er_data_in, er_data_out, unused_q;
  logic er_not_CE, er_not_OE, er_not_WE;
  int checks = 0, failures = 0, reader_bad = 0;

  drum_kit_top dut (
    .clk(clk), .rst_n(rst_n), .SPI_clk(sck), .SPI_in(sdi), .sound_out(sound_out),
    .ew_not_CE(ew_not_CE), .ew_not_WE(ew_not_WE), .ew_not_OE(ew_not_OE), .ew_addr(ew_addr),
    .ew_data(ew_data), .ew_WRITE_LED(ew_wled), .ew_DONE_LED(ew_dled),
    .er_data_in(er_data_in), .er_addr(er_addr), .er_data_out(er_data_out),
    .er_not_CE(er_not_CE), .er_not_OE(er_not_OE), .er_not_WE(er_not_WE));

  drum_kit_scoreboard #(.SD(997), .SL(11600), .CD(2750), .CL(12986), .HALF(16)) sb (
    .clk(clk), .rst_n(rst_n), .sck(sck), .sdi(sdi), .sound_out(sound_out));

  at28c256_model eeprom (.not_CE(ew_not_CE), .not_OE(ew_not_OE), .not_WE(ew_not_WE),
                         .addr(ew_addr), .d(ew_data), .q(unused_q));

  assign er_data_in = (!er_not_CE && !er_not_OE) ? eeprom.mem[er_addr] : 8'h00;

  always #12.5 clk = ~clk;

  always @(negedge clk) if (rst_n && (er_addr != 0 || er_data_out != eeprom.mem[0])) reader_bad++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb.checks, failures + sb.failures);
    $finish;
  end

  initial begin
    int nbytes, bad;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    foreach (eeprom.mem[i]) eeprom.mem[i] = 8'hFF;
    eeprom.n_writes = 0;
    repeat (20) @(negedge clk);
    sb.send({6'd63, 2'd1, 8'd230});   // snare
    sb.send(16'h0000);                // clear word
    repeat (2_000_000) @(negedge clk);
    sb.send({6'd60, 2'd2, 8'd170});   // cymbal while the snare rings
    sb.send(16'h0000);
    while (!sb.idle()) @(negedge clk);
    repeat (10) @(negedge clk);
    check(sb.hits[0] == 1 && sb.hits[1] == 1 && sb.ends == 2, "both sounds played to the end");
    check(sb.overlap > 1_000_000, $sformatf("voices overlapped for %0d cycles", sb.overlap));
    nbytes = eeprom.n_writes;
    check(nbytes >= 30 && ew_dled == 0, $sformatf("EEPROM writer busy, %0d bytes so far", nbytes));
    bad = 0;
    for (int i = 0; i < nbytes; i++) if (int'(eeprom.mem[i]) != ref_kick(i)) bad++;
    check(bad == 0, $sformatf("%0d EEPROM bytes wrong", bad));
    check(reader_bad == 0, "reader at address 0 shows its byte");
    $display("cycles %0d, overlap %0d, EEPROM bytes %0d", sb.e_cnt, sb.overlap, nbytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb.checks, failures + sb.failures);
    $finish;
  end
endmodule
