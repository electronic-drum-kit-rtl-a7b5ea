// tb_write_eeprom: self-checking testbench for write_eeprom (with kick_rom).
//
// Runs the writer with a short byte period (BYTE_PERIOD 20, WE_START 14) into
// a behavioural EEPROM, then checks that exactly 7755 bytes were written, that
// EEPROM addresses 0..7754 hold the kick sound computed independently in
// tb_ref_pkg and the rest are still erased, that every write strobe is low for
// BYTE_PERIOD-WE_START-1 cycles with WRITE_LED mirroring it, that the fixed
// controls are correct, and that DONE_LED rises after
// (ADDR_LIMIT+1)*(BYTE_PERIOD+1) cycles and the writer then stays quiet.
module tb_write_eeprom;
  import tb_ref_pkg::*;
  localparam int BP = 20, WS = 14, AL = 7754;
  logic clk = 1'b0, rst_n = 1'b0;
  logic not_CE, not_WE, not_OE, wled, dled;
  logic [14:0] addr;
  logic [7:0] data, q;
  int checks = 0, failures = 0;
  int cyc = 0, low_len = 0, bad_pulses = 0, pulses = 0, led_mismatch = 0, done_cyc = -1;

  write_eeprom #(.ADDR_LIMIT(AL), .BYTE_PERIOD(BP), .WE_START(WS)) dut (
    .clk(clk), .rst_n(rst_n), .not_CE(not_CE), .not_WE(not_WE), .not_OE(not_OE),
    .addr(addr), .data(data), .WRITE_LED(wled), .DONE_LED(dled));

  at28c256_model eeprom (.not_CE(not_CE), .not_OE(not_OE), .not_WE(not_WE), .addr(addr), .d(data), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) cyc++;

  always @(negedge clk) if (rst_n) begin
    if (wled != !not_WE) led_mismatch++;
    if (!not_WE) low_len++;
    else if (low_len != 0) begin
      pulses++;
      if (low_len != BP - WS - 1) bad_pulses++;
      low_len = 0;
    end
    if (dled && done_cyc < 0) done_cyc = cyc;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // forget anything the power-up levels of the strobe may have written
    foreach (eeprom.mem[i]) eeprom.mem[i] = 8'hFF;
    eeprom.n_writes = 0;
    check(not_CE == 0 && not_OE == 1, "chip enabled, outputs disabled");
    wait (dled);
    repeat (5 * BP) @(negedge clk);
    check(eeprom.n_writes == AL + 1, $sformatf("%0d bytes written", eeprom.n_writes));
    check(pulses == AL + 1 && bad_pulses == 0, $sformatf("%0d strobes, %0d of wrong width", pulses, bad_pulses));
    check(led_mismatch == 0, "WRITE_LED follows the strobe");
    check(done_cyc == (AL + 1) * (BP + 1) + 1, $sformatf("done after %0d cycles", done_cyc));
    check(not_WE && dled && !wled, "quiet when done");
    bad = 0;
    for (int i = 0; i < 32768; i++) begin
      checks++;
      if (int'(eeprom.mem[i]) != ((i <= AL) ? ref_kick(i) : 255)) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL eeprom[%0d] = %0d", i, eeprom.mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
