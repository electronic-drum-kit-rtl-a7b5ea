// tb_read_eeprom: self-checking testbench for read_eeprom.
//
// With STEP_LOG2 = 3 each address should last 8 cycles. A behavioural EEPROM
// preloaded with a known pattern sits on the bus; the testbench checks every
// cycle that the address equals (cycles since reset) / 8 mod 32768, that the LEDs
// show the EEPROM byte at that address, and that the controls read (CE and OE
// low, WE high). It runs one full sweep plus some cycles, so the wrap back to
// address 0 is exercised.
module tb_read_eeprom;
  localparam int STEP = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [14:0] addr;
  logic [7:0] bus, leds;
  logic not_CE, not_OE, not_WE;
  int checks = 0, failures = 0, wraps = 0;
  longint cyc = 0;

  read_eeprom #(.ADDR_W(15), .STEP_LOG2(STEP)) dut (
    .clk(clk), .rst_n(rst_n), .data_in(bus), .addr(addr), .data_out(leds),
    .not_CE(not_CE), .not_OE(not_OE), .not_WE(not_WE));

  at28c256_model eeprom (.not_CE(not_CE), .not_OE(not_OE), .not_WE(not_WE), .addr(addr), .d(8'h00), .q(bus));

  always #5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] prev = '0;
    for (int i = 0; i < 32768; i++) eeprom.mem[i] = 8'((i * 37) ^ (i >> 7));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < (32768 << STEP) + 100; k++) begin
      #1;
      checks++;
      if (addr != 15'(cyc >> STEP) || leds != 8'((int'(addr) * 37) ^ (int'(addr) >> 7)) ||
          not_CE || not_OE || !not_WE) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d addr %0d leds %0d", cyc, addr, leds);
      end
      if (addr == 0 && prev == 15'h7FFF) wraps++;
      prev = addr;
      @(posedge clk);
      cyc++;
    end
    checks++;
    if (wraps != 1) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
