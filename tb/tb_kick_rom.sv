// tb_kick_rom: self-checking testbench for kick_rom.
//
// Reads every address in random order and then in sequence, and checks each
// word, one clock after its address, against the kick sound formula computed
// independently in tb_ref_pkg (words past the last sample must be 0). It also
// checks that samples stay in 1..255 (no wrap-around of the centred waveform)
// and that the sound is not silent.
module tb_kick_rom;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  logic [12:0] a;
  logic [7:0] q;
  int checks = 0, failures = 0;
  int nonflat = 0;

  kick_rom dut (.address(a), .clock(clk), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int addr);
    int exp;
    a = 13'(addr);
    @(posedge clk);  // registered read
    #1;
    exp = ref_kick(addr);
    checks++;
    if (int'(q) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d: got %0d expected %0d", addr, q, exp);
    end
    if (addr < KICK_N) begin
      checks++;
      if (q == 0) failures++;
      if (q > 8'd140 || q < 8'd116) nonflat++;
    end
  endtask

  initial begin
    @(negedge clk);
    for (int k = 0; k < 3000; k++) read_check($urandom_range(0, 8192 - 1));
    for (int i = 0; i < 8192; i++) read_check(i);
    checks++;
    if (nonflat < 100) begin failures++; $display("FAIL sound nearly flat"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
