// tb_playback_fsm: self-checking testbench for playback_fsm.
//
// For several (duration_limit, addr_limit) pairs it pulses volume for one cycle
// and checks, cycle by cycle, the expected timeline: FSM_RUNNING rises the
// cycle after the pulse, address 0 lasts duration_limit+1 cycles, each later
// address duration_limit cycles, addresses 0..addr_limit-1 in order, then the
// machine is idle at address 0. It also checks that a pulse during playback
// restarts the sound (drum roll) and that a pulse with volume 0 does nothing.
module tb_playback_fsm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  volume = 8'd0;
  logic [26:0] dlim;
  logic [13:0] alim;
  logic [13:0] addr;
  logic        running;
  int checks = 0, failures = 0;
  int restarts = 0;

  playback_fsm dut (.clk(clk), .rst_n(rst_n), .volume(volume), .duration_limit(dlim),
                    .addr_limit(alim), .addr(addr), .FSM_RUNNING(running));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one-cycle hit; returns at the negedge after the FSM has taken it
  task automatic hit(input logic [7:0] v);
    volume = v;
    @(negedge clk);
    volume = 8'd0;
  endtask

  // expect the full timeline, starting at the first negedge after the hit
  task automatic expect_sound(input int d, input int n);
    int per;
    per = (d < 2) ? 2 : d;
    for (int k = 0; k < n; k++) begin
      int len;
      len = (k == 0) ? per + 1 : per;
      for (int c = 0; c < len; c++) begin
        check(running && addr == 14'(k), $sformatf("d=%0d n=%0d: addr %0d cycle %0d (got %0d run %0d)",
                                                d, n, k, c, addr, running));
        @(negedge clk);
      end
    end
    check(!running && addr == 0, $sformatf("d=%0d n=%0d: idle after sound", d, n));
    repeat (3) @(negedge clk);
    check(!running && addr == 0, "stays idle");
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int dl[6] = '{5, 2, 1, 9, 3, 997};
    static int al[6] = '{7, 1, 4, 20, 50, 3};
    dlim = 27'd5; alim = 14'd7;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!running && addr == 0, "idle after reset");
    foreach (dl[i]) begin
      dlim = 27'(dl[i]); alim = 14'(al[i]);
      hit(8'(1 + $urandom_range(0, 254)));
      expect_sound(dl[i], al[i]);
    end
    // volume 0 does not start anything
    repeat (20) @(negedge clk);
    check(!running, "no start on volume 0");
    // drum roll: restart in the middle of a sound, several times
    dlim = 27'd4; alim = 14'd30;
    hit(8'd90);
    for (int r = 0; r < 3; r++) begin
      repeat (4 * (5 + 3 * r) + 2) @(negedge clk);
      check(running && addr != 0, "playing before restart");
      hit(8'd200);
      restarts++;
      check(running && addr == 0, "restart goes back to address 0");
      repeat (4) @(negedge clk);
      check(running && addr == 0, "address 0 held duration+1 after restart");
      @(negedge clk);
      check(running && addr == 1, "then address 1");
    end
    hit(8'd1);
    expect_sound(4, 30);
    check(restarts == 3, "restarts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
