// tb_spi_rcv: self-checking testbench for spi_rcv.
//
// Sends 16-bit words MSB first as the microcontroller does (data changes while
// SPI_CLK is low, sampled on its rising edge; SPI_CLK = clk/32, as 40 MHz / 32
// in the original kit), including the all-zero word that follows every hit
// and random words. Checks that each non-zero word shows up once, split into
// its two bytes, for exactly one clk cycle, from the third clk edge at which
// the last bit's SPI_CLK is high, and that the outputs are 0 otherwise.
module tb_spi_rcv;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sck = 1'b0, sdi = 1'b0;
  logic [7:0] s1, s2;
  int checks = 0, failures = 0;
  int cyc = 0;
  int last_rise_edge;
  int n_out = 0;
  logic [15:0] got_word;
  int got_edge;

  spi_rcv dut (.clk(clk), .rst_n(rst_n), .SPI_CLK(sck), .SPI_IN(sdi), .signal_1(s1), .signal_2(s2));

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // watch the outputs on every clk edge
  always @(negedge clk) if (rst_n && (s1 != 0 || s2 != 0)) begin
    n_out++;
    got_word = {s1, s2};
    got_edge = cyc;
  end

  task automatic send(input logic [15:0] w, input int half);
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk); sdi = w[i];
      repeat (half) @(negedge clk);
      sck = 1'b1;
      @(posedge clk);
      if (i == 0) last_rise_edge = cyc;  // cyc counts this edge from here on
      repeat (half - 1) @(negedge clk);
      @(negedge clk); sck = 1'b0;
    end
  endtask

  task automatic send_and_check(input logic [15:0] w, input int half);
    int n_before;
    n_before = n_out;
    send(w, half);
    repeat (2 * half + 8) @(negedge clk);
    if (w == 16'h0) check(n_out == n_before, "zero word gives no output");
    else begin
      check(n_out == n_before + 1, $sformatf("one output cycle for %h (got %0d)", w, n_out - n_before));
      check(got_word == w, $sformatf("word %h received as %h", w, got_word));
      // cyc was incremented at the edge itself; the output edge is 3 edges later
      check(got_edge - last_rise_edge == 3,
            $sformatf("latency %0d edges, expected 3", got_edge - last_rise_edge));
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check(s1 == 0 && s2 == 0, "outputs idle at 0");
    send_and_check({6'd63, 2'd1, 8'd200}, 16);
    send_and_check(16'h0000, 16);
    send_and_check({6'd12, 2'd2, 8'd37}, 16);
    send_and_check(16'h0000, 16);
    send_and_check(16'h8001, 16);
    send_and_check(16'hFFFF, 16);
    for (int k = 0; k < 40; k++) send_and_check(16'($urandom), 4 + k % 13);
    check(n_out > 40, "outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
