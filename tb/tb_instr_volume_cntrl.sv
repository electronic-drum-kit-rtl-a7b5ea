// tb_instr_volume_cntrl: self-checking testbench for instr_volume_cntrl.
//
// Sends one-cycle hit-strength and universal-volume values, as the SPI path
// does, separated by stretches of zeros, and checks every cycle that the
// output equals the sample shifted by the reference tables of tb_ref_pkg for
// the last non-zero values received, and 0 while playback_active is low. Every
// hit-strength band and every universal-volume band, including mute and the
// unshifted top value 63, must be exercised.
module tb_instr_volume_cntrl;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] sample, hit, out;
  logic [5:0] univ;
  logic active;
  int checks = 0, failures = 0;
  int cur_hit = 0, cur_univ = 0;
  int hit_band[4] = '{0, 0, 0, 0};
  int univ_band[9] = '{0, 0, 0, 0, 0, 0, 0, 0, 0};

  instr_volume_cntrl dut (.clk(clk), .rst_n(rst_n), .instr_sample(sample), .instr_volume(hit),
                          .universal_volume(univ), .playback_active(active), .instr_out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int exp;
    exp = active ? ref_scale(int'(sample), cur_hit, cur_univ) : 0;
    checks++;
    if (int'(out) != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL sample %0d hit %0d univ %0d active %0d: got %0d expected %0d",
                 sample, cur_hit, cur_univ, active, out, exp);
    end
  endtask

  initial begin
    sample = 0; hit = 0; univ = 0; active = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      // a message: one cycle of non-zero values (either may be 0 = "no news")
      hit  = (k % 7 == 3) ? 8'd0 : 8'($urandom);
      univ = (k % 11 == 5) ? 6'd0 : ((k % 5 == 0) ? 6'd63 : 6'($urandom));
      @(negedge clk);
      if (hit != 0)  cur_hit  = int'(hit);
      if (univ != 0) cur_univ = int'(univ);
      hit = 0; univ = 0;
      // the voice plays for a while with random samples
      repeat (1 + k % 6) begin
        sample = 8'($urandom);
        active = ($urandom_range(0, 7) != 0);
        #1 check_now();
        if (active) begin
          hit_band[ref_hit_shift(cur_hit)]++;
          univ_band[(cur_univ == 63) ? 8 : cur_univ / 8]++;
        end
        @(negedge clk);
      end
    end
    foreach (hit_band[i])  begin checks++; if (hit_band[i] == 0)  begin failures++; $display("FAIL hit band %0d unused", i); end end
    foreach (univ_band[i]) begin checks++; if (univ_band[i] == 0) begin failures++; $display("FAIL univ band %0d unused", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
