// tb_add_sounds: exhaustive self-checking testbench for add_sounds.
//
// Applies all 65536 input pairs and checks the output against (a + b) mod 256,
// counting how many pairs overflow (wrap around) and how many do not.
module tb_add_sounds;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0, wraps = 0;

  add_sounds dut (.snare(a), .cymbal(b), .combined_out(y));

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(y) != (i + j) % 256) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d gave %0d", i, j, y);
        end
        if (i + j > 255) wraps++;
      end
    checks++;
    if (wraps != 32640) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
