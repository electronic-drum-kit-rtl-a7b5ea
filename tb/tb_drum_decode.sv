// tb_drum_decode: self-checking testbench for drum_decode.
//
// Drives random drum IDs and hit strengths every cycle and checks one cycle
// later that only the named drum's output carries the strength: ID 1 to the
// snare, ID 2 to the cymbal, IDs 0 and 3 to neither.
module tb_drum_decode;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] id;
  logic [7:0] vol, to_s, to_c;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};

  drum_decode dut (.clk(clk), .rst_n(rst_n), .drum_num(id), .SPI_volume(vol),
                   .to_snare(to_s), .to_cymbal(to_c));

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] pid;
    logic [7:0] pvol;
    id = 0; vol = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (to_s != 0 || to_c != 0) failures++;
    for (int k = 0; k < 5000; k++) begin
      pid = 2'($urandom); pvol = 8'($urandom);
      id = pid; vol = pvol;
      @(negedge clk);
      seen[pid]++;
      checks++;
      if (to_s != ((pid == 2'd1) ? pvol : 8'd0) || to_c != ((pid == 2'd2) ? pvol : 8'd0)) begin
        failures++;
        $display("FAIL id=%0d vol=%0d -> snare %0d cymbal %0d", pid, pvol, to_s, to_c);
      end
    end
    foreach (seen[i]) begin checks++; if (seen[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
