// tb_audio_rom: reads random and boundary addresses of the 128K-word clip ROM
// and compares with the test-tone formula, one clock of read latency.
module tb_audio_rom;
  logic clk = 0;
  logic [16:0] addr;
  logic [15:0] q;
  int checks = 0, failures = 0;

  audio_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a;
    for (int n = 0; n < 3000; n++) begin
      a = (n == 0) ? 0 : (n == 1) ? 131071 : $urandom_range(0, 131071);
      @(negedge clk) addr = 17'(a);
      @(posedge clk); #1;
      checks++;
      if (q !== 16'((a * 1499) % 65536)) begin failures++; if (failures < 10) $display("FAIL %0d %h", a, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
