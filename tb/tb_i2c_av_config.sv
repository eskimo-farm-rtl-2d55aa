// tb_i2c_av_config: runs the codec configuration against a slave model that
// refuses the first transfer; expects the 11 codec register writes, in order,
// to device 0x34, one retry, then `configured`.
module tb_i2c_av_config;
  logic clk = 0, reset = 1, scl, sda_oe, sda_in, configured;
  logic [3:0] status;
  logic [23:0] words [16];
  int nwords, nstarts, nacked, checks = 0, failures = 0;
  logic [15:0] expv [11] = '{16'h0C10, 16'h0017, 16'h0217, 16'h0479, 16'h0679, 16'h08D4,
                             16'h0A04, 16'h0E01, 16'h1020, 16'h0C00, 16'h1201};

  i2c_av_config #(.CLK_DIV(8)) dut (.*);
  i2c_slave_model slave (.scl, .master_sda_oe(sda_oe), .sda(sda_in), .nack_first(1),
                         .words, .nwords, .nstarts, .nacked_words(nacked));
  always #5 clk = ~clk;

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    checks++; if (status !== 0 || configured) failures++;
    wait (configured);
    repeat (50) @(negedge clk);
    checks++; if (nwords != 12) begin failures++; $display("FAIL nwords %0d", nwords); end
    checks++; if (status !== 4'd10) failures++;
    checks++; if (words[0] !== {8'h34, expv[0]}) failures++;     // refused, then repeated
    for (int i = 0; i < 11; i++) begin
      checks++;
      if (words[i + 1] !== {8'h34, expv[i]}) begin failures++; $display("FAIL reg %0d %h", i, words[i + 1]); end
    end
    checks++; if (nstarts != 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
