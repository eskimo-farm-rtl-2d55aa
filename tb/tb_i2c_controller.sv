// tb_i2c_controller: sends random three-byte writes to a slave model and checks
// the word received, START/STOP, the ACK result (one transfer is not
// acknowledged) and the transfer length of 30 stages of CLK_DIV clocks.
module tb_i2c_controller;
  localparam int DIV = 16;
  logic clk = 0, reset = 1, start = 0, busy, done, ack, scl, sda_oe, sda_in;
  logic [23:0] data;
  logic [23:0] words [16];
  int nwords, nstarts, nacked, checks = 0, failures = 0, cyc;

  i2c_controller #(.CLK_DIV(DIV)) dut (.clk, .reset, .start, .data, .busy, .done, .ack, .scl, .sda_oe, .sda_in);
  i2c_slave_model slave (.scl, .master_sda_oe(sda_oe), .sda(sda_in), .nack_first(1),
                         .words, .nwords, .nstarts, .nacked_words(nacked));
  always #5 clk = ~clk;

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [23:0] sent [8];
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < 8; n++) begin
      @(negedge clk); sent[n] = 24'($urandom); data = sent[n]; start = 1;
      @(negedge clk); start = 0; data = 24'($urandom);
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++; if (ack !== (n != 0)) begin failures++; $display("FAIL ack %0d", n); end
      checks++; if (cyc != 30 * DIV + 1) begin failures++; $display("FAIL length %0d", cyc); end
      checks++; if (scl !== 1 || sda_in !== 1) failures++;
      repeat (5) @(negedge clk);
    end
    checks++; if (nwords != 8 || nstarts != 8) begin failures++; $display("FAIL count %0d %0d", nwords, nstarts); end
    for (int n = 0; n < 8; n++) begin
      checks++; if (words[n] !== sent[n]) begin failures++; $display("FAIL word %0d %h %h", n, words[n], sent[n]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
