// tb_audio_codec_if: feeds a new random sample at every request and decodes
// DACDAT as a left-justified 16-bit receiver would (bits on BCLK rising edges,
// MSB first, first 16 bits after each LRCLK edge). Both channels must carry
// the sample; checks 256 clocks per frame and 64 BCLKs per frame.
module tb_audio_codec_if;
  logic clk = 0, reset = 1, sample_req, bclk, lrclk, dacdat;
  logic [15:0] sample = 0;
  int checks = 0, failures = 0;

  audio_codec_if dut (.*);
  always #44 clk = ~clk;

  initial begin
    #50_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [15:0] pending, current;
  always @(posedge clk) if (sample_req) begin
    pending = 16'($urandom);
    sample <= pending;
  end

  int nb, frames = 0, bclks = 0;
  logic [15:0] rx;
  logic prev_lr = 0;
  time t_frame = 0, period = 0;
  always @(posedge bclk) if (!reset) begin
    bclks++;
    if (nb < 16) begin rx = {rx[14:0], dacdat}; nb++; end
    else begin checks++; if (dacdat !== 0) failures++; end
  end
  always @(lrclk) if (!reset) begin
    if (t_frame != 0 && nb == 16) begin
      checks++;
      if (rx !== current) begin failures++; if (failures < 10) $display("FAIL rx %h exp %h", rx, current); end
    end
    if (lrclk) begin
      frames++;
      if (t_frame != 0) period = $time - t_frame;
      t_frame = $time;
      current = sample;
      if (frames == 10) begin checks++; if (bclks != 9 * 64) failures++; end
    end
    nb = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait (frames == 40);
    checks++; if (period != 256 * 88) begin failures++; $display("FAIL period %0t", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
