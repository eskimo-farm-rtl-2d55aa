// tb_audio_controller: the audio peripheral with its two clocks (50 MHz bus,
// 11.2896 MHz codec). Checks that the codec gets its 11 configuration writes
// over I2C, decodes the serial audio as a left-justified receiver, and checks
// that after a play write the words are the clip in order, looping (a clip
// of 8 samples here), that a mute write brings silence and that playing again
// restarts the clip from its first sample.
module tb_audio_controller;
  import eskimo_pkg::*;
  localparam int CLIP = 8;
  logic clk = 0, aud_clk = 0, reset = 1;
  logic address = 0, write = 0, chipselect = 0;
  logic [15:0] writedata = 0;
  logic aud_xck, aud_bclk, aud_daclrck, aud_adclrck, aud_dacdat;
  logic i2c_sclk, i2c_sda_oe, i2c_sda_in, configured;
  logic [3:0] config_status;
  logic [23:0] words [16];
  int nwords, nstarts, nacked, checks = 0, failures = 0;

  audio_controller #(.CLIP_SAMPLES(CLIP), .I2C_CLK_DIV(8)) dut (.*);
  i2c_slave_model slave (.scl(i2c_sclk), .master_sda_oe(i2c_sda_oe), .sda(i2c_sda_in), .nack_first(0),
                         .words, .nwords, .nstarts, .nacked_words(nacked));
  always #10 clk = ~clk;
  always #44.289 aud_clk = ~aud_clk;

  initial begin
    #100_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Left-justified receiver, left channel only.
  logic [15:0] rx, got [$];
  int nb = 0;
  always @(posedge aud_bclk) if (nb < 16) begin rx = {rx[14:0], aud_dacdat}; nb++; end
  always @(aud_daclrck) begin
    if (!aud_daclrck && nb == 16) got.push_back(rx);   // left half finished
    nb = 0;
  end

  task automatic ctrl(input logic [15:0] d);
    @(negedge clk); writedata = d; write = 1; chipselect = 1;
    @(negedge clk); write = 0; chipselect = 0;
  endtask
  task automatic frames(input int n);
    int k; k = got.size(); wait (got.size() >= k + n);
  endtask
  function automatic int find_start(int from);
    for (int i = from; i < got.size(); i++) if (got[i] == audio_test_sample(1)) return i - 1;
    return -1;
  endfunction

  initial begin
    int s0, first;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    frames(5);
    checks++; foreach (got[i]) if (got[i] != 0) begin failures++; break; end  // silent until play
    first = got.size();
    ctrl(16'h0001);
    frames(3 * CLIP + 6);
    s0 = find_start(first);
    checks++; if (s0 < first) begin failures++; $display("FAIL clip never started"); end
    else for (int i = s0; i < got.size(); i++) begin
      checks++;
      if (got[i] != audio_test_sample((i - s0) % CLIP)) begin failures++; $display("FAIL sample %0d: %h", i - s0, got[i]); end
    end
    ctrl(16'h0000);
    frames(4);
    first = got.size();
    frames(6);
    for (int i = first; i < got.size(); i++) begin checks++; if (got[i] != 0) failures++; end
    first = got.size();
    ctrl(16'h0001);
    frames(6);
    s0 = find_start(first);
    checks++; if (s0 < first || got[s0] != 0) begin failures++; $display("FAIL no restart"); end
    wait (configured);
    checks++; if (nwords != 11 || config_status != 10) begin failures++; $display("FAIL config %0d", nwords); end
    checks++; if (words[7] !== 24'h340E01 || words[8] !== 24'h341020) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
