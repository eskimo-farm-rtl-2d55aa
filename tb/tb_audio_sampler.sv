// tb_audio_sampler: with a 7-sample clip and a ROM model, checks that requests
// return the clip in order, loop back to the start (wrapped pulse), that
// muting returns 0 and rewinds, and that nothing changes between requests.
module tb_audio_sampler;
  localparam int CLIP = 7;
  logic clk = 0, reset = 1, play = 0, sample_req = 0, wrapped;
  logic [16:0] rom_addr;
  logic [15:0] rom_data, sample;
  int checks = 0, failures = 0, wraps = 0;

  audio_sampler #(.CLIP_SAMPLES(CLIP), .AW(17)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) rom_data <= 16'(rom_addr * 3 + 100);
  always @(posedge clk) if (wrapped) wraps++;

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic request(input logic [15:0] exp);
    repeat (4) @(negedge clk);
    sample_req = 1;
    @(negedge clk) sample_req = 0;
    checks++;
    if (sample !== exp) begin failures++; $display("FAIL got %0d exp %0d", sample, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    request(0);
    play = 1;
    for (int n = 0; n < 3 * CLIP + 2; n++) request(16'((n % CLIP) * 3 + 100));
    checks++; if (wraps != 3) begin failures++; $display("FAIL wraps %0d", wraps); end
    play = 0;
    request(0); request(0);
    play = 1;
    request(100); request(103);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
