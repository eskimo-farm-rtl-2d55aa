// audio_rom: 131072 x 16-bit ROM for the background music clip.
//
// Synchronous single-port ROM: `q` takes the word at `addr` on the next
// clock edge. The clip itself is not available here, so the array is filled
// at elaboration with eskimo_pkg::audio_test_sample, a sawtooth test tone
// (sample i = i*1499 mod 65536, as signed 16-bit PCM). Load real 16-bit
// 44.1 kHz PCM data with $readmemh instead to play music.
module audio_rom
  import eskimo_pkg::*;
#(
  parameter int unsigned WORDS = 131072,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [WIDTH-1:0]         q
);
  logic [WIDTH-1:0] mem [WORDS];

  initial begin
    for (int unsigned a = 0; a < WORDS; a++) mem[a] = WIDTH'(audio_test_sample(a));
  end

  always_ff @(posedge clk) q <= mem[addr];
endmodule
