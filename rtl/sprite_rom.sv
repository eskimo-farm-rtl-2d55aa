// sprite_rom: one 1024 x 12-bit sprite image ROM.
//
// Synchronous single-port ROM: when `en` is high, `q` takes the word at
// `addr` on the next clock edge. The real sprite images are not available, so
// the array is filled at elaboration with eskimo_pkg::sprite_test_pixel for
// ROM number ROM_INDEX, a placeholder picture that testbenches recompute.
// Replace the initial block with a $readmemh of real image data to show
// actual sprites.
module sprite_rom
  import eskimo_pkg::*;
#(
  parameter int unsigned ROM_INDEX = 0,
  parameter int unsigned WORDS     = 1024
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(WORDS)-1:0] addr,
  output color_t                   q
);
  color_t mem [WORDS];

  initial begin
    for (int unsigned a = 0; a < WORDS; a++) mem[a] = sprite_test_pixel(ROM_INDEX, a);
  end

  always_ff @(posedge clk) begin
    if (en) q <= mem[addr];
  end
endmodule
