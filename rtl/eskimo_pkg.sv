// eskimo_pkg: types and constants shared by the graphics and audio blocks.
//
// The sprite packet layout (dim[31:26], id[25:20], y[19:10], x[9:0]) and the
// mapping of sprite ids onto the 36 image ROMs follow the game's design. The
// ROM contents are placeholders: the real sprite images and music clip were
// converted offline, so here every ROM word is computed from a formula
// (sprite_test_pixel, audio_test_sample) that testbenches can recompute.
package eskimo_pkg;

  // One entry of the sprite table, as written by software over the bus.
  typedef struct packed {
    logic [5:0] dim;  // width and height of the square sprite, in pixels
    logic [5:0] id;   // image id, selects the ROM
    logic [9:0] y;    // row of the top-left corner
    logic [9:0] x;    // column of the top-left corner
  } sprite_t;

  localparam int unsigned COLOR_W      = 12;   // 4 bits each of R, G, B
  localparam int unsigned ROM_AW       = 10;   // 1024 words per sprite ROM
  localparam int unsigned NUM_ROMS     = 36;
  localparam int unsigned SPRITE_SLOTS = 30;

  typedef logic [COLOR_W-1:0] color_t;

  // Image ids 1..15 use ROMs 0..14, ids 18..38 use ROMs 15..35. Ids 0, 16,
  // 17 and above 38 have no image.
  function automatic logic id_has_rom(input logic [5:0] id);
    return (id >= 6'd1 && id <= 6'd15) || (id >= 6'd18 && id <= 6'd38);
  endfunction

  function automatic logic [5:0] id_to_rom(input logic [5:0] id);
    if (id <= 6'd15) return id - 6'd1;
    else             return id - 6'd3;
  endfunction

  // Placeholder image: colour of word `addr` in ROM `rom`.
  function automatic color_t sprite_test_pixel(input int unsigned rom, input int unsigned addr);
    return color_t'((rom * 273 + addr * 7) % 4096);
  endfunction

  // Placeholder clip: a sawtooth of about 1.3 kHz at 44.1 kHz.
  function automatic logic [15:0] audio_test_sample(input int unsigned i);
    return 16'((i * 1499) % 65536);
  endfunction

endpackage
