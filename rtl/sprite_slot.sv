// sprite_slot: decoder, visibility checker and ROM offset for one sprite slot.
//
// Splits the 32-bit sprite packet into dim, id, y and x. The sprite is a
// dim x dim square with its top-left corner at (x, y); it covers pixel
// (hpos, vpos) when 0 <= hpos-x < dim and 0 <= vpos-y < dim. An all-zero
// packet is an empty slot. The offset of the pixel inside the sprite image is
// row-major, (hpos-x) + (vpos-y)*dim, cut to the 10-bit address of a
// 1024-word ROM. Purely combinational.
//
// The packet layout and the visibility test follow the design; the exact
// range test (no wrap-around at the screen edge) and the row-major offset
// are this implementation's reading of it.
module sprite_slot
  import eskimo_pkg::*;
(
  input  sprite_t           sprite,
  input  logic [9:0]        hpos,
  input  logic [9:0]        vpos,
  output logic              on,
  output logic [5:0]        id,
  output logic [ROM_AW-1:0] offset
);
  logic [9:0] dx, dy;

  always_comb begin
    dx     = hpos - sprite.x;
    dy     = vpos - sprite.y;
    on     = (sprite != '0) && (hpos >= sprite.x) && (vpos >= sprite.y) &&
             (dx < 10'(sprite.dim)) && (dy < 10'(sprite.dim));
    id     = sprite.id;
    offset = ROM_AW'(dx + dy * 10'(sprite.dim));
  end
endmodule
