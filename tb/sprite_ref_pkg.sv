// sprite_ref_pkg: reference model of the rendered screen for the graphics
// testbenches, written independently of the RTL: the colour of pixel (h, v)
// given a table of sprite packets.
package sprite_ref_pkg;
  function automatic int rom_of(int id);
    if (id >= 1 && id <= 15) return id - 1;
    if (id >= 18 && id <= 38) return id - 3;
    return -1;
  endfunction

  // packets: dim[31:26] id[25:20] y[19:10] x[9:0]
  function automatic int expected_pixel(input logic [31:0] spr [30], input int h, input int v);
    for (int s = 0; s < 30; s++) begin
      int d, id, y, x;
      d = int'(spr[s][31:26]); id = int'(spr[s][25:20]); y = int'(spr[s][19:10]); x = int'(spr[s][9:0]);
      if (spr[s] != 0 && h >= x && h < x + d && v >= y && v < y + d) begin
        if (rom_of(id) >= 0) return (rom_of(id) * 273 + (((h - x) + (v - y) * d) % 1024) * 7) % 4096;
        break;
      end
    end
    return (v >= 448) ? 'h1C0 : 'h4CF;
  endfunction

  function automatic logic [31:0] packet(int dim, int id, int y, int x);
    return {6'(dim), 6'(id), 10'(y), 10'(x)};
  endfunction

  // A scene exercising priority overlap, an id without image, the grass
  // boundary, the right screen edge and an empty packet.
  function automatic void scene(output logic [31:0] spr [30], input int seed);
    for (int s = 0; s < 30; s++) spr[s] = 0;
    spr[0]  = packet(32, 18, 100 + seed, 40);      // eskimo
    spr[1]  = packet(32, 2, 110, 60 + seed);       // overlaps slot 0, lower priority
    spr[2]  = packet(32, 16, 300, 300);            // no image: background shows
    spr[3]  = packet(32, 3, 305, 310);             // under slot 2
    spr[4]  = packet(32, 20, 430, 200);            // across the grass line
    spr[5]  = packet(32, 21, 200, 625);            // past the right edge
    spr[6]  = packet(16, 5, 0, 0);                 // top-left corner
    spr[9]  = packet(32, 38, 464, 600);            // bottom
    spr[12] = packet(32, 4, 120 + seed, 50);       // under slots 0 and 1
    spr[29] = packet(32, 22, 250, 400);            // lowest priority alone
    spr[20] = packet(0, 7, 50, 50);                // zero size: never visible
    for (int s = 13; s < 19; s++) spr[s] = packet(16, 6 + s - 13, 20, 200 + 20 * (s - 13)); // digits
  endfunction
endpackage
