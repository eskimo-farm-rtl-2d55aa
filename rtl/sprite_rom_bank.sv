// sprite_rom_bank: the 36 sprite image ROMs with their address and colour
// selectors.
//
// The type address selector sends the pixel offset to the ROM that holds
// image `id` and address 0 to all others; the RGB selector returns the word of
// that ROM one clock later. Ids 1..15 and 18..38 have ROMs (eskimo_pkg::
// id_to_rom); for any other id `hit` is low and `color` is 0.
//
// Timing: with `en` high at edge k, `color`/`hit` for the (id, offset) seen at
// edge k are valid after that edge and hold until the next enabled edge.
// The ROM count and size follow the design; the contents are placeholders.
module sprite_rom_bank
  import eskimo_pkg::*;
#(
  parameter int unsigned NUM = NUM_ROMS
) (
  input  logic              clk,
  input  logic              en,
  input  logic [5:0]        id,
  input  logic [ROM_AW-1:0] offset,
  output logic              hit,
  output color_t            color
);
  logic [NUM-1:0][ROM_AW-1:0] rom_addr;
  color_t                     rom_q [NUM];
  logic [5:0]                 rom_sel;
  logic                       sel_valid;

  // Sprite type address selector.
  always_comb begin
    for (int unsigned r = 0; r < NUM; r++)
      rom_addr[r] = (id_has_rom(id) && id_to_rom(id) == 6'(r)) ? offset : '0;
  end

  for (genvar r = 0; r < NUM; r++) begin : g_rom
    sprite_rom #(.ROM_INDEX(r)) u_rom (
      .clk (clk),
      .en  (en),
      .addr(rom_addr[r]),
      .q   (rom_q[r])
    );
  end

  always_ff @(posedge clk) begin
    if (en) begin
      rom_sel   <= id_to_rom(id);
      sel_valid <= id_has_rom(id);
    end
  end

  // Sprite RGB selector.
  always_comb begin
    color = '0;
    for (int unsigned r = 0; r < NUM; r++)
      if (rom_sel == 6'(r)) color = rom_q[r];
    if (!sel_valid) color = '0;
  end
  assign hit = sel_valid;
endmodule
