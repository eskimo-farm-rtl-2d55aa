// graphics_controller: the game's VGA sprite peripheral.
//
// Software writes up to 30 sprite packets (dim, id, y, x) into the sprite
// table over the Avalon bus, clears them all with one write, and polls the
// VSYNC level to start each game frame during vertical blanking. The VGA
// timing generator scans a 640x480 screen; the sprite controller renders each
// line one line ahead into a double line buffer from the sprite ROMs and
// drives R, G, B.
//
// Everything runs on the 50 MHz bus clock; the 25 MHz pixel rate is a clock
// enable. R, G, B come out of the line buffer one pixel after the timing
// counters, so HSYNC, VSYNC and BLANK are registered on the same enable to
// stay aligned with them. Register map: see sprite_regfile.
module graphics_controller
  import eskimo_pkg::*;
#(
  parameter int unsigned NUM_SPRITES = SPRITE_SLOTS
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [5:0]  address,
  input  logic        write,
  input  logic        read,
  input  logic        chipselect,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n
);
  sprite_t [NUM_SPRITES-1:0] sprites;
  logic [9:0] hcount, vcount;
  logic       pix_en, end_line, hsync_n, vsync_n, blank_n;
  logic       buf_sel;

  sprite_regfile #(.NUM_SPRITES(NUM_SPRITES)) u_regs (
    .clk       (clk),
    .reset     (reset),
    .address   (address),
    .write     (write),
    .read      (read),
    .chipselect(chipselect),
    .writedata (writedata),
    .readdata  (readdata),
    .vsync_n   (vsync_n),
    .sprites   (sprites)
  );

  vga_timing u_timing (
    .clk     (clk),
    .reset   (reset),
    .hcount  (hcount),
    .vcount  (vcount),
    .pix_en  (pix_en),
    .end_line(end_line),
    .hsync_n (hsync_n),
    .vsync_n (vsync_n),
    .blank_n (blank_n),
    .vga_clk (vga_clk)
  );

  sprite_controller #(.NUM_SPRITES(NUM_SPRITES)) u_sprites (
    .clk    (clk),
    .reset  (reset),
    .sprites(sprites),
    .hcount (hcount),
    .vcount (vcount),
    .pix_en (pix_en),
    .hsync_n(hsync_n),
    .vga_r  (vga_r),
    .vga_g  (vga_g),
    .vga_b  (vga_b),
    .buf_sel(buf_sel)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
    end else if (pix_en) begin
      vga_hs      <= hsync_n;
      vga_vs      <= vsync_n;
      vga_blank_n <= blank_n;
    end
  end
  // Composite sync on the green channel is not used by VGA; this output
  // carries VSYNC as the board's DAC expects a defined level.
  assign vga_sync_n = vga_vs;
endmodule
