// sprite_controller: line renderer for 30 hardware sprites.
//
// While line v is on screen, the controller builds line v+1 in the back half
// of a double line buffer, one pixel per pixel time:
//   stage 0  each sprite_slot tests whether its sprite covers (hcount, v+1)
//            and computes the pixel's offset in the sprite image; the
//            priority mux keeps the lowest-numbered visible slot.
//   stage 1  the chosen id and offset address the sprite ROM bank.
//   stage 2  the ROM colour, or the background if no sprite with an image
//            covers the pixel, is written into the line buffer at hcount-1.
// The background is SKY_COLOR above line GRASS_Y and GRASS_COLOR from it down.
// The front buffer is read at hcount and drives R, G, B (4-bit channels
// widened to 8 bits by repeating the nibble), one pixel after hcount. The
// buffers swap at the rising edge of the active-low HSYNC, after the last
// write of the line and before the next line is shown.
//
// All registers advance on pix_en (every other clock). The slot priority,
// the double buffer swapped at HSYNC and the background colours follow the
// design; rendering one line ahead of the display and the pipeline depths
// are this implementation's choices.
module sprite_controller
  import eskimo_pkg::*;
#(
  parameter int unsigned NUM_SPRITES = SPRITE_SLOTS,
  parameter int unsigned VTOTAL      = 525,
  parameter int unsigned GRASS_Y     = 448,
  parameter color_t      SKY_COLOR   = 12'h4CF,
  parameter color_t      GRASS_COLOR = 12'h1C0
) (
  input  logic                      clk,
  input  logic                      reset,
  input  sprite_t [NUM_SPRITES-1:0] sprites,
  input  logic [9:0]                hcount,
  input  logic [9:0]                vcount,
  input  logic                      pix_en,
  input  logic                      hsync_n,
  output logic [7:0]                vga_r,
  output logic [7:0]                vga_g,
  output logic [7:0]                vga_b,
  output logic                      buf_sel
);
  // Stage 0: visibility, offsets, priority.
  logic [9:0]                          vnext;
  logic [NUM_SPRITES-1:0]              slot_on;
  logic [NUM_SPRITES-1:0][5:0]         slot_id;
  logic [NUM_SPRITES-1:0][ROM_AW-1:0]  slot_off;
  logic                                any_on;
  logic [5:0]                          sel_id;
  logic [ROM_AW-1:0]                   sel_off;

  assign vnext = (vcount == 10'(VTOTAL - 1)) ? 10'd0 : vcount + 10'd1;

  for (genvar s = 0; s < NUM_SPRITES; s++) begin : g_slot
    sprite_slot u_slot (
      .sprite(sprites[s]),
      .hpos  (hcount),
      .vpos  (vnext),
      .on    (slot_on[s]),
      .id    (slot_id[s]),
      .offset(slot_off[s])
    );
  end

  sprite_priority_mux #(.N(NUM_SPRITES)) u_prio (
    .on        (slot_on),
    .id        (slot_id),
    .offset    (slot_off),
    .any_on    (any_on),
    .sel_id    (sel_id),
    .sel_offset(sel_off)
  );

  // Stage 1: ROM read; background and column travel alongside.
  logic   rom_hit;
  color_t rom_color;
  color_t bg_d;
  logic [9:0] col_d;
  logic   wr_valid;

  sprite_rom_bank u_roms (
    .clk   (clk),
    .en    (pix_en),
    .id    (any_on ? sel_id : 6'd0),
    .offset(sel_off),
    .hit   (rom_hit),
    .color (rom_color)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      bg_d     <= '0;
      col_d    <= '0;
      wr_valid <= 1'b0;
    end else if (pix_en) begin
      bg_d     <= (vnext >= 10'(GRASS_Y)) ? GRASS_COLOR : SKY_COLOR;
      col_d    <= hcount;
      wr_valid <= 1'b1;
    end
  end

  // Stage 2: line buffers.
  logic   hs_q;
  logic   swap;
  color_t pixel;

  always_ff @(posedge clk) begin
    if (reset) hs_q <= 1'b1;
    else       hs_q <= hsync_n;
  end
  assign swap = hsync_n && !hs_q;

  line_buffer #(.WIDTH(640), .COLOR_W(COLOR_W)) u_lb (
    .clk  (clk),
    .reset(reset),
    .swap (swap),
    .we   (pix_en && wr_valid),
    .waddr(col_d),
    .wdata(rom_hit ? rom_color : bg_d),
    .re   (pix_en),
    .raddr(hcount),
    .rdata(pixel),
    .sel  (buf_sel)
  );

  assign vga_r = {pixel[11:8], pixel[11:8]};
  assign vga_g = {pixel[7:4],  pixel[7:4]};
  assign vga_b = {pixel[3:0],  pixel[3:0]};
endmodule
