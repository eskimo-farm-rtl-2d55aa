// eskimo_top: hardware of the Eskimo @ Farm game.
//
// Two independent bus peripherals of the board's ARM processor, side by side:
//   graphics_controller  30 hardware sprites over a two-colour background on
//                        640x480 VGA, with a VSYNC status for frame sync;
//   audio_controller     background music from ROM to the SSM2603 codec,
//                        play or mute under software control.
// The processor, its bus bridge, the audio PLL and the codec chip are outside
// this module: their signals are ports. `clk` is the 50 MHz bus clock,
// `aud_clk` the 11.2896 MHz codec clock from the PLL; `reset` is synchronous
// to `clk` and active high.
module eskimo_top #(
  parameter int unsigned NUM_SPRITES  = 30,
  parameter int unsigned CLIP_SAMPLES = 117586
) (
  input  logic        clk,
  input  logic        aud_clk,
  input  logic        reset,
  // graphics slave
  input  logic [5:0]  gfx_address,
  input  logic        gfx_write,
  input  logic        gfx_read,
  input  logic        gfx_chipselect,
  input  logic [31:0] gfx_writedata,
  output logic [31:0] gfx_readdata,
  // VGA
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  // audio slave
  input  logic        aud_address,
  input  logic        aud_write,
  input  logic        aud_chipselect,
  input  logic [15:0] aud_writedata,
  // codec
  output logic        aud_xck,
  output logic        aud_bclk,
  output logic        aud_daclrck,
  output logic        aud_adclrck,
  output logic        aud_dacdat,
  output logic        i2c_sclk,
  output logic        i2c_sda_oe,
  input  logic        i2c_sda_in,
  output logic [3:0]  aud_config_status,
  output logic        aud_configured
);
  graphics_controller #(.NUM_SPRITES(NUM_SPRITES)) u_gfx (
    .clk        (clk),
    .reset      (reset),
    .address    (gfx_address),
    .write      (gfx_write),
    .read       (gfx_read),
    .chipselect (gfx_chipselect),
    .writedata  (gfx_writedata),
    .readdata   (gfx_readdata),
    .vga_r      (vga_r),
    .vga_g      (vga_g),
    .vga_b      (vga_b),
    .vga_clk    (vga_clk),
    .vga_hs     (vga_hs),
    .vga_vs     (vga_vs),
    .vga_blank_n(vga_blank_n),
    .vga_sync_n (vga_sync_n)
  );

  audio_controller #(.CLIP_SAMPLES(CLIP_SAMPLES)) u_audio (
    .clk          (clk),
    .aud_clk      (aud_clk),
    .reset        (reset),
    .address      (aud_address),
    .write        (aud_write),
    .chipselect   (aud_chipselect),
    .writedata    (aud_writedata),
    .aud_xck      (aud_xck),
    .aud_bclk     (aud_bclk),
    .aud_daclrck  (aud_daclrck),
    .aud_adclrck  (aud_adclrck),
    .aud_dacdat   (aud_dacdat),
    .i2c_sclk     (i2c_sclk),
    .i2c_sda_oe   (i2c_sda_oe),
    .i2c_sda_in   (i2c_sda_in),
    .config_status(aud_config_status),
    .configured   (aud_configured)
  );
endmodule
