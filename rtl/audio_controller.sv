// audio_controller: the game's background-music peripheral.
//
// Software writes a control word over the Avalon bus (word 0, bit 0: 1 plays
// the clip in a loop, 0 mutes). The audio sampler answers each sample request
// of the codec interface with the next 16-bit word of the clip ROM, and the
// codec interface shifts it out at 44.1 kHz. After reset the I2C configurator
// programs the SSM2603 codec for this format.
//
// Two clocks: `clk` (bus, I2C) and `aud_clk`, the 11.2896 MHz codec master
// clock, which is also forwarded to the codec as XCK. The play bit and the
// reset cross into the audio clock through two-flop synchronisers.
// The blocks and their connections follow the design; the control word
// layout and the synchronisers are this implementation's choices.
module audio_controller #(
  parameter int unsigned CLIP_SAMPLES = 117586,
  parameter int unsigned ROM_WORDS    = 131072,
  parameter int unsigned I2C_CLK_DIV  = 128
) (
  input  logic        clk,
  input  logic        aud_clk,
  input  logic        reset,
  // Avalon-MM slave
  input  logic        address,
  input  logic        write,
  input  logic        chipselect,
  input  logic [15:0] writedata,
  // codec serial audio
  output logic        aud_xck,
  output logic        aud_bclk,
  output logic        aud_daclrck,
  output logic        aud_adclrck,
  output logic        aud_dacdat,
  // codec configuration
  output logic        i2c_sclk,
  output logic        i2c_sda_oe,
  input  logic        i2c_sda_in,
  output logic [3:0]  config_status,
  output logic        configured
);
  localparam int unsigned AW = $clog2(ROM_WORDS);

  // Control register (bus clock).
  logic play;
  always_ff @(posedge clk) begin
    if (reset)                                       play <= 1'b0;
    else if (chipselect && write && address == 1'b0) play <= writedata[0];
  end

  // Crossing into the audio clock.
  logic [1:0] rst_sync, play_sync;
  logic       aud_reset;
  always_ff @(posedge aud_clk) begin
    rst_sync  <= {rst_sync[0], reset};
    play_sync <= {play_sync[0], play};
  end
  assign aud_reset = rst_sync[1];

  logic [AW-1:0] rom_addr;
  logic [15:0]   rom_data, sample;
  logic          sample_req, wrapped, lrclk;

  audio_rom #(.WORDS(ROM_WORDS), .WIDTH(16)) u_rom (
    .clk (aud_clk),
    .addr(rom_addr),
    .q   (rom_data)
  );

  audio_sampler #(.CLIP_SAMPLES(CLIP_SAMPLES), .AW(AW)) u_sampler (
    .clk       (aud_clk),
    .reset     (aud_reset),
    .play      (play_sync[1]),
    .sample_req(sample_req),
    .rom_addr  (rom_addr),
    .rom_data  (rom_data),
    .sample    (sample),
    .wrapped   (wrapped)
  );

  audio_codec_if u_codec (
    .clk       (aud_clk),
    .reset     (aud_reset),
    .sample    (sample),
    .sample_req(sample_req),
    .bclk      (aud_bclk),
    .lrclk     (lrclk),
    .dacdat    (aud_dacdat)
  );

  assign aud_xck     = aud_clk;
  assign aud_daclrck = lrclk;
  assign aud_adclrck = lrclk;

  i2c_av_config #(.CLK_DIV(I2C_CLK_DIV)) u_config (
    .clk       (clk),
    .reset     (reset),
    .scl       (i2c_sclk),
    .sda_oe    (i2c_sda_oe),
    .sda_in    (i2c_sda_in),
    .status    (config_status),
    .configured(configured)
  );
endmodule
