// tb_eskimo_top: end-to-end test of the whole design with a short clip
// (64 samples) so that the music loops several times within the run.
//
// The testbench plays the game software: it polls the VSYNC status (frame
// sync), writes sprite packets during vertical sync, moves them, clears them,
// and turns the music on and off. A monitor decodes the VGA output like a
// display and compares every pixel of each checked frame with an independent
// reference renderer; an I2C slave model (refusing the first transfer) and a
// left-justified serial receiver stand in for the audio codec. It counts how
// often each mechanism of the design happened (frame-sync polls, priority
// overlaps, sprites without image, grass background, line buffer swaps,
// table clear, I2C retry, clip loops, mute) and fails any that never did.
module tb_eskimo_top;
  import eskimo_pkg::*;
  import sprite_ref_pkg::*;
  localparam int CLIP  = 64;
  localparam int LOOPS = (CLIP > 1000) ? 1 : 2;  // clip loops to play before muting

  logic clk = 0, aud_clk = 0, reset = 1;
  logic [5:0]  gfx_address = 0;
  logic        gfx_write = 0, gfx_read = 0, gfx_chipselect = 0;
  logic [31:0] gfx_writedata = 0, gfx_readdata;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic        aud_address = 0, aud_write = 0, aud_chipselect = 0;
  logic [15:0] aud_writedata = 0;
  logic        aud_xck, aud_bclk, aud_daclrck, aud_adclrck, aud_dacdat;
  logic        i2c_sclk, i2c_sda_oe, i2c_sda_in, aud_configured;
  logic [3:0]  aud_config_status;

  eskimo_top #(.CLIP_SAMPLES(CLIP)) dut (.*);

  always #10 clk = ~clk;               // 50 MHz
  always #44.289 aud_clk = ~aud_clk;   // 11.2896 MHz

  int checks = 0, failures = 0;
  int n_polls = 0, n_overlap = 0, n_noimage = 0, n_grass = 0, n_swaps = 0, n_clear = 0;
  int n_frames = 0, n_loops = 0, n_mute = 0;

  initial begin
    #4_000_000_000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- codec stand-ins ----
  logic [23:0] words [16];
  int nwords, nstarts, nacked;
  i2c_slave_model codec_i2c (.scl(i2c_sclk), .master_sda_oe(i2c_sda_oe), .sda(i2c_sda_in), .nack_first(1),
                             .words, .nwords, .nstarts, .nacked_words(nacked));

  logic [15:0] rx, last_word = 0;
  int nb = 0, n_words = 0, play_idx = -1, play_bad = 0, silent_run = 0;
  bit expect_play = 0;
  always @(posedge aud_bclk) if (nb < 16) begin rx = {rx[14:0], aud_dacdat}; nb++; end
  always @(aud_daclrck) begin
    if (!aud_daclrck && nb == 16) begin
      n_words++;
      // follow the clip: index of the word within the clip
      if (play_idx >= 0) begin
        play_idx = (play_idx + 1) % CLIP;
        if (play_idx == 0) n_loops++;
        if (expect_play && rx != audio_test_sample(play_idx)) begin
          play_bad++;
          if (play_bad < 5) $display("FAIL audio word %0d = %h", play_idx, rx);
        end
      end else if (expect_play && rx == audio_test_sample(1) && last_word == 0) play_idx = 1;
      if (rx == 0) silent_run++; else silent_run = 0;
      last_word = rx;
    end
    nb = 0;
  end

  // The clip must start within a few hundred frames of the play command.
  always @(n_words) if (expect_play && play_idx < 0 && n_words > 500) begin
    failures++;
    $display("FAIL music never started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bus tasks (the game software) ----
  task automatic gfx_wr(input int a, input logic [31:0] d);
    @(negedge clk); gfx_address = 6'(a); gfx_writedata = d; gfx_write = 1; gfx_chipselect = 1;
    @(negedge clk); gfx_write = 0; gfx_chipselect = 0;
  endtask
  task automatic gfx_rd(input int a, output logic [31:0] d);
    @(negedge clk); gfx_address = 6'(a); gfx_read = 1; gfx_chipselect = 1;
    @(negedge clk); gfx_read = 0; gfx_chipselect = 0; d = gfx_readdata;
  endtask
  task automatic aud_ctrl(input logic [15:0] d);
    @(negedge clk); aud_writedata = d; aud_write = 1; aud_chipselect = 1;
    @(negedge clk); aud_write = 0; aud_chipselect = 0;
  endtask
  task automatic frame_sync();
    logic [31:0] st;
    do gfx_rd(61, st); while (st[0] != 1'b0);
    n_polls++;
  endtask
  task automatic frame_sync_end();
    logic [31:0] st;
    do gfx_rd(61, st); while (st[0] != 1'b1);
  endtask

  // ---- display monitor ----
  logic [31:0] spr [30];
  int x = 0, y = 0;
  bit checking = 0, was_blank = 0, hs_q = 1;
  always @(posedge vga_clk) begin
    if (vga_blank_n) begin
      if (checking) begin
        int e, ncover, first;
        e = expected_pixel(spr, x, y);
        checks++;
        if ({vga_r[7:4], vga_g[7:4], vga_b[7:4]} !== 12'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL pixel x=%0d y=%0d got %h%h%h exp %h", x, y, vga_r[7:4], vga_g[7:4], vga_b[7:4], e);
        end
        ncover = 0; first = -1;
        for (int s = 0; s < 30; s++)
          if (spr[s] != 0 && x >= spr[s][9:0] && x < spr[s][9:0] + spr[s][31:26] &&
              y >= spr[s][19:10] && y < spr[s][19:10] + spr[s][31:26]) begin
            ncover++; if (first < 0) first = s;
          end
        if (ncover > 1) n_overlap++;
        if (first >= 0 && rom_of(int'(spr[first][25:20])) < 0) n_noimage++;
        if (first < 0 && y >= 448) n_grass++;
      end
      x++;
    end else if (was_blank) begin
      x = 0; y++;
    end
    if (!vga_vs) y = 0;
    if (checking && vga_hs && !hs_q) n_swaps++;
    was_blank = vga_blank_n;
    hs_q = vga_hs;
  end

  task automatic check_frame();
    wait (vga_vs == 1'b0); wait (vga_vs == 1'b1);
    checking = 1;
    wait (y == 480);
    checking = 0;
    n_frames++;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) reset = 0;
    aud_ctrl(16'h0001);
    expect_play = 1;
    // game frames: draw, move, draw
    for (int f = 0; f < 3; f++) begin
      frame_sync();
      scene(spr, 4 * f);
      for (int s = 0; s < 30; s++) gfx_wr(s, spr[s]);
      frame_sync_end();
      check_frame();
    end
    // clear the screen
    frame_sync();
    gfx_wr(60, 0);
    n_clear++;
    for (int s = 0; s < 30; s++) spr[s] = 0;
    frame_sync_end();
    check_frame();
    // let the music loop
    wait (n_loops >= LOOPS);
    checks++; if (play_bad != 0) failures++;
    // mute
    expect_play = 0;
    aud_ctrl(16'h0000);
    wait (silent_run >= 20);
    n_mute++;
    checks++; if (!aud_configured || nacked != 11 || nstarts != 12) begin
      failures++; $display("FAIL codec configuration: %0d words, %0d starts", nwords, nstarts);
    end
    checks++; if (words[11] !== 24'h341201 || words[0] !== words[1]) failures++;
    $display("frame syncs=%0d frames=%0d overlap px=%0d no-image px=%0d grass px=%0d hsync swaps=%0d clears=%0d i2c retries=%0d clip loops=%0d mutes=%0d",
             n_polls, n_frames, n_overlap, n_noimage, n_grass, n_swaps, n_clear, nstarts - nacked, n_loops, n_mute);
    checks++; if (n_polls == 0)   failures++;
    checks++; if (n_frames != 4)  failures++;
    checks++; if (n_overlap == 0) failures++;
    checks++; if (n_noimage == 0) failures++;
    checks++; if (n_grass == 0)   failures++;
    checks++; if (n_swaps < 4 * 480) failures++;
    checks++; if (n_clear == 0)   failures++;
    checks++; if (nstarts - nacked == 0) failures++;
    checks++; if (n_loops < LOOPS) failures++;
    checks++; if (n_mute == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
