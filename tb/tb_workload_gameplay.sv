// tb_workload_gameplay: one frame of actual play on the graphics controller.
//
// The sprite table holds what the game shows mid-play, laid out as the game
// software places it: 3 lives (eskimo, 32x32) along the top-left HUD row, the
// five letters of the score label and three score digits from column 240 of
// the top row, the ship on the left at mid height, 4 bullets (16x16) in front
// of it, 8 animals of the six enemy kinds across the field, and 4 clouds:
// 28 of the 30 slots. HUD, player and bullets take the low slot numbers,
// clouds the highest, so animals fly in front of clouds. Over three frames the
// sprites move as the game moves them (bullets right by 20, animals left, ship
// by 2), rewritten during vertical sync after polling VSYNC; each frame is
// compared pixel by pixel with the reference renderer.
module tb_workload_gameplay;
  import sprite_ref_pkg::*;
  logic clk = 0, reset = 1;
  logic [5:0] address = 0;
  logic write = 0, read = 0, chipselect = 0;
  logic [31:0] writedata = 0, readdata;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [31:0] spr [30];
  int checks = 0, failures = 0, frames_checked = 0, sprite_px = 0, used_slots = 0;

  graphics_controller dut (.*);
  always #10 clk = ~clk;

  initial begin
    #300_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge clk); address = 6'(a); writedata = d; write = 1; chipselect = 1;
    @(negedge clk); write = 0; chipselect = 0;
  endtask
  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge clk); address = 6'(a); read = 1; chipselect = 1;
    @(negedge clk); read = 0; chipselect = 0; d = readdata;
  endtask
  task automatic wait_status(input bit level);
    logic [31:0] st;
    do bus_read(61, st); while (st[0] != level);
  endtask

  // Game layout at step t.
  function automatic void game_scene(input int t);
    int s, enemy_ids [6] = '{2, 3, 4, 20, 21, 22};   // pig bee cow goat frog chick
    int letters [5] = '{34, 31, 33, 24, 27};          // label letters (s o r e i)
    int px, py;
    for (int i = 0; i < 30; i++) spr[i] = 0;
    s = 0;
    for (int i = 0; i < 3; i++) spr[s++] = packet(32, 18, 1, 32 * i);                 // lives
    for (int i = 0; i < 5; i++) spr[s++] = packet(32, letters[i], 1, 80 + 32 * i);    // label
    for (int i = 0; i < 3; i++) spr[s++] = packet(32, 6 + (i * 3 + t) % 10, 1, 240 + 32 * i + 1); // digits
    px = 2 * t; py = 224;
    spr[s++] = packet(32, 1, py, px);                                                  // ship
    for (int i = 0; i < 4; i++) spr[s++] = packet(16, 5, py + 8, px + 34 + 20 * t + 90 * i); // bullets
    for (int i = 0; i < 8; i++)
      spr[s++] = packet(32, enemy_ids[i % 6], 60 + 45 * i, 600 - 3 * t - 37 * i);     // animals
    for (int i = 0; i < 4; i++) spr[s++] = packet(32, 19, 112 + 100 * i + 1, 500 - 60 * i - t); // clouds
    used_slots = s;
  endfunction

  int x = 0, y = 0;
  bit checking = 0, was_blank = 0;
  always @(posedge vga_clk) begin
    if (vga_blank_n) begin
      if (checking) begin
        int e;
        e = expected_pixel(spr, x, y);
        checks++;
        if ({vga_r[7:4], vga_g[7:4], vga_b[7:4]} !== 12'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d got %h%h%h exp %h", x, y, vga_r[7:4], vga_g[7:4], vga_b[7:4], e);
        end
        if (e != 'h1C0 && e != 'h4CF) sprite_px++;
      end
      x++;
    end else if (was_blank) begin
      x = 0; y++;
    end
    if (!vga_vs) y = 0;
    was_blank = vga_blank_n;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int t = 0; t < 3; t++) begin
      wait_status(0);                       // frame sync
      game_scene(t);
      for (int s = 0; s < 30; s++) bus_write(s, spr[s]);
      wait_status(1);
      wait (vga_vs == 1'b0); wait (vga_vs == 1'b1);
      checking = 1;
      wait (y == 480);
      checking = 0;
      frames_checked++;
    end
    $display("slots used=%0d sprite pixels=%0d", used_slots, sprite_px);
    checks++; if (used_slots != 28) failures++;
    checks++; if (frames_checked != 3) failures++;
    checks++; if (sprite_px < 3 * 20 * 1024) failures++;   // most of the 28 sprites visible
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
