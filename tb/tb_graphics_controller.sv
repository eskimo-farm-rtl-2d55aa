// tb_graphics_controller: acts as the game software on the Avalon bus. It
// polls the VSYNC status, writes a scene of sprite packets during vertical
// sync, then decodes the VGA output like a monitor (pixels on the rising
// pixel clock while BLANK is high, lines counted from BLANK, frames from
// VSYNC) and compares every pixel of the next frame with the reference
// renderer. Then it moves the sprites, clears the table with one write and
// checks a frame of pure background. Also checks 640 pixels per line and
// 480 lines per frame.
module tb_graphics_controller;
  import sprite_ref_pkg::*;
  logic clk = 0, reset = 1;
  logic [5:0] address = 0;
  logic write = 0, read = 0, chipselect = 0;
  logic [31:0] writedata = 0, readdata;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [31:0] spr [30];
  int checks = 0, failures = 0, polls = 0, frames_checked = 0;

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
  // Frame sync as the game does it: wait for VSYNC to be asserted.
  task automatic wait_vsync();
    logic [31:0] st;
    do begin bus_read(61, st); polls++; end while (st[0] != 1'b0);
  endtask
  task automatic wait_vsync_end();
    logic [31:0] st;
    do bus_read(61, st); while (st[0] != 1'b1);
  endtask

  // Monitor.
  int x = 0, y = 0, line_px = 0, frame_lines = 0;
  bit checking = 0, was_blank = 0;
  int bad_lines = 0;
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
      end
      x++;
    end else if (was_blank) begin
      if (x != 640) bad_lines++;
      x = 0; y++;
    end
    if (!vga_vs) y = 0;
    was_blank = vga_blank_n;
  end

  task automatic check_frame();
    // the frame after the current vertical sync
    wait (vga_vs == 1'b0); wait (vga_vs == 1'b1);
    checking = 1;
    wait (y == 480);
    checking = 0;
    frames_checked++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int f = 0; f < 2; f++) begin
      wait_vsync();
      scene(spr, f * 3);
      for (int s = 0; s < 30; s++) bus_write(s, spr[s]);
      wait_vsync_end();
      check_frame();
    end
    // VGA_CLEAR
    wait_vsync();
    bus_write(60, 32'd0);
    for (int s = 0; s < 30; s++) spr[s] = 0;
    wait_vsync_end();
    check_frame();
    checks++; if (bad_lines != 0) begin failures++; $display("FAIL %0d lines not 640 px", bad_lines); end
    checks++; if (frames_checked != 3) failures++;
    checks++; if (polls < 2) failures++;
    $display("polls=%0d frames=%0d", polls, frames_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
