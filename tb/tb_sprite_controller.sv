// tb_sprite_controller: drives the sprite controller from the VGA timing
// generator with a fixed scene and compares every visible pixel of a whole
// frame with the reference renderer. The colour of pixel (h, v) must appear
// right after the pixel enable of (h, v), i.e. one pixel of latency. Counts
// overlaps resolved by priority, sprites without an image, grass pixels and
// line buffer swaps, and fails if any never occurred.
module tb_sprite_controller;
  import eskimo_pkg::*;
  import sprite_ref_pkg::*;
  logic clk = 0, reset = 1;
  logic [9:0] hcount, vcount;
  logic pix_en, end_line, hsync_n, vsync_n, blank_n, vga_clk, buf_sel;
  logic [7:0] vga_r, vga_g, vga_b;
  sprite_t [29:0] sprites;
  logic [31:0] spr [30];
  int checks = 0, failures = 0, swaps = 0, grass = 0, sprite_px = 0;

  vga_timing u_t (.clk, .reset, .hcount, .vcount, .pix_en, .end_line, .hsync_n, .vsync_n, .blank_n, .vga_clk);
  sprite_controller dut (.clk, .reset, .sprites, .hcount, .vcount, .pix_en, .hsync_n,
                         .vga_r, .vga_g, .vga_b, .buf_sel);
  always #10 clk = ~clk;

  initial begin
    #100_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic prev_sel;
  initial begin
    int h, v, e;
    logic [11:0] got;
    scene(spr, 0);
    for (int s = 0; s < 30; s++) sprites[s] = sprite_t'(spr[s]);
    repeat (3) @(posedge clk);
    reset = 0;
    // let frame 0 fill the buffers
    do @(posedge clk); while (!(pix_en && end_line && vcount == 524));
    prev_sel = buf_sel;
    // check frame 1
    do begin
      @(posedge clk);
      if (buf_sel != prev_sel) swaps++;
      prev_sel = buf_sel;
      if (pix_en) begin
        h = hcount; v = vcount;
        @(negedge clk);
        if (h < 640 && v < 480) begin
          e = expected_pixel(spr, h, v);
          got = {vga_r[7:4], vga_g[7:4], vga_b[7:4]};
          checks++;
          if (got !== 12'(e) || vga_r[3:0] !== vga_r[7:4] || vga_b[3:0] !== vga_b[7:4]) begin
            failures++;
            if (failures < 10) $display("FAIL h=%0d v=%0d got %h exp %h", h, v, got, e);
          end
          if (e == 'h1C0) grass++;
          if (e != 'h1C0 && e != 'h4CF) sprite_px++;
        end
        if (h == 799 && v == 524) break;
      end
    end while (1);
    $display("swaps=%0d grass=%0d sprite_px=%0d", swaps, grass, sprite_px);
    checks++; if (swaps != 525) failures++;
    checks++; if (grass == 0) failures++;
    checks++; if (sprite_px < 32 * 32 * 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
