// tb_vga_timing: checks the 640x480 timing generator against the standard
// 800x525 pixel frame: clocks per line, lines per frame, HSYNC and VSYNC pulse
// positions and widths, visible area and the pixel clock, over two frames.
module tb_vga_timing;
  logic clk = 0, reset = 1;
  logic [9:0] hcount, vcount;
  logic pix_en, end_line, hsync_n, vsync_n, blank_n, vga_clk;
  int checks = 0, failures = 0;

  vga_timing dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (h=%0d v=%0d)", what, hcount, vcount); end
  endtask

  initial begin
    #50_000_000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc_in_line, lines, vis, hs_low, vs_low_lines, last_end, nline_checked;
  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    // first frame: per-pixel decode checks
    for (int f = 0; f < 2; f++) begin
      vis = 0; lines = 0; vs_low_lines = 0;
      do begin
        @(posedge clk);
        if (pix_en) begin
          check(hsync_n == !(hcount >= 656 && hcount < 752), "hsync position");
          check(vsync_n == !(vcount == 490 || vcount == 491), "vsync position");
          check(blank_n == (hcount < 640 && vcount < 480), "blank");
          check(vga_clk == 1'b1, "pixel clock high on second half");
          if (blank_n) vis++;
          if (end_line) begin
            lines++;
            check(hcount == 799, "line length 800 pixels");
            if (!vsync_n) vs_low_lines++;
          end
        end else check(vga_clk == 1'b0, "pixel clock low on first half");
      end while (!(pix_en && end_line && vcount == 524));
      check(vis == 640*480, "visible pixels per frame");
      check(lines == 525 - (f == 0 ? 0 : 0), "lines per frame");
      check(vs_low_lines == 2, "vsync 2 lines");
    end
    // clocks between end_line pulses
    last_end = 0; cyc_in_line = 0;
    repeat (2) begin
      cyc_in_line = 0;
      do begin @(posedge clk); cyc_in_line++; end while (!(pix_en && end_line));
    end
    check(cyc_in_line == 1600, "1600 clocks per line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
