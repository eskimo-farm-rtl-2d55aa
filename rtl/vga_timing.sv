// vga_timing: 640x480 VGA timing generator.
//
// A horizontal counter runs at the 50 MHz system clock and advances one pixel
// every two clocks, giving the 25 MHz pixel rate; a vertical counter advances
// at the end of each line. Each line is display, front porch, sync pulse,
// back porch; the same order holds for the frame. Both sync pulses are active
// low. The porch and pulse lengths (16/96/48 pixels, 10/2/33 lines) follow
// the design's timing generator; they are parameters in pixels and lines.
//
// Outputs are combinational decodes of the counters:
//   hcount   pixel column 0..799 (0..639 visible)
//   vcount   line 0..524 (0..479 visible)
//   pix_en   high on the second clock of each pixel; downstream pixel
//            pipelines advance on it, and hcount changes right after it
//   end_line pix_en of the last pixel of a line
//   vga_clk  25 MHz pixel clock (high during the second clock of a pixel)
module vga_timing #(
  parameter int unsigned HACTIVE = 640,
  parameter int unsigned HFRONT  = 16,
  parameter int unsigned HSYNC   = 96,
  parameter int unsigned HBACK   = 48,
  parameter int unsigned VACTIVE = 480,
  parameter int unsigned VFRONT  = 10,
  parameter int unsigned VSYNC   = 2,
  parameter int unsigned VBACK   = 33
) (
  input  logic       clk,
  input  logic       reset,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       pix_en,
  output logic       end_line,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       blank_n,
  output logic       vga_clk
);
  localparam int unsigned HTOTAL = HACTIVE + HFRONT + HSYNC + HBACK;
  localparam int unsigned VTOTAL = VACTIVE + VFRONT + VSYNC + VBACK;

  logic       phase;      // 0: first clock of a pixel, 1: second
  logic       end_frame;

  assign pix_en    = phase;
  assign end_line  = phase && (hcount == 10'(HTOTAL - 1));
  assign end_frame = (vcount == 10'(VTOTAL - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      phase  <= 1'b0;
      hcount <= '0;
      vcount <= '0;
    end else begin
      phase <= ~phase;
      if (pix_en) begin
        if (end_line) begin
          hcount <= '0;
          vcount <= end_frame ? 10'd0 : vcount + 10'd1;
        end else begin
          hcount <= hcount + 10'd1;
        end
      end
    end
  end

  assign hsync_n = !(hcount >= 10'(HACTIVE + HFRONT) && hcount < 10'(HACTIVE + HFRONT + HSYNC));
  assign vsync_n = !(vcount >= 10'(VACTIVE + VFRONT) && vcount < 10'(VACTIVE + VFRONT + VSYNC));
  assign blank_n = (hcount < 10'(HACTIVE)) && (vcount < 10'(VACTIVE));
  assign vga_clk = phase;
endmodule
