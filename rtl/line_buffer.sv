// line_buffer: double (ping-pong) line buffer between the sprite renderer and
// the VGA output.
//
// Two WIDTH-pixel buffers. A select bit chooses which one is written: with
// select 0 writes go to buffer 1 and reads come from buffer 2, with select 1
// the other way round, so the renderer never touches the buffer on screen.
// The select toggles on `swap`, which the sprite controller pulses once per
// line at the end of the HSYNC pulse.
//
// Ports: `we`/`waddr`/`wdata` write one pixel per enabled clock; `re`/`raddr`
// read one pixel, `rdata` is registered (valid after the clock edge of `re`).
// Writes to addresses >= WIDTH are dropped; reads there return 0.
// The two-buffer arrangement and the mux select values follow the design;
// the registered read is this implementation's choice.
module line_buffer #(
  parameter int unsigned WIDTH   = 640,
  parameter int unsigned COLOR_W = 12
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               swap,
  input  logic               we,
  input  logic [9:0]         waddr,
  input  logic [COLOR_W-1:0] wdata,
  input  logic               re,
  input  logic [9:0]         raddr,
  output logic [COLOR_W-1:0] rdata,
  output logic               sel
);
  logic [COLOR_W-1:0] buf1 [WIDTH];
  logic [COLOR_W-1:0] buf2 [WIDTH];

  always_ff @(posedge clk) begin
    if (reset)     sel <= 1'b0;
    else if (swap) sel <= ~sel;
  end

  always_ff @(posedge clk) begin
    if (we && waddr < 10'(WIDTH)) begin
      if (sel == 1'b0) buf1[waddr] <= wdata;
      else             buf2[waddr] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) rdata <= '0;
    else if (re) begin
      if (raddr >= 10'(WIDTH)) rdata <= '0;
      else if (sel == 1'b1)    rdata <= buf1[raddr];
      else                     rdata <= buf2[raddr];
    end
  end
endmodule
