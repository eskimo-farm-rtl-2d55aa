// sprite_regfile: bus-visible sprite table of the graphics controller.
//
// Avalon-MM slave with 32-bit words:
//   words 0..NUM_SPRITES-1  write: sprite packet of slot 0..NUM_SPRITES-1
//   word CLEAR_ADDR (60)    write: empty every slot (any data)
//   word STATUS_ADDR (61)   read: bit 0 = VSYNC line level (active low, so 0
//                           while the frame is in vertical sync)
// Writes take effect at the clock edge of write && chipselect. Reads have a
// latency of one clock; other words read as 0. Reset empties every slot.
// The word map follows the design's driver; the read latency is this
// implementation's choice.
module sprite_regfile
  import eskimo_pkg::*;
#(
  parameter int unsigned NUM_SPRITES = SPRITE_SLOTS,
  parameter int unsigned CLEAR_ADDR  = 60,
  parameter int unsigned STATUS_ADDR = 61
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic [5:0]                address,
  input  logic                      write,
  input  logic                      read,
  input  logic                      chipselect,
  input  logic [31:0]               writedata,
  output logic [31:0]               readdata,
  input  logic                      vsync_n,
  output sprite_t [NUM_SPRITES-1:0] sprites
);
  always_ff @(posedge clk) begin
    if (reset) begin
      sprites <= '0;
    end else if (chipselect && write) begin
      if (address == 6'(CLEAR_ADDR))
        sprites <= '0;
      else if (address < 6'(NUM_SPRITES))
        sprites[address] <= sprite_t'(writedata);
    end
  end

  always_ff @(posedge clk) begin
    if (reset)
      readdata <= '0;
    else if (chipselect && read)
      readdata <= (address == 6'(STATUS_ADDR)) ? {31'd0, vsync_n} : 32'd0;
  end

`ifndef SYNTHESIS
  // A bus cycle is either a read or a write.
  assert property (@(posedge clk) disable iff (reset) chipselect |-> !(read && write));
`endif
endmodule
