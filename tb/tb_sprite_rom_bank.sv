// tb_sprite_rom_bank: every id 0..63 with random offsets; the colour one
// clock later must be word `offset` of the right ROM's test image (ids 1..15
// -> ROMs 0..14, 18..38 -> 15..35, others no image), and must hold while the
// enable is low.
module tb_sprite_rom_bank;
  logic clk = 0, en;
  logic [5:0] id;
  logic [9:0] offset;
  logic hit;
  logic [11:0] color;
  int checks = 0, failures = 0;

  sprite_rom_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int rom_of(int i);
    if (i >= 1 && i <= 15) return i - 1;
    if (i >= 18 && i <= 38) return i - 3;
    return -1;
  endfunction

  initial begin
    int r, o, e;
    logic [11:0] held;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      id = 6'(n % 64); o = $urandom_range(0, 1023); offset = 10'(o); en = 1;
      @(negedge clk);
      en = 0; r = rom_of(n % 64);
      checks++;
      if (r < 0) begin
        if (hit !== 1'b0 || color !== 12'd0) failures++;
      end else begin
        e = (r * 273 + o * 7) % 4096;
        if (hit !== 1'b1 || color !== 12'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL id=%0d off=%0d got %h exp %h", n % 64, o, color, e);
        end
      end
      held = color; id = 6'($urandom); offset = 10'($urandom);
      @(negedge clk);
      checks++; if (color !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
