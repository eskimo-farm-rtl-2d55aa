// tb_sprite_slot: random sprite packets and pixel positions; visibility and
// ROM offset compared with an integer reference model.
module tb_sprite_slot;
  import eskimo_pkg::*;
  sprite_t sprite;
  logic [9:0] hpos, vpos;
  logic on;
  logic [5:0] id;
  logic [9:0] offset;
  int checks = 0, failures = 0, hits = 0;

  sprite_slot dut (.*);

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int x, y, d, h, v, exp_off;
    bit exp_on;
    for (int n = 0; n < 20000; n++) begin
      d = $urandom_range(0, 63); x = $urandom_range(0, 700); y = $urandom_range(0, 520);
      if (n % 3 == 0) begin h = x + $urandom_range(0, 70) - 4; v = y + $urandom_range(0, 70) - 4; end
      else begin h = $urandom_range(0, 799); v = $urandom_range(0, 524); end
      if (h < 0) h = 0; if (v < 0) v = 0; if (h > 1023) h = 1023; if (v > 1023) v = 1023;
      sprite = '{dim: 6'(d), id: 6'($urandom), y: 10'(y), x: 10'(x)};
      if (n % 500 == 0) sprite = '0;
      hpos = 10'(h); vpos = 10'(v);
      #1;
      exp_on = (sprite != '0) && h >= x && h < x + d && v >= y && v < y + d;
      exp_off = ((h - x) + (v - y) * d) % 1024;
      checks++;
      if (on !== exp_on || id !== sprite.id || (exp_on && offset !== 10'(exp_off))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d d=%0d h=%0d v=%0d on=%0b/%0b off=%0d/%0d", x, y, d, h, v, on, exp_on, offset, exp_off);
      end
      if (exp_on) hits++;
    end
    checks++; if (hits < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
