// tb_sprite_regfile: writes every slot, checks the packets, the clear word,
// out-of-range writes, the VSYNC status read and its one-clock latency.
module tb_sprite_regfile;
  import eskimo_pkg::*;
  logic clk = 0, reset = 1;
  logic [5:0] address = 0;
  logic write = 0, read = 0, chipselect = 0, vsync_n = 1;
  logic [31:0] writedata = 0, readdata;
  sprite_t [29:0] sprites;
  logic [31:0] model [30];
  int checks = 0, failures = 0;

  sprite_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); address = 6'(a); writedata = d; write = 1; chipselect = 1;
    @(negedge clk); write = 0; chipselect = 0;
    if (a < 30) model[a] = d;
    if (a == 60) for (int i = 0; i < 30; i++) model[i] = 0;
  endtask
  task automatic compare();
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (32'(sprites[i]) !== model[i]) begin failures++; $display("FAIL slot %0d", i); end
    end
  endtask

  initial begin
    for (int i = 0; i < 30; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    compare();
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 40; i++) wr($urandom_range(0, 59), $urandom);
      compare();
      wr(60, 32'hDEAD_BEEF);
      compare();
    end
    // write without chipselect is ignored
    @(negedge clk); address = 3; writedata = 32'h1234_5678; write = 1; chipselect = 0;
    @(negedge clk); write = 0;
    compare();
    // status read, one clock latency
    for (int k = 0; k < 4; k++) begin
      vsync_n = k[0];
      @(negedge clk); address = 61; read = 1; chipselect = 1;
      @(posedge clk); #1;
      checks++; if (readdata !== {31'd0, vsync_n}) failures++;
      @(negedge clk); read = 0; chipselect = 0;
    end
    @(negedge clk); address = 5; read = 1; chipselect = 1;
    @(posedge clk); #1; checks++; if (readdata !== 0) failures++;
    @(negedge clk); read = 0; chipselect = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
