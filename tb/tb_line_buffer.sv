// tb_line_buffer: fills the back buffer with a line while reading the front
// one, swaps, and checks that each line read back is the one written before
// the swap and that writing the new back buffer never disturbs it.
module tb_line_buffer;
  logic clk = 0, reset = 1, swap = 0, we = 0, re = 0, sel;
  logic [9:0] waddr = 0, raddr = 0;
  logic [11:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  line_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [11:0] pat(int line, int i);
    return 12'((line * 1009 + i * 13) % 4096);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    checks++; if (sel !== 1'b0) failures++;
    for (int line = 0; line < 6; line++) begin
      // write line `line` into the back buffer and read line-1 from the front
      for (int i = 0; i < 660; i++) begin
        @(negedge clk);
        we = 1; waddr = 10'(i); wdata = pat(line, i);
        re = 1; raddr = 10'(i);
        @(posedge clk); #1;
        if (line > 0) begin
          checks++;
          if (rdata !== (i < 640 ? pat(line - 1, i) : 12'd0)) begin
            failures++;
            if (failures < 10) $display("FAIL line %0d px %0d got %h", line, i, rdata);
          end
        end
      end
      @(negedge clk); we = 0; re = 0; swap = 1;
      @(negedge clk); swap = 0;
      checks++; if (sel !== 1'(line + 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
