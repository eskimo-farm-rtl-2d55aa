// tb_sprite_priority_mux: random visibility vectors over 30 slots; the lowest
// visible slot's id and offset must win.
module tb_sprite_priority_mux;
  localparam int N = 30;
  logic [N-1:0] on;
  logic [N-1:0][5:0] id;
  logic [N-1:0][9:0] offset;
  logic any_on;
  logic [5:0] sel_id;
  logic [9:0] sel_offset;
  int checks = 0, failures = 0;

  sprite_priority_mux #(.N(N)) dut (.*);

  initial begin
    #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int win;
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < N; i++) begin
        id[i] = 6'($urandom); offset[i] = 10'($urandom);
        on[i] = ($urandom_range(0, 99) < (n % 4) * 5);
      end
      #1;
      win = -1;
      for (int i = 0; i < N; i++) if (on[i] && win < 0) win = i;
      checks++;
      if (win < 0) begin
        if (any_on || sel_id != 0 || sel_offset != 0) failures++;
      end else if (!any_on || sel_id != id[win] || sel_offset != offset[win]) begin
        failures++;
        if (failures < 10) $display("FAIL on=%h win=%0d id=%0d/%0d", on, win, sel_id, id[win]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
