// sprite_priority_mux: picks the highest-priority visible sprite.
//
// Slot 0 (the first sprite slot) has the highest precedence, slot N-1 the
// lowest, as in the design. Outputs the chosen slot's image id and ROM
// offset and whether any slot is visible; when none is, id and offset are 0.
// Written as a loop from the lowest priority upward so that the result is a
// single priority chain. Combinational.
module sprite_priority_mux
  import eskimo_pkg::*;
#(
  parameter int unsigned N = 30
) (
  input  logic [N-1:0]             on,
  input  logic [N-1:0][5:0]        id,
  input  logic [N-1:0][ROM_AW-1:0] offset,
  output logic                     any_on,
  output logic [5:0]               sel_id,
  output logic [ROM_AW-1:0]        sel_offset
);
  always_comb begin
    any_on     = 1'b0;
    sel_id     = '0;
    sel_offset = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (on[i]) begin
        any_on     = 1'b1;
        sel_id     = id[i];
        sel_offset = offset[i];
      end
    end
  end
endmodule
