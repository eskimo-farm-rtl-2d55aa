// i2c_controller: sends one three-byte I2C write (device address, then two
// data bytes) as bus master.
//
// A `start` pulse while idle latches `data` and runs 30 stages of CLK_DIV
// clocks: START, 8 bits, ACK, 8 bits, ACK, 8 bits, ACK, a low-clock stage and
// STOP. In bit and ACK stages SCL is low for the first half and high for the
// second; SDA changes a quarter into the low half and the slave's ACK is
// sampled three quarters in. Bits go MSB first. SDA is open drain: `sda_oe`
// pulls it low, otherwise the pull-up makes it 1; `sda_in` is the line level.
// `done` pulses for one clock at the end of STOP with `ack` high if all three
// bytes were acknowledged; `busy` is high from start to done.
// The frame format follows the design's codec configuration; the stage
// timing within a bit is this implementation's choice.
module i2c_controller #(
  parameter int unsigned CLK_DIV = 128
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic [23:0] data,
  output logic        busy,
  output logic        done,
  output logic        ack,
  output logic        scl,
  output logic        sda_oe,
  input  logic        sda_in
);
  localparam int unsigned LAST = 29;

  logic [$clog2(CLK_DIV)-1:0] div;
  logic [4:0]                 stage;
  logic [23:0]                sr;
  logic [2:0]                 nack;

  function automatic logic is_ack_stage(input logic [4:0] s);
    return s == 5'd9 || s == 5'd18 || s == 5'd27;
  endfunction

  // Bit of `sr` sent in data stage s.
  function automatic logic stage_bit(input logic [4:0] s, input logic [23:0] d);
    if (s <= 5'd8)       return d[5'd24 - s];
    else if (s <= 5'd17) return d[5'd25 - s];
    else                 return d[5'd26 - s];
  endfunction

  always_comb begin
    if (!busy || stage == 5'd0 || stage == 5'd29) scl = 1'b1;
    else scl = (div >= ($clog2(CLK_DIV))'(CLK_DIV / 2));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      ack    <= 1'b0;
      div    <= '0;
      stage  <= '0;
      sr     <= '0;
      nack   <= '0;
      sda_oe <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        sda_oe <= 1'b0;
        if (start) begin
          busy  <= 1'b1;
          sr    <= data;
          div   <= '0;
          stage <= '0;
          nack  <= '0;
        end
      end else begin
        div <= div + 1'b1;
        // SDA changes.
        if (stage == 5'd0 && div == ($clog2(CLK_DIV))'(CLK_DIV / 2))
          sda_oe <= 1'b1;                              // START
        else if (stage == 5'd29 && div == ($clog2(CLK_DIV))'(CLK_DIV / 2))
          sda_oe <= 1'b0;                              // STOP
        else if (stage != 5'd0 && stage != 5'd29 && div == ($clog2(CLK_DIV))'(CLK_DIV / 4)) begin
          if (stage == 5'd28)          sda_oe <= 1'b1; // prepare STOP
          else if (is_ack_stage(stage)) sda_oe <= 1'b0; // release for ACK
          else                          sda_oe <= !stage_bit(stage, sr);
        end
        // ACK sampling.
        if (is_ack_stage(stage) && div == ($clog2(CLK_DIV))'(3 * CLK_DIV / 4))
          nack <= nack | {2'b00, sda_in} << ((stage == 5'd9) ? 0 : (stage == 5'd18) ? 1 : 2);
        // Stage advance.
        if (div == ($clog2(CLK_DIV))'(CLK_DIV - 1)) begin
          if (stage == 5'(LAST)) begin
            busy <= 1'b0;
            done <= 1'b1;
            ack  <= (nack == 3'b000);
          end else begin
            stage <= stage + 5'd1;
          end
        end
      end
    end
  end
endmodule
