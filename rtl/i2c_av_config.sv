// i2c_av_config: configures the SSM2603 audio codec over I2C after reset.
//
// Walks a table of 11 register writes and sends each as a three-byte I2C
// write to device address 0x34 (7-bit 0x1A, write) through i2c_controller.
// A write that is not acknowledged is sent again; after the last one the
// block stays idle with `configured` high. `status` is the index of the
// write in progress (10 when finished), for LEDs.
//
// Each table word is {register address (7 bits), data (9 bits)}. The table
// powers the codec up with outputs off, sets input and headphone volumes,
// selects the DAC path, sets a 16-bit left-justified interface and 44.1 kHz
// from an 11.2896 MHz master clock, powers the outputs and activates the
// digital core. The values and their order follow the design.
module i2c_av_config #(
  parameter int unsigned CLK_DIV  = 128,
  parameter int unsigned NUM_REGS = 11
) (
  input  logic       clk,
  input  logic       reset,
  output logic       scl,
  output logic       sda_oe,
  input  logic       sda_in,
  output logic [3:0] status,
  output logic       configured
);
  typedef enum logic [1:0] {SEND, WAIT, FINISHED} state_t;

  localparam logic [7:0] DEV_ADDR = 8'h34;

  state_t     state;
  logic [3:0] index;
  logic [15:0] word;
  logic       start, busy, done, ack;

  always_comb begin
    unique case (index)
      4'h0:    word = 16'h0C10; // power: all on except outputs
      4'h1:    word = 16'h0017; // left line-in volume
      4'h2:    word = 16'h0217; // right line-in volume
      4'h3:    word = 16'h0479; // left headphone volume
      4'h4:    word = 16'h0679; // right headphone volume
      4'h5:    word = 16'h08D4; // analog path: DAC selected
      4'h6:    word = 16'h0A04; // digital path
      4'h7:    word = 16'h0E01; // interface: 16-bit, left-justified
      4'h8:    word = 16'h1020; // sampling rate: 44.1 kHz
      4'h9:    word = 16'h0C00; // power: everything on
      4'hA:    word = 16'h1201; // activate digital core
      default: word = 16'h0000;
    endcase
  end

  i2c_controller #(.CLK_DIV(CLK_DIV)) u_i2c (
    .clk   (clk),
    .reset (reset),
    .start (start),
    .data  ({DEV_ADDR, word}),
    .busy  (busy),
    .done  (done),
    .ack   (ack),
    .scl   (scl),
    .sda_oe(sda_oe),
    .sda_in(sda_in)
  );

  assign start      = (state == SEND) && !busy;
  assign status     = index;
  assign configured = (state == FINISHED);

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= SEND;
      index <= '0;
    end else begin
      unique case (state)
        SEND:     if (!busy) state <= WAIT;
        WAIT:     if (done) begin
                    if (!ack)                          state <= SEND;
                    else if (index == 4'(NUM_REGS - 1)) state <= FINISHED;
                    else begin
                      index <= index + 4'd1;
                      state <= SEND;
                    end
                  end
        FINISHED: ;
        default:  state <= SEND;
      endcase
    end
  end
endmodule
