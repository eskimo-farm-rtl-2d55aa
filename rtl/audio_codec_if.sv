// audio_codec_if: serial audio (DAC) interface to the SSM2603 codec.
//
// Runs on the codec master clock (11.2896 MHz). An 8-bit counter divides it
// by 256 to the 44.1 kHz frame clock LRCLK (high for the left half) and by 4
// to the bit clock BCLK. Each half frame the 16-bit sample is shifted out on
// DACDAT MSB first, left-justified: the MSB is on the line when LRCLK
// changes, and each bit is held for one BCLK period, changing after a
// falling edge so the codec samples it on the rising edge. The rest of the
// half frame is 0. The same sample goes to both channels.
//
// `sample_req` pulses one clock before the frame starts; `sample` must be
// valid on the next clock, when it is loaded. Counter value after reset is
// 255, so the first frame starts one clock after reset.
// The 16-bit word, 44.1 kHz rate and big-endian bit order follow the design;
// the codec register settings in i2c_av_config select this format.
module audio_codec_if (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] sample,
  output logic        sample_req,
  output logic        bclk,
  output logic        lrclk,
  output logic        dacdat
);
  logic [7:0]  cnt;
  logic [15:0] shift, hold;

  always_ff @(posedge clk) begin
    if (reset) cnt <= 8'hFF;
    else       cnt <= cnt + 8'd1;
  end

  assign lrclk      = !cnt[7];
  assign bclk       = cnt[1];
  assign sample_req = (cnt == 8'hFE);
  assign dacdat     = shift[15];

  always_ff @(posedge clk) begin
    if (reset) begin
      shift <= '0;
      hold  <= '0;
    end else if (cnt == 8'hFF) begin
      shift <= sample;              // left channel
      hold  <= sample;
    end else if (cnt == 8'h7F) begin
      shift <= hold;                // right channel
    end else if (cnt[1:0] == 2'b11 && !cnt[6]) begin
      shift <= {shift[14:0], 1'b0}; // next bit after BCLK falls
    end
  end
endmodule
