// audio_sampler: plays the clip stored in the audio ROM, in a loop, or mutes.
//
// On every `sample_req` pulse from the codec interface:
//   play = 1: `sample` takes the ROM word at the current address and the
//             address steps to the next sample, back to 0 after the last of
//             CLIP_SAMPLES (the clip is shorter than the ROM);
//   play = 0: `sample` becomes 0 and the address returns to the clip start.
// The ROM is read synchronously; its word is ready long before the next
// request (requests are 256 clocks apart). `wrapped` pulses when the address
// returns to 0 after the last sample.
// Looping and muting follow the design; rewinding on mute is this
// implementation's choice.
module audio_sampler #(
  parameter int unsigned CLIP_SAMPLES = 117586,
  parameter int unsigned AW           = 17
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          play,
  input  logic          sample_req,
  output logic [AW-1:0] rom_addr,
  input  logic [15:0]   rom_data,
  output logic [15:0]   sample,
  output logic          wrapped
);
  always_ff @(posedge clk) begin
    if (reset) begin
      rom_addr <= '0;
      sample   <= '0;
      wrapped  <= 1'b0;
    end else begin
      wrapped <= 1'b0;
      if (sample_req) begin
        if (play) begin
          sample <= rom_data;
          if (rom_addr == AW'(CLIP_SAMPLES - 1)) begin
            rom_addr <= '0;
            wrapped  <= 1'b1;
          end else begin
            rom_addr <= rom_addr + 1'b1;
          end
        end else begin
          sample   <= '0;
          rom_addr <= '0;
        end
      end
    end
  end
endmodule
