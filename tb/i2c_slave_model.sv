// i2c_slave_model: behavioural I2C slave standing in for the codec's control
// port. Collects each transfer between START and STOP as a 24-bit word,
// a transfer is 27 clock pulses (24 bits, 3 ACKs) plus the one before
// STOP. Acknowledges every byte except for the first `nack_first` transfers, and
// counts START and STOP conditions. The SDA line is the wired AND of the
// master's release and the slave's release.
module i2c_slave_model (
  input  logic        scl,
  input  logic        master_sda_oe,
  output logic        sda,
  input  int          nack_first,
  output logic [23:0] words [16],
  output int          nwords,
  output int          nstarts,
  output int          nacked_words
);
  logic slave_pull = 0;
  logic [23:0] sh;
  int bits = 0, xfer = 0;
  logic prev_sda = 1, prev_scl = 1;
  bit in_xfer = 0;

  assign sda = !(master_sda_oe || slave_pull);

  initial begin nwords = 0; nstarts = 0; nacked_words = 0; end

  always @(sda or scl) begin
    if (scl && prev_scl && prev_sda && !sda) begin      // START
      nstarts++; in_xfer = 1; bits = 0; sh = 0;
    end else if (scl && prev_scl && !prev_sda && sda && in_xfer) begin // STOP
      in_xfer = 0;
      if (bits == 28) begin
        if (nwords < 16) words[nwords] = sh;
        nwords++;
        if (xfer >= nack_first) nacked_words++;
      end
      xfer++;
    end
    if (scl && !prev_scl && in_xfer) begin              // SCL rising
      if (bits < 27 && bits % 9 != 8) sh = {sh[22:0], sda};
      bits++;
    end
    if (!scl && prev_scl && in_xfer) begin              // SCL falling
      slave_pull = (bits < 27) && (bits % 9 == 8) && (xfer >= nack_first);
    end
    prev_sda = sda; prev_scl = scl;
  end
endmodule
