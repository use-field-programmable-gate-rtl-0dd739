// ad5541_model: behavioural model (not synthesizable) of the serial input of
// an AD5541 16-bit voltage-output DAC, for testbenches.
//
// While CS is low the model shifts DIN in on each SCLK rising edge, MSB
// first. On CS rising it loads the last 16 bits into `code` (the DAC output
// register, straight binary: 0 = 0 V, 0xFFFF = full scale) and counts an
// update; a frame with a bit count other than 16 is counted in `bad_frames`
// and leaves `code` unchanged. A CS rise before the first CS fall (power-up)
// is not counted.
module ad5541_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic [15:0] code,
  output int          updates,
  output int          bad_frames
);

  logic [15:0] sh;
  int          nbits;
  bit          framing;   // a CS fall has been seen

  initial begin
    code       = 16'h8000;
    updates    = 0;
    bad_frames = 0;
    nbits      = 0;
    sh         = '0;
    framing    = 1'b0;
  end

  always @(negedge cs_n) begin
    nbits   = 0;
    framing = 1'b1;
  end

  always @(posedge sclk) begin
    if (!cs_n) begin
      sh    = {sh[14:0], din};
      nbits = nbits + 1;
    end
  end

  always @(posedge cs_n) begin
    if (!framing) begin
      // CS settling high at power-up is not a frame
    end else if (nbits == 16) begin
      code    = sh;
      updates = updates + 1;
    end else begin
      bad_frames = bad_frames + 1;
    end
  end

endmodule
