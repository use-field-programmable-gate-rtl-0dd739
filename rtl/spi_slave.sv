// spi_slave: serial parameter interface of one generator channel.
//
// The microcontroller writes a channel's control registers over three lines:
// serial data DIN, serial clock SCLK and select CS (active low). A frame is
// FRAME_BITS = 80 bits sent MSB first while CS is low, in the order
// freq[31:0], phase[31:0], ampl[15:0]; DIN is sampled on SCLK rising edges.
// When CS goes high after exactly 80 bits the frame is split into its three
// fields and all three registers load on the same clock, so the generator
// never sees a half-updated set; a frame of any other length is discarded.
// The frame layout and the length check are this design's choices.
//
// The three lines are brought into the system clock domain with two-stage
// synchronisers and SCLK edges are found by comparing successive samples,
// so SCLK must stay below about a quarter of the system clock.
//
// Timing: the registers and the one-clock `frame_ok` pulse appear four
// clocks after CS rises; `frame_err` pulses instead for a bad length.
// Reset values: freq = 0, phase = 0, ampl = 0x7FFF (full scale).
module spi_slave
  import dsg_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     din,
  input  logic                     sclk,
  input  logic                     cs_n,
  output logic [FREQ_W-1:0]        freq,
  output logic [PHASE_W-1:0]       phase,
  output logic signed [AMPL_W-1:0] ampl,
  output logic                     frame_ok,
  output logic                     frame_err
);

  localparam int unsigned CNT_W = $clog2(FRAME_BITS + 2);

  // Synchronisers; index 2 is the previous sample for edge detection.
  logic [2:0] sclk_s, cs_s;
  logic [1:0] din_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      din_s  <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      din_s  <= {din_s[0], din};
    end
  end

  logic sclk_rise, cs_fall, cs_rise, selected;
  always_comb begin
    sclk_rise = sclk_s[1] & ~sclk_s[2];
    cs_fall   = ~cs_s[1] & cs_s[2];
    cs_rise   = cs_s[1] & ~cs_s[2];
    selected  = ~cs_s[1];
  end

  dsg_params_t      shreg;
  logic [CNT_W-1:0] nbits;   // saturates at FRAME_BITS + 1 (too long)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      nbits     <= '0;
      freq      <= '0;
      phase     <= '0;
      ampl      <= AMPL_FULL;
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
      if (cs_fall) begin
        nbits <= '0;
      end else if (selected && sclk_rise) begin
        shreg <= {shreg[FRAME_BITS-2:0], din_s[1]};
        if (nbits != CNT_W'(FRAME_BITS + 1)) nbits <= nbits + 1'b1;
      end
      if (cs_rise) begin
        if (nbits == CNT_W'(FRAME_BITS)) begin
          freq     <= shreg.freq;
          phase    <= shreg.phase;
          ampl     <= shreg.ampl;
          frame_ok <= 1'b1;
        end else begin
          frame_err <= 1'b1;
        end
      end
    end
  end

endmodule
