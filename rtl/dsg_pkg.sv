// dsg_pkg: widths and types shared by the digital signal generator (DSG).
//
// A DSG channel is programmed with three words: a 32-bit frequency word
// (phase increment per sample), a 32-bit phase-shift word and a signed
// 16-bit amplitude. The widths follow the generator's port list; the order
// of the fields in the serial parameter frame is this design's choice.
package dsg_pkg;

  localparam int unsigned FREQ_W  = 32;
  localparam int unsigned PHASE_W = 32;
  localparam int unsigned AMPL_W  = 16;
  localparam int unsigned SAMPLE_W = 16;

  // Parameter frame bit count: freq, then phase, then ampl, MSB first.
  localparam int unsigned FRAME_BITS = FREQ_W + PHASE_W + AMPL_W;

  typedef struct packed {
    logic [FREQ_W-1:0]         freq;
    logic [PHASE_W-1:0]        phase;
    logic signed [AMPL_W-1:0]  ampl;
  } dsg_params_t;

  // Full-scale positive amplitude, used as the reset value.
  localparam logic signed [AMPL_W-1:0] AMPL_FULL = 16'sh7FFF;

endpackage
