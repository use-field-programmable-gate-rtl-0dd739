// dds: direct digital synthesis phase generator.
//
// A phase accumulator register P adds the frequency word `freq` once per
// sample, so P ramps linearly and wraps at 2^ACC_W; the output frequency is
// f_sample * freq / 2^ACC_W. A second adder adds the constant phase-shift
// word `phase` to P, and the OUT_W most significant bits of that sum are the
// output phase, which addresses the sine table.
//
// Interface: `en` is the sample strobe; P only advances on clocks where it
// is high. `clr` clears P synchronously and wins over `en`; driving the
// `clr` of several generators together restarts them in phase. Both inputs
// are this design's additions: the strobe lets the generator run at the
// sample rate while the rest of the chip runs on a faster clock. rst_n
// clears P asynchronously.
//
// Timing: `out` is combinational from P and `phase`; it shows the new phase
// one clock after the strobe.
module dds #(
  parameter int unsigned ACC_W = 32,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [ACC_W-1:0] phase,
  input  logic [ACC_W-1:0] freq,
  output logic [OUT_W-1:0] out
);

  logic [ACC_W-1:0] acc;      // register P
  logic [ACC_W-1:0] shifted;  // P + phase shift

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc + freq;
  end

  always_comb begin
    shifted = acc + phase;
    out     = shifted[ACC_W-1 -: OUT_W];
  end

endmodule
