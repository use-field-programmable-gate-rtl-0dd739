// sample_timer: sample-rate strobe generator.
//
// Counts system clocks modulo DIV and raises `strobe` for one clock when the
// count wraps, so the strobe rate is f_clk/DIV. With the default 50 MHz
// system clock and DIV = 100 this gives the 500 kHz sample rate chosen for
// the test signals; the 50 MHz clock is this design's assumption.
//
// Timing: after reset is released the first strobe comes DIV clocks later,
// then one every DIV clocks.
module sample_timer #(
  parameter int unsigned DIV = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic strobe
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= 1'b0;
      if (cnt == CW'(DIV - 1)) begin
        cnt    <= '0;
        strobe <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
