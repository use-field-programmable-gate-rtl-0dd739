// rom1: sine look-up table, one period of a signed sine wave.
//
// 2^AW words of DW bits. Word k holds
//   round((2^(DW-1) - 1) * sin(2*pi*(k + 0.5) / 2^AW))
// in two's complement; the table is computed at elaboration by a constant
// function, so no data file is needed. The half-step offset makes the table
// symmetric: word k and word k + 2^(AW-1) are exact negatives, and no word
// is the most negative code.
//
// Both the address and the output are registered, as in a synchronous FPGA
// block RAM, so `q` shows the word for an address two clocks after the
// address is presented. The 1024 x 16 size and the two registers follow the
// generator's schematic; the rounding and half-step placement are this
// design's choice.
module rom1 #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 16
) (
  input  logic          clock,
  input  logic [AW-1:0] address,
  output logic [DW-1:0] q
);

  localparam int unsigned N = 2 ** AW;

  typedef logic [DW-1:0] table_t [N];

  function automatic table_t make_table();
    table_t t;
    real    full, x;
    full = real'((longint'(1) << (DW - 1)) - 1);
    for (int k = 0; k < N; k++) begin
      x    = full * $sin(2.0 * 3.14159265358979323846 * (real'(k) + 0.5) / real'(N));
      t[k] = DW'($rtoi($floor(x + 0.5)));
    end
    return t;
  endfunction

  localparam table_t SINE = make_table();

  logic [AW-1:0] addr_q;

  always_ff @(posedge clock) begin
    addr_q <= address;
    q      <= SINE[addr_q];
  end

endmodule
