// tb_spi_slave: plays the microcontroller. Sends random 80-bit parameter
// frames (freq, phase, ampl, MSB first, SCLK about 1/8 of the system clock)
// and checks that the three registers load with the sent fields and that
// frame_ok pulses once; sends short and long frames and checks that they
// raise frame_err and leave the registers unchanged; checks reset values.
module tb_spi_slave;
  import dsg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic din = 1'b0, sclk = 1'b0, cs_n = 1'b1;
  logic [31:0] freq, phase;
  logic signed [15:0] ampl;
  logic frame_ok, frame_err;
  int checks = 0, failures = 0;
  int n_ok = 0, n_err = 0;

  spi_slave dut (.clk(clk), .rst_n(rst_n), .din(din), .sclk(sclk), .cs_n(cs_n),
                 .freq(freq), .phase(phase), .ampl(ampl),
                 .frame_ok(frame_ok), .frame_err(frame_err));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (frame_ok)  n_ok++;
    if (frame_err) n_err++;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send `nbits` bits of `bits`, MSB (bit nbits-1) first; 40 ns half period.
  task automatic send_bits(input logic [95:0] bits, input int nbits);
    cs_n = 1'b0;
    #100;
    for (int i = nbits - 1; i >= 0; i--) begin
      din = bits[i];
      #40 sclk = 1'b1;
      #40 sclk = 1'b0;
    end
    #60 cs_n = 1'b1;
    #200;
  endtask

  task automatic expect_regs(input logic [31:0] f, input logic [31:0] p, input logic [15:0] a);
    checks++;
    if (freq !== f || phase !== p || ampl !== a) begin
      failures++;
      $display("regs %h %h %h expected %h %h %h", freq, phase, ampl, f, p, a);
    end
  endtask

  initial begin
    logic [31:0] f, p, f0, p0;
    logic [15:0] a, a0;
    int ok0, err0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    expect_regs(32'h0, 32'h0, 16'h7FFF);
    for (int i = 0; i < 40; i++) begin
      f = $urandom; p = $urandom; a = 16'($urandom);
      ok0 = n_ok;
      send_bits({16'h0, f, p, a}, 80);
      expect_regs(f, p, a);
      checks++;
      if (n_ok != ok0 + 1) begin failures++; $display("frame_ok count"); end
      // a damaged frame must not touch the registers
      f0 = f; p0 = p; a0 = a;
      err0 = n_err;
      send_bits({$urandom, $urandom, $urandom}, (i % 2 == 0) ? 79 : 81);
      expect_regs(f0, p0, a0);
      checks++;
      if (n_err != err0 + 1) begin failures++; $display("frame_err count"); end
    end
    // the known value of one frame, field by field
    send_bits({16'h0, 32'h0020_C49C, 32'h4000_0000, 16'h4000}, 80);
    expect_regs(32'h0020_C49C, 32'h4000_0000, 16'h4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
