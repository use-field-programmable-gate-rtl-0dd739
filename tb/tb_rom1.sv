// tb_rom1: reads every word of the sine table through the two-clock
// pipeline (a new address each clock) and compares it with
// 32767 * sin(2*pi*(k + 0.5)/1024) computed in the testbench, allowing one
// count of rounding. Also checks the two-clock latency and the half-period
// antisymmetry word[k] = -word[k + 512].
module tb_rom1;
  localparam int AW = 10;
  localparam int N  = 1 << AW;

  logic clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic signed [15:0] q;
  logic signed [15:0] seen [N];
  int checks = 0, failures = 0;

  rom1 dut (.clock(clk), .address(addr), .q(q));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expected;
    // latency: present address 256 once, data must appear after 2 clocks
    @(negedge clk) addr = 10'd256;
    @(negedge clk) addr = 10'd0;
    checks++;
    if (q == 16'sd32767) begin failures++; $display("data after one clock"); end
    @(negedge clk);
    checks++;
    if (q != 16'sd32767) begin failures++; $display("latency: q=%0d", q); end
    // streaming read of every address
    for (int k = 0; k < N + 2; k++) begin
      @(negedge clk);
      if (k >= 2) seen[k-2] = q;
      addr = AW'(k);
    end
    for (int k = 0; k < N; k++) begin
      expected = 32767.0 * $sin(2.0 * 3.14159265358979 * (real'(k) + 0.5) / real'(N));
      checks++;
      if ((real'(seen[k]) - expected) > 1.0 || (expected - real'(seen[k])) > 1.0) begin
        failures++;
        if (failures < 10) $display("word %0d = %0d expected %f", k, seen[k], expected);
      end
    end
    for (int k = 0; k < N / 2; k++) begin
      checks++;
      if (seen[k] != -seen[k + N/2]) begin failures++; $display("symmetry %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
