// tb_sample_timer: checks that the sample strobe is one clock wide and comes
// exactly every DIV clocks, the first one DIV clocks after reset.
module tb_sample_timer;
  localparam int unsigned DIV = 100;

  logic clk = 1'b0, rst_n = 1'b0, strobe;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, pulses = 0;

  sample_timer #(.DIV(DIV)) dut (.clk(clk), .rst_n(rst_n), .strobe(strobe));

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (strobe) begin
      checks++;
      if (last < 0) begin
        if (cyc != DIV) begin failures++; $display("first strobe at %0d", cyc); end
      end else if (cyc - last != DIV) begin
        failures++; $display("strobe spacing %0d", cyc - last);
      end
      last   <= cyc;
      pulses <= pulses + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20 * DIV + 5) @(posedge clk);
    checks++;
    if (pulses != 20) begin failures++; $display("pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
