// tb_dds: drives the phase generator with random frequency and phase words
// and a random sample strobe, and compares its output every clock with a
// reference accumulator kept in the testbench; a random synchronous clear
// must win over the strobe. Also checks a known ramp:
// freq = 3 * 2^16 must raise the output by exactly 3 per strobe.
module tb_dds;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [31:0] phase = '0, freq = '0;
  logic [15:0] out;
  logic [31:0] ref_acc;
  logic [31:0] sum;
  int checks = 0, failures = 0;

  dds dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .phase(phase), .freq(freq), .out(out));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out();
    sum = ref_acc + phase;
    checks++;
    if (out !== sum[31:16]) begin
      failures++;
      if (failures < 10) $display("out %h expected %h", out, sum[31:16]);
    end
  endtask

  initial begin
    ref_acc = '0;
    repeat (2) @(posedge clk);
    #1 check_out();                 // accumulator cleared by reset
    rst_n = 1'b1;
    // known ramp
    freq = 32'(3) << 16;
    phase = 32'h4000_0000;
    for (int i = 0; i < 50; i++) begin
      en = 1'b1;
      @(posedge clk);
      ref_acc = ref_acc + freq;
      #1;
      checks++;
      if (out !== 16'(16'h4000 + 3 * (i + 1))) begin
        failures++; $display("ramp step %0d: %h", i, out);
      end
    end
    // random words and strobes
    for (int i = 0; i < 5000; i++) begin
      en    = ($urandom_range(0, 3) == 0);
      clr   = ($urandom_range(0, 199) == 0);
      if ($urandom_range(0, 49) == 0) freq  = $urandom;
      if ($urandom_range(0, 49) == 0) phase = $urandom;
      @(posedge clk);
      if (clr)     ref_acc = '0;
      else if (en) ref_acc = ref_acc + freq;
      #1 check_out();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
