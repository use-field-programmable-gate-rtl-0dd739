// tb_mul1: checks the signed multiplier on corner values (full-scale
// positive and negative, zero, -1) and on random operands, against
// products worked out with 64-bit integers in the testbench.
module tb_mul1;
  logic signed [15:0] a, b;
  logic signed [31:0] r;
  int checks = 0, failures = 0;

  mul1 dut (.dataa(a), .datab(b), .result(r));

  task automatic t(input int x, input int y);
    longint expected;
    a = 16'(x); b = 16'(y);
    #1;
    expected = longint'(x) * longint'(y);
    checks++;
    if (longint'(r) != expected) begin
      failures++;
      if (failures < 10) $display("%0d * %0d = %0d expected %0d", x, y, r, expected);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t(32767, 32767);  t(-32768, 32767); t(-32768, -32768); t(32767, -1);
    t(0, -12345);     t(-1, -1);        t(12345, 2);       t(-20000, 30000);
    for (int i = 0; i < 3000; i++) t($signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
