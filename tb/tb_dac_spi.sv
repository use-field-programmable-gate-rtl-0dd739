// tb_dac_spi: sends random 16-bit codes through the DAC transmitter into the
// AD5541 serial-input model and checks that each code arrives intact, that
// exactly one DAC update happens per frame, that a start while busy is
// ignored, and that a frame takes 2*16*SCLK_DIV + 2 clocks from start to
// busy falling.
module tb_dac_spi;
  localparam int unsigned SCLK_DIV = 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] data = '0;
  logic busy, cs_n, sclk, sdo;
  logic [15:0] dac_code;
  int updates, bad_frames;
  int checks = 0, failures = 0;
  int busy_clocks;

  dac_spi #(.DW(16), .SCLK_DIV(SCLK_DIV)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .data(data),
    .busy(busy), .cs_n(cs_n), .sclk(sclk), .sdo(sdo));

  ad5541_model dac (.cs_n(cs_n), .sclk(sclk), .din(sdo),
                    .code(dac_code), .updates(updates), .bad_frames(bad_frames));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [15:0] d, input bit poke_while_busy);
    int n_before;
    n_before = updates;
    @(negedge clk);
    data  = d;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    busy_clocks = 0;
    while (busy) begin
      if (poke_while_busy && busy_clocks == 5) begin
        data = ~d; start = 1'b1;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      busy_clocks++;
    end
    start = 1'b0;
    busy_clocks++;   // the start clock itself
    checks++;
    if (dac_code !== d) begin failures++; $display("DAC got %h expected %h", dac_code, d); end
    checks++;
    if (updates != n_before + 1) begin failures++; $display("updates %0d -> %0d", n_before, updates); end
    checks++;
    if (busy_clocks != 2 * 16 * SCLK_DIV + 2) begin
      failures++; $display("frame took %0d clocks", busy_clocks);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (!cs_n || sclk) begin failures++; $display("bad idle levels"); end
    send(16'h0000, 1'b0);
    send(16'hFFFF, 1'b0);
    send(16'h8001, 1'b1);
    send(16'h5A3C, 1'b0);
    for (int i = 0; i < 200; i++) send(16'($urandom), i % 7 == 0);
    checks++;
    if (bad_frames != 0) begin failures++; $display("bad frames %0d", bad_frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
