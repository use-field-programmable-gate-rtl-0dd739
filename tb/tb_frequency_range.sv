// tb_frequency_range: runs the generator, at its default parameters, over
// the test-signal range of a bridge impedance meter: 10 Hz, 1 kHz and
// 100 kHz at 500 k samples/s per channel.
//
// For each frequency G1 (channel 0) is set to full scale and G2 (channel 1)
// to the same frequency shifted by +90 degrees. The testbench listens to the
// two AD5541 models and measures, over a whole number of signal periods:
//   - the number of upward mid-scale crossings of G1 (must equal the number
//     of periods, within one);
//   - G1's highest and lowest code (full scale within 0.1 %);
//   - G2 at each G1 upward crossing: G2 = cos of G1's phase, so it must be
//     near its positive peak, at least 32767*cos(2*pi*f/fs) above mid-scale.
// At 10 Hz one period is 50 000 samples, 5 M clocks.
module tb_frequency_range;
  localparam int DIV = 100;
  localparam real FS = 500_000.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_din = 1'b0, cfg_sclk = 1'b0;
  logic [1:0] cfg_cs_n = '1;
  logic [1:0] cfg_frame_ok, cfg_frame_err;
  logic [1:0] dac_cs_n, dac_sclk, dac_din;
  logic sample_strobe;
  logic [1:0][15:0] dac_code;
  logic [15:0] g1, g2;
  int up1, up2, bad1, bad2;

  impedance_test_gen dut (
    .clk(clk), .rst_n(rst_n),
    .cfg_din(cfg_din), .cfg_sclk(cfg_sclk), .cfg_cs_n(cfg_cs_n),
    .cfg_frame_ok(cfg_frame_ok), .cfg_frame_err(cfg_frame_err),
    .dac_cs_n(dac_cs_n), .dac_sclk(dac_sclk), .dac_din(dac_din),
    .sample_strobe(sample_strobe), .dac_code(dac_code));

  ad5541_model u_g1 (.cs_n(dac_cs_n[0]), .sclk(dac_sclk[0]), .din(dac_din[0]),
                     .code(g1), .updates(up1), .bad_frames(bad1));
  ad5541_model u_g2 (.cs_n(dac_cs_n[1]), .sclk(dac_sclk[1]), .din(dac_din[1]),
                     .code(g2), .updates(up2), .bad_frames(bad2));

  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_cfg(input int c, input logic [31:0] f, input logic [31:0] p,
                          input logic [15:0] a);
    logic [79:0] frame;
    frame = {f, p, a};
    cfg_cs_n[c] = 1'b0;
    #200;
    for (int i = 79; i >= 0; i--) begin
      cfg_din = frame[i];
      #80 cfg_sclk = 1'b1;
      #80 cfg_sclk = 1'b0;
    end
    #100 cfg_cs_n[c] = 1'b1;
    #200;
  endtask

  task automatic measure(input real hz, input int periods);
    logic [31:0] fw;
    int nsamp, crossings, last_up, min1, max1, g2_low;
    logic [15:0] prev;
    real thr;
    fw = 32'($rtoi(hz / FS * 4294967296.0 + 0.5));
    send_cfg(0, fw, 32'h0, 16'h7FFF);
    send_cfg(1, fw, 32'h4000_0000, 16'h7FFF);
    // let the new words reach the DAC outputs
    repeat (3) @(posedge clk iff sample_strobe);
    repeat (DIV) @(posedge clk);
    nsamp = $rtoi(real'(periods) * FS / hz);
    thr = 32768.0 + 32767.0 * $cos(2.0 * 3.14159265358979323846 * hz / FS) - 2.0;
    crossings = 0; min1 = 65535; max1 = 0; g2_low = 0;
    prev = g1;
    last_up = up1;
    for (int n = 0; n < nsamp; n++) begin
      @(posedge clk iff up1 != last_up);
      last_up = up1;
      if (int'(g1) < min1) min1 = int'(g1);
      if (int'(g1) > max1) max1 = int'(g1);
      if (prev < 16'h8000 && g1 >= 16'h8000) begin
        crossings++;
        if (real'(g2) < thr) begin g2_low++; $display("  G1 %04h G2 %04h thr %0.1f", g1, g2, thr); end
      end
      prev = g1;
    end
    $display("%0.0f Hz: %0d samples, %0d crossings, G1 %04h..%04h, G2 low at crossing %0d",
             hz, nsamp, crossings, min1, max1, g2_low);
    checks++;
    if (crossings < periods - 1 || crossings > periods + 1) begin
      failures++; $display("  crossings %0d for %0d periods", crossings, periods);
    end
    checks++;
    if (hz <= 1000.0 && (max1 < 16'hFFC0 || min1 > 16'h0040)) begin
      failures++; $display("  not full scale");
    end
    checks++;
    if (g2_low != 0 || crossings == 0) begin failures++; $display("  G2 not 90 degrees ahead"); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    measure(100_000.0, 200);
    measure(1_000.0, 5);
    measure(10.0, 1);
    checks++;
    if (bad1 != 0 || bad2 != 0) begin failures++; $display("bad DAC frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
