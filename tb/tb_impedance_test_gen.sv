// tb_impedance_test_gen: end-to-end test of the two-channel generator at its
// default parameters (50 MHz clock, 500 kHz samples, 1024-word table).
//
// The testbench plays the microcontroller on the shared parameter link and
// listens to both DAC links with AD5541 models. For every DAC update it
// recomputes the expected code on its own: a 32-bit phase accumulator per
// channel advanced at each sample strobe by the frequency word last sent,
// all accumulators cleared together on the clock after a frame that changes
// a frequency word, the phase word added, the top 10 bits used as the table index,
// 32767*sin(2*pi*(index+0.5)/1024) rounded, times the amplitude, bits
// [30:15], sign bit inverted. Samples whose strobe falls within a few clocks
// of a parameter change are not compared.
//
// Scenario: set G1 and G2 to 10 kHz with G2 shifted 90 degrees and at half
// amplitude; change G2's phase and amplitude as a balancing loop would; move
// both to 100 kHz (the top of the test-signal range) and to 10 Hz (the
// bottom); send a frame of the wrong length. Counted events: accepted
// frames, rejected frame, frequency, phase and amplitude changes, phase
// restarts, phase accumulator wraps, DAC updates per channel. A mechanism that never
// happens is a failure. The DAC update interval must be exactly 100 clocks.
module tb_impedance_test_gen;
  localparam int CH = 2;
  localparam int DIV = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_din = 1'b0, cfg_sclk = 1'b0;
  logic [CH-1:0] cfg_cs_n = '1;
  logic [CH-1:0] cfg_frame_ok, cfg_frame_err;
  logic [CH-1:0] dac_cs_n, dac_sclk, dac_din;
  logic sample_strobe;
  logic [CH-1:0][15:0] dac_code;

  impedance_test_gen dut (
    .clk(clk), .rst_n(rst_n),
    .cfg_din(cfg_din), .cfg_sclk(cfg_sclk), .cfg_cs_n(cfg_cs_n),
    .cfg_frame_ok(cfg_frame_ok), .cfg_frame_err(cfg_frame_err),
    .dac_cs_n(dac_cs_n), .dac_sclk(dac_sclk), .dac_din(dac_din),
    .sample_strobe(sample_strobe), .dac_code(dac_code));

  logic [15:0] analog [CH];
  int updates [CH], bad_frames [CH];

  for (genvar c = 0; c < CH; c++) begin : g_dac
    ad5541_model u_dac (.cs_n(dac_cs_n[c]), .sclk(dac_sclk[c]), .din(dac_din[c]),
                        .code(analog[c]), .updates(updates[c]), .bad_frames(bad_frames[c]));
  end

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  // event counters
  int n_frames_ok = 0, n_frames_err = 0, n_freq_chg = 0, n_phase_chg = 0, n_ampl_chg = 0;
  int n_wraps = 0, n_compared = 0, n_skipped = 0, n_interval = 0;

  // reference state, per channel
  logic [31:0] r_freq [CH], r_phase [CH], r_acc [CH];
  logic [15:0] r_ampl [CH];
  logic [31:0] pend_freq [CH], pend_phase [CH];   // frame being sent
  logic [15:0] pend_ampl [CH];
  int          n_restart = 0;
  logic [15:0] expected [CH];
  bit          valid [CH];
  longint      cyc = 0, last_cfg = -1000, strobe_cyc [CH], last_update [CH];

  function automatic logic [15:0] ref_code(input logic [31:0] acc, input logic [31:0] ph,
                                           input logic [15:0] a);
    logic [31:0] p;
    int idx;
    longint s, prod;
    p    = acc + ph;
    idx  = int'(p[31:22]);
    s    = longint'($rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979323846 *
                                                 (real'(idx) + 0.5) / 1024.0) + 0.5)));
    prod = s * longint'($signed(a));
    return 16'((prod >>> 15) ^ 64'h8000);
  endfunction

  initial begin
    for (int c = 0; c < CH; c++) begin
      r_freq[c] = '0; r_phase[c] = '0; r_acc[c] = '0; r_ampl[c] = 16'h7FFF;
      pend_freq[c] = '0; pend_phase[c] = '0; pend_ampl[c] = 16'h7FFF;
      valid[c] = 1'b0; last_update[c] = -1; strobe_cyc[c] = 0;
    end
  end

  // reference accumulators: advanced at each strobe, all cleared together on
  // the clock after a frame that changes a frequency word is taken
  always @(posedge clk) if (rst_n) begin
    bit restart;
    restart = 1'b0;
    cyc <= cyc + 1;
    for (int c = 0; c < CH; c++) begin
      if (cfg_frame_ok[c]) begin
        if (pend_freq[c]  != r_freq[c])  begin n_freq_chg++; restart = 1'b1; end
        if (pend_phase[c] != r_phase[c]) n_phase_chg++;
        if (pend_ampl[c]  != r_ampl[c])  n_ampl_chg++;
        r_freq[c] = pend_freq[c]; r_phase[c] = pend_phase[c]; r_ampl[c] = pend_ampl[c];
      end
    end
    if (restart) begin
      n_restart++;
      for (int c = 0; c < CH; c++) r_acc[c] = '0;
    end else if (sample_strobe) begin
      for (int c = 0; c < CH; c++) begin
        logic [31:0] nxt;
        nxt = r_acc[c] + r_freq[c];
        if (nxt < r_acc[c]) n_wraps++;
        r_acc[c]      = nxt;
        expected[c]   = ref_code(nxt, r_phase[c], r_ampl[c]);
        valid[c]      = (cyc - last_cfg) > 10;
        strobe_cyc[c] = cyc;
      end
    end
    for (int c = 0; c < CH; c++) begin
      if (cfg_frame_ok[c])  n_frames_ok++;
      if (cfg_frame_err[c]) n_frames_err++;
    end
  end

  // compare at each DAC update
  // compare on the clock after each DAC update (CS rising edge)
  int seen_updates [CH] = '{default: 0};
  for (genvar c = 0; c < CH; c++) begin : g_cmp
    always @(posedge clk) if (rst_n && updates[c] != seen_updates[c]) begin
      seen_updates[c] = updates[c];
      if (last_update[c] >= 0) begin
        checks++; n_interval++;
        if (cyc - last_update[c] != longint'(DIV)) begin
          failures++; $display("ch%0d update interval %0d", c, cyc - last_update[c]);
        end
      end
      last_update[c] = cyc;
      if (valid[c] && (cyc - last_cfg) > 80) begin
        checks++; n_compared++;
        if (analog[c] !== expected[c]) begin
          failures++;
          if (failures < 20) $display("ch%0d cycle %0d: DAC %h expected %h", c, cyc, analog[c], expected[c]);
        end
      end else begin
        n_skipped++;
      end
    end
  end

  // microcontroller side: one 80-bit frame (or a damaged one) to channel c
  task automatic send_cfg(input int c, input logic [31:0] f, input logic [31:0] p,
                          input logic [15:0] a, input int nbits = 80);
    logic [79:0] frame;
    frame = {f, p, a};
    pend_freq[c] = f; pend_phase[c] = p; pend_ampl[c] = a;
    cfg_cs_n[c] = 1'b0;
    #200;
    for (int i = 79; i >= 80 - nbits; i--) begin
      cfg_din = frame[i];
      #80 cfg_sclk = 1'b1;
      #80 cfg_sclk = 1'b0;
    end
    #100;
    @(negedge clk);
    cfg_cs_n[c] = 1'b1;
    repeat (5) @(posedge clk);
    last_cfg = cyc;
  endtask

  task automatic run_samples(input int n);
    repeat (n * DIV) @(posedge clk);
  endtask

  function automatic logic [31:0] fword(input real hz);
    return 32'($rtoi(hz / 500000.0 * 4294967296.0 + 0.5));
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run_samples(20);                                   // reset values
    send_cfg(0, fword(10_000.0), 32'h0, 16'h7FFF);     // G1: 10 kHz, full scale
    send_cfg(1, fword(10_000.0), 32'h4000_0000, 16'h4000); // G2: +90 deg, half
    run_samples(150);
    // the two channels stay locked: G2 is G1 a quarter period later, halved
    send_cfg(1, fword(10_000.0), 32'h8000_0000, 16'h2000);  // balancing step
    run_samples(100);
    send_cfg(1, fword(10_000.0), 32'h7F00_0000, 16'hC000);  // negative amplitude
    run_samples(100);
    send_cfg(0, fword(100_000.0), 32'h0, 16'h7FFF);    // top of range
    send_cfg(1, fword(100_000.0), 32'h2000_0000, 16'h7FFF);
    run_samples(100);
    err0 = n_frames_err;
    send_cfg(1, 32'hFFFF_FFFF, 32'h0, 16'h0, 79);      // damaged frame: ignored
    checks++;
    if (n_frames_err != err0 + 1) begin failures++; $display("bad frame not flagged"); end
    run_samples(50);
    send_cfg(0, fword(10.0), 32'h0, 16'h7FFF);         // bottom of range
    send_cfg(1, fword(10.0), 32'h0, 16'h7FFF);
    run_samples(100);

    // every mechanism must have happened
    checks++; if (n_frames_ok  < 8) begin failures++; $display("frames ok %0d", n_frames_ok); end
    checks++; if (n_frames_err < 1) begin failures++; $display("no rejected frame"); end
    checks++; if (n_freq_chg   < 1) begin failures++; $display("no freq change"); end
    checks++; if (n_phase_chg  < 1) begin failures++; $display("no phase change"); end
    checks++; if (n_ampl_chg   < 1) begin failures++; $display("no ampl change"); end
    checks++; if (n_wraps      < 1) begin failures++; $display("no accumulator wrap"); end
    checks++; if (n_restart    < 1) begin failures++; $display("no phase restart"); end
    checks++; if (n_compared < 500) begin failures++; $display("compared %0d", n_compared); end
    for (int c = 0; c < CH; c++) begin
      checks++;
      if (updates[c] < 600) begin failures++; $display("ch%0d updates %0d", c, updates[c]); end
      checks++;
      if (bad_frames[c] != 0) begin failures++; $display("ch%0d bad DAC frames", c); end
    end
    $display("events: frames_ok=%0d frames_err=%0d freq_chg=%0d phase_chg=%0d ampl_chg=%0d wraps=%0d restarts=%0d",
             n_frames_ok, n_frames_err, n_freq_chg, n_phase_chg, n_ampl_chg, n_wraps, n_restart);
    $display("samples: compared=%0d skipped=%0d intervals=%0d dac_updates=%0d/%0d",
             n_compared, n_skipped, n_interval, updates[0], updates[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
