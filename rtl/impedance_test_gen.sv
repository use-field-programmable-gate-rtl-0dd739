// impedance_test_gen: two-channel digital test-signal generator for a bridge
// impedance meter.
//
// The bridge is driven by two sine sources of equal frequency: G1 (fixed
// amplitude and phase, channel 0) and G2 (amplitude and phase adjusted until
// the bridge balances, channel 1). Each channel is the same chain:
//
//   spi_slave -> freq, phase, ampl registers
//   dds       -> phase accumulator + phase shift, 16-bit phase
//   rom1      -> 1024 x 16 signed sine table, addressed by phase[15:6]
//   mul1      -> sine * ampl (signed), Q1.15 sample = product[30:15]
//   dac_spi   -> offset-binary code shifted out to one AD5541 DAC
//
// One sample_timer strobe (f_clk / (CLK_HZ/FS_HZ) = 500 kHz) advances every
// channel's accumulator on the same clock. Channels are written one at a
// time, so for a few samples after a frequency change they would run at
// different frequencies and drift apart; to prevent that, whenever any
// channel's freq word changes, every accumulator is cleared on the same
// clock (phase restart). After that, with equal freq words, the phase
// difference between the channels is exactly the difference of their phase
// words. Phase and amplitude writes do not restart anything, so a balancing
// loop can step them without a jump in the other channel. Two channels at
// 500 kHz give 1 M samples/s in all.
//
// What follows the generator's description: the chain above, the widths
// (32-bit freq/phase, 16-bit ampl, 1024 x 16 ROM), the signed multiplier, 500
// kHz per channel and the AD5541. This design's own choices: the 50 MHz
// clock, the sample strobe, the phase restart, taking the top ROM_AW phase
// bits as the address, one parameter CS and one DAC link per channel, the
// serial frame format, and the offset-binary conversion (the AD5541 is
// unipolar).
//
// Timing: the strobe updates the accumulators; three clocks later (ROM
// address and data registers) the sample is valid and the DAC frame starts.
// `dac_code` holds the code of the frame in flight. The DAC output changes
// when its CS rises, 66 + 3 clocks after the strobe at the defaults.
module impedance_test_gen
  import dsg_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned FS_HZ        = 500_000,
  parameter int unsigned NUM_CH       = 2,
  parameter int unsigned ROM_AW       = 10,
  parameter int unsigned DAC_SCLK_DIV = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // parameter link from the microcontroller
  input  logic                       cfg_din,
  input  logic                       cfg_sclk,
  input  logic [NUM_CH-1:0]          cfg_cs_n,
  output logic [NUM_CH-1:0]          cfg_frame_ok,
  output logic [NUM_CH-1:0]          cfg_frame_err,
  // one AD5541 link per channel
  output logic [NUM_CH-1:0]          dac_cs_n,
  output logic [NUM_CH-1:0]          dac_sclk,
  output logic [NUM_CH-1:0]          dac_din,
  // observation
  output logic                       sample_strobe,
  output logic [NUM_CH-1:0][SAMPLE_W-1:0] dac_code
);

  localparam int unsigned DIV = CLK_HZ / FS_HZ;
  localparam int unsigned DDS_OUT_W = 16;

  // The DAC frame plus the pipeline must fit in one sample period.
  if (DIV < 2 * SAMPLE_W * DAC_SCLK_DIV + 6) begin : g_check_div
    $error("sample period of %0d clocks is too short for the DAC frame", DIV);
  end

  logic       strobe;
  logic [2:0] strobe_d;   // strobe delayed by 1..3 clocks

  sample_timer #(.DIV(DIV)) u_timer (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(strobe)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) strobe_d <= '0;
    else        strobe_d <= {strobe_d[1:0], strobe};
  end

  assign sample_strobe = strobe;

  // Phase restart: set when any channel's freq word differs from its value
  // one clock earlier.
  logic [NUM_CH-1:0] freq_changed;
  logic              restart;
  always_comb restart = |freq_changed;

  for (genvar ch = 0; ch < NUM_CH; ch++) begin : g_ch
    logic [FREQ_W-1:0]           freq;
    logic [PHASE_W-1:0]          phase;
    logic signed [AMPL_W-1:0]    ampl;
    logic [DDS_OUT_W-1:0]        phase_out;
    logic signed [SAMPLE_W-1:0]  sine;
    logic signed [SAMPLE_W+AMPL_W-1:0] product;
    logic [SAMPLE_W-1:0]         code;
    logic                        dac_busy;
    logic [FREQ_W-1:0]           freq_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) freq_q <= '0;
      else        freq_q <= freq;
    end
    always_comb freq_changed[ch] = (freq != freq_q);

    spi_slave u_spi (
      .clk      (clk),
      .rst_n    (rst_n),
      .din      (cfg_din),
      .sclk     (cfg_sclk),
      .cs_n     (cfg_cs_n[ch]),
      .freq     (freq),
      .phase    (phase),
      .ampl     (ampl),
      .frame_ok (cfg_frame_ok[ch]),
      .frame_err(cfg_frame_err[ch])
    );

    dds #(.ACC_W(FREQ_W), .OUT_W(DDS_OUT_W)) u_dds (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (strobe),
      .clr  (restart),
      .phase(phase),
      .freq (freq),
      .out  (phase_out)
    );

    rom1 #(.AW(ROM_AW), .DW(SAMPLE_W)) u_rom (
      .clock  (clk),
      .address(phase_out[DDS_OUT_W-1 -: ROM_AW]),
      .q      (sine)
    );

    mul1 #(.AW(SAMPLE_W), .BW(AMPL_W)) u_mul (
      .dataa (sine),
      .datab (ampl),
      .result(product)
    );

    // Q1.15 sample to AD5541 straight binary: invert the sign bit.
    always_comb code = {~product[SAMPLE_W+AMPL_W-2], product[SAMPLE_W+AMPL_W-3 -: SAMPLE_W-1]};

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)           dac_code[ch] <= 16'h8000;
      else if (strobe_d[2]) dac_code[ch] <= code;
    end

    dac_spi #(.DW(SAMPLE_W), .SCLK_DIV(DAC_SCLK_DIV)) u_dac (
      .clk  (clk),
      .rst_n(rst_n),
      .start(strobe_d[2]),
      .data (code),
      .busy (dac_busy),
      .cs_n (dac_cs_n[ch]),
      .sclk (dac_sclk[ch]),
      .sdo  (dac_din[ch])
    );

    // A new sample never arrives while the previous one is still being sent.
    a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) strobe_d[2] |-> !dac_busy);
  end

endmodule
