// dac_spi: serial transmitter from the generator to an AD5541 16-bit DAC.
//
// On `start` (ignored while `busy`) the module latches `data`, pulls CS low
// and sends DW bits MSB first. SDO changes on SCLK falling edges (and at CS
// fall for the first bit) so that it is stable at every SCLK rising edge,
// where the DAC samples it. CS returns high after the last bit, which makes
// the AD5541 update its output. SCLK idles low. These framing rules are the
// AD5541's serial format; the SCLK divider is this design's choice.
//
// Timing: each SCLK half period lasts SCLK_DIV clocks. A frame occupies
// 2*DW*SCLK_DIV + 2 clocks from the `start` clock to `busy` falling:
// 66 clocks at the defaults, inside the 100-clock sample period of a 50 MHz
// system clock at 500 kHz.
module dac_spi #(
  parameter int unsigned DW       = 16,
  parameter int unsigned SCLK_DIV = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] data,
  output logic          busy,
  output logic          cs_n,
  output logic          sclk,
  output logic          sdo
);

  typedef enum logic [1:0] {IDLE, SHIFT, DONE} state_t;

  localparam int unsigned DIV_W = (SCLK_DIV > 1) ? $clog2(SCLK_DIV) : 1;
  localparam int unsigned BIT_W = $clog2(DW + 1);

  state_t           state;
  logic [DW-1:0]    sh;
  logic [DIV_W-1:0] div;
  logic [BIT_W-1:0] bits;   // bits still to finish

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      sh    <= '0;
      div   <= '0;
      bits  <= '0;
      cs_n  <= 1'b1;
      sclk  <= 1'b0;
      sdo   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state <= SHIFT;
          cs_n  <= 1'b0;
          sdo   <= data[DW-1];
          sh    <= data << 1;
          bits  <= BIT_W'(DW);
          div   <= '0;
        end
        SHIFT: begin
          if (div == DIV_W'(SCLK_DIV - 1)) begin
            div  <= '0;
            sclk <= ~sclk;
            if (sclk) begin               // falling edge: next bit or finish
              bits <= bits - 1'b1;
              if (bits == BIT_W'(1)) begin
                state <= DONE;
              end else begin
                sdo <= sh[DW-1];
                sh  <= sh << 1;
              end
            end
          end else begin
            div <= div + 1'b1;
          end
        end
        DONE: begin
          cs_n  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // CS may only be low while a frame is in progress, and SCLK idles low.
  a_cs_only_busy: assert property (@(posedge clk) disable iff (!rst_n) !cs_n |-> busy);
  a_sclk_idle:    assert property (@(posedge clk) disable iff (!rst_n) cs_n |-> !sclk);

endmodule
