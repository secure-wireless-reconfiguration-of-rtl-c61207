// baud_gen: baud-rate generator for the UART receiver and transmitter.
//
// Divides the system clock by DIVISOR = round(CLK_FREQ_HZ / (16 * BAUD)) to
// give tick16_o, a one-cycle pulse at 16 times the bit rate, which both UART
// halves use as their oversampling enable. This is the same relation as the
// 16x divisor latch of the transmitting side's UART
// (baud = PCLK / (16 * divisor)). baud_clk_o is a square wave at the bit
// rate (it toggles every 8 ticks) and is brought out of the top as
// baud_clock. The clock frequency and bit rate are this design's choices
// (50 MHz board clock, 9600 bit/s); the document gives neither.
module baud_gen #(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 9600
) (
  input  logic clk_i,
  input  logic rst_i,
  output logic tick16_o,
  output logic baud_clk_o
);

  localparam int unsigned DIVISOR = (CLK_FREQ_HZ + 8 * BAUD) / (16 * BAUD);
  localparam int unsigned CNT_W   = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;

  logic [CNT_W-1:0] cnt;
  logic [2:0]       phase;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      cnt        <= '0;
      tick16_o   <= 1'b0;
      phase      <= '0;
      baud_clk_o <= 1'b0;
    end else begin
      tick16_o <= 1'b0;
      if (cnt == CNT_W'(DIVISOR - 1)) begin
        cnt      <= '0;
        tick16_o <= 1'b1;
        phase    <= phase + 3'd1;
        if (phase == 3'd7) baud_clk_o <= !baud_clk_o;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial assert (DIVISOR >= 1) else $error("baud_gen: clock too slow for the bit rate");

endmodule
