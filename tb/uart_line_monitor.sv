// uart_line_monitor: behavioural 8N1 receiver for testbenches. Not
// synthesizable.
//
// Watches rx_i, and on every falling edge of an idle line samples the middle of each bit using the
// nominal bit time (16 * DIVISOR cycles, DIVISOR rounded as in baud_gen).
// Received bytes are appended to `bytes`; frames whose stop bit is 0 count
// in `framing_errors`.
module uart_line_monitor #(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 9600
) (
  input logic clk_i,
  input logic rx_i
);

  localparam int unsigned DIVISOR = (CLK_FREQ_HZ + 8 * BAUD) / (16 * BAUD);
  localparam int unsigned BIT_CYC = 16 * DIVISOR;

  logic [7:0]  bytes [$];
  int unsigned framing_errors = 0;

  initial begin
    logic [7:0] b;
    logic prev;
    prev = 1'b1;
    forever begin
      @(posedge clk_i);
      if (prev == 1'b1 && rx_i == 1'b0) begin
        // centre of bit 0 is 1.5 bit times after the start edge
        repeat (BIT_CYC + BIT_CYC / 2 - 1) @(posedge clk_i);
        for (int i = 0; i < 8; i++) begin
          b[i] = rx_i;
          repeat (BIT_CYC) @(posedge clk_i);
        end
        if (rx_i) bytes.push_back(b);
        else      framing_errors++;
        while (rx_i == 1'b0) @(posedge clk_i);
      end
      prev = rx_i;
    end
  end

endmodule
