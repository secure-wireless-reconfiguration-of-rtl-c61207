// uart_host_model: behavioural model of the remote transmitter's serial
// output (the microcontroller UART behind the ZigBee radio), for testbenches.
// Not synthesizable.
//
// Drives tx_o with 8N1 frames: start bit, 8 data bits LSB first, stop bit.
// The bit time is 16 * DIVISOR clock cycles with DIVISOR rounded as in
// baud_gen, scaled by SKEW_PPM parts per million (positive = slower) to
// model a transmitter clock that is off. Tasks:
//   send_byte(b)          one frame, then IDLE_BITS idle bit times
//   send_string(s)        every character of s
//   send_bad_stop(b)      a frame whose stop bit is 0 (framing error)
//   glitch(cycles)        a short low pulse on the idle line
module uart_host_model #(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 9600,
  parameter int          SKEW_PPM    = 0,
  parameter int unsigned IDLE_BITS   = 1
) (
  input  logic clk_i,
  output logic tx_o
);

  localparam int unsigned DIVISOR  = (CLK_FREQ_HZ + 8 * BAUD) / (16 * BAUD);
  localparam int unsigned BIT_CYC  = 16 * DIVISOR;

  int unsigned bit_cyc = BIT_CYC;

  initial begin
    tx_o = 1'b1;
    bit_cyc = int'((longint'(BIT_CYC) * (1_000_000 + SKEW_PPM)) / 1_000_000);
  end

  task automatic hold(input logic v, input int unsigned cycles);
    tx_o = v;
    repeat (cycles) @(posedge clk_i);
  endtask

  task automatic send_frame(input logic [7:0] b, input logic stop);
    hold(1'b0, bit_cyc);
    for (int i = 0; i < 8; i++) hold(b[i], bit_cyc);
    hold(stop, bit_cyc);
    hold(1'b1, IDLE_BITS * bit_cyc);
  endtask

  task automatic send_byte(input logic [7:0] b);
    send_frame(b, 1'b1);
  endtask

  task automatic send_bad_stop(input logic [7:0] b);
    send_frame(b, 1'b0);
    hold(1'b1, 2 * bit_cyc);
  endtask

  task automatic send_string(input string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
  endtask

  task automatic glitch(input int unsigned cycles);
    hold(1'b0, cycles);
    hold(1'b1, bit_cyc);
  endtask

endmodule
