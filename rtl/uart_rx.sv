// uart_rx: UART receiver for the link from the ZigBee transceiver.
//
// Frame format (as in the document): one start bit (0), 8 data bits sent
// least-significant first, no parity, one stop bit (1); 10 bit times per
// byte. The receiver re-synchronises on the falling edge of every start
// bit: it counts 8 oversampling ticks to the middle of the start bit,
// checks that the line is still low (otherwise it treats the edge as a
// glitch), then samples each data bit and the stop bit 16 ticks apart.
//   tick16_i  - enable at 16x the bit rate (from baud_gen)
//   rx_i      - serial input, idle high; passed through a 2-flop synchroniser
//   idata_o   - last byte received
//   valid_o   - one-cycle pulse when idata_o is updated with a good frame
//   frame_err_o - one-cycle pulse when the stop bit is 0; the byte is dropped
// The 16x oversampling and the glitch and framing checks are this design's
// choices.
module uart_rx (
  input  logic       clk_i,
  input  logic       rst_i,
  input  logic       tick16_i,
  input  logic       rx_i,
  output logic [7:0] idata_o,
  output logic       valid_o,
  output logic       frame_err_o
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  rstate_e    state;
  logic [1:0] sync;
  logic [3:0] tcnt;
  logic [2:0] bitn;
  logic [7:0] shreg;
  logic       rx_s, rx_prev;

  assign rx_s = sync[1];

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      sync        <= 2'b11;
      rx_prev     <= 1'b1;
      state       <= R_IDLE;
      tcnt        <= '0;
      bitn        <= '0;
      shreg       <= '0;
      idata_o     <= '0;
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
    end else begin
      sync        <= {sync[0], rx_i};
      rx_prev     <= rx_s;
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
      unique case (state)
        R_IDLE: begin
          tcnt <= '0;
          if (rx_prev && !rx_s) state <= R_START;  // falling edge only
        end
        R_START: if (tick16_i) begin
          if (tcnt == 4'd7) begin
            tcnt <= '0;
            bitn <= '0;
            state <= rx_s ? R_IDLE : R_DATA;
          end else begin
            tcnt <= tcnt + 4'd1;
          end
        end
        R_DATA: if (tick16_i) begin
          tcnt <= tcnt + 4'd1;
          if (tcnt == 4'd15) begin
            shreg <= {rx_s, shreg[7:1]};
            bitn  <= bitn + 3'd1;
            if (bitn == 3'd7) state <= R_STOP;
          end
        end
        R_STOP: if (tick16_i) begin
          tcnt <= tcnt + 4'd1;
          if (tcnt == 4'd15) begin
            state <= R_IDLE;
            if (rx_s) begin
              idata_o <= shreg;
              valid_o <= 1'b1;
            end else begin
              frame_err_o <= 1'b1;
            end
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
