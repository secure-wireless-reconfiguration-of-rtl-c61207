// uart_tx: UART transmitter on zigbee_tx, a peripheral on the core's port bus.
//
// Sends 8N1 frames (start bit 0, 8 data bits LSB first, stop bit 1), each
// bit lasting 16 ticks of tick16_i. It occupies two port addresses:
//   DATA_ADDR   write: start sending dat_i (tx_start pulses for one cycle).
//               A write while a frame is in progress is ignored.
//   STATUS_ADDR read : {6'b0, tx_done, tx_busy}
// tx_done is set when a frame's stop bit has been sent and cleared by the
// next write to DATA_ADDR. Port accesses are acknowledged on the clock edge
// after the strobe. Other addresses are not decoded here: sel_i from the
// port-bus decoder qualifies the strobe. The register map and the
// drop-while-busy rule are this design's choices; the document names the
// zigbee_tx output and the tx_start / tx_done signals.
module uart_tx
  import gumnut_pkg::*;
#(
  parameter byte_t DATA_ADDR   = PORT_UART_DATA,
  parameter byte_t STATUS_ADDR = PORT_UART_STATUS
) (
  input  logic  clk_i,
  input  logic  rst_i,
  input  logic  tick16_i,
  // port-bus slave
  input  logic  sel_i,
  input  logic  cyc_i,
  input  logic  stb_i,
  input  logic  we_i,
  input  byte_t adr_i,
  input  byte_t dat_i,
  output byte_t dat_o,
  output logic  ack_o,
  // serial side
  output logic  tx_o,
  output logic  tx_start_o,
  output logic  tx_busy_o,
  output logic  tx_done_o
);

  logic [9:0] frame;   // stop, data[7:0], start; shifted out LSB first
  logic [3:0] tcnt;
  logic [3:0] bitn;
  logic       access;

  assign access = sel_i && cyc_i && stb_i && !ack_o;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      ack_o      <= 1'b0;
      dat_o      <= '0;
      frame      <= '1;
      tcnt       <= '0;
      bitn       <= '0;
      tx_o       <= 1'b1;
      tx_start_o <= 1'b0;
      tx_busy_o  <= 1'b0;
      tx_done_o  <= 1'b0;
    end else begin
      ack_o      <= access;
      tx_start_o <= 1'b0;
      if (access && !we_i)
        dat_o <= (adr_i == STATUS_ADDR) ? {6'd0, tx_done_o, tx_busy_o} : 8'd0;
      if (access && we_i && adr_i == DATA_ADDR) tx_done_o <= 1'b0;
      if (access && we_i && adr_i == DATA_ADDR && !tx_busy_o) begin
        frame      <= {1'b1, dat_i, 1'b0};
        tx_busy_o  <= 1'b1;
        tx_start_o <= 1'b1;
        tcnt       <= '0;
        bitn       <= '0;
      end else if (tx_busy_o && tick16_i) begin
        tx_o <= frame[0];
        tcnt <= tcnt + 4'd1;
        if (tcnt == 4'd15) begin
          frame <= {1'b1, frame[9:1]};
          bitn  <= bitn + 4'd1;
          if (bitn == 4'd9) begin
            tx_busy_o <= 1'b0;
            tx_done_o <= 1'b1;
          end
        end
      end else if (!tx_busy_o) begin
        tx_o <= 1'b1;
      end
    end
  end

endmodule
